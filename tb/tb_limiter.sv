// Self-checking test of limiter: random sums and limits, including values
// right at and beyond both limits and the case Lo > Hi. Expected output is
// min(max(x, Lo), Hi), one clock later, with the clamped flag.
module tb_limiter;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [11:0] in_val = 0;
  logic [6:0] lo = 0;
  logic [7:0] hi = 0;
  logic dac_valid, clamped;
  logic [7:0] dac;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  limiter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, l, h, e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      l = $urandom_range(0, 127);
      h = $urandom_range(0, 255);
      case (n % 4)
        0: x = $urandom_range(0, 2047) - 1024;
        1: x = l + $urandom_range(0, 2) - 1;
        2: x = h + $urandom_range(0, 2) - 1;
        default: x = $urandom_range(0, 300) - 20;
      endcase
      e = (x < l) ? l : x;
      e = (e > h) ? h : e;
      if (e != x && e == l) n_lo++;
      if (e != x && e == h) n_hi++;
      @(negedge clk);
      in_valid = 1; in_val = 12'(x); lo = 7'(l); hi = 8'(h);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!dac_valid || int'(dac) != e || clamped != (e != x)) begin
        failures++;
        $display("x=%0d lo=%0d hi=%0d: got %0d clamped %b expected %0d", x, l, h, dac, clamped, e);
      end
    end
    if (n_lo == 0 || n_hi == 0) failures++;
    $display("clamped low %0d high %0d", n_lo, n_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
