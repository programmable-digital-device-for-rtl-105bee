// Self-checking test of offset_adder: random signed inputs and Voq values
// over their full ranges; the sum must appear one clock later.
module tb_offset_adder;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [10:0] in_val = 0;
  logic signed [8:0]  voq = 0;
  logic out_valid;
  logic signed [11:0] out_val;
  int checks = 0, failures = 0;

  offset_adder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      a = $urandom_range(0, 2008) - 1004;
      b = $urandom_range(0, 511) - 256;
      if (n == 0) begin a = -1004; b = -256; end
      if (n == 1) begin a = 1004;  b = 255; end
      @(negedge clk);
      in_valid = 1; in_val = 11'(a); voq = 9'(b);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(out_val) != a + b) begin
        failures++;
        $display("%0d + %0d: got %0d", a, b, out_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
