// Self-checking test of sub_convert: every 8-bit code, compared with
// (code - 128) written as sign and magnitude; one-clock latency and the
// passing of the temperature tag are checked too.
module tb_sub_convert;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_is_temp = 0;
  logic [7:0] in_code = 0;
  logic out_valid, out_is_temp;
  logic [8:0] out_sm;
  int checks = 0, failures = 0;

  sub_convert dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    logic [8:0] exp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 256; c++) begin
      @(negedge clk);
      in_valid = 1; in_code = 8'(c); in_is_temp = (c % 7 == 3);
      @(negedge clk);
      in_valid = 0;
      v = c - 128;
      exp = {v < 0, 8'(v < 0 ? -v : v)};
      checks++;
      if (!out_valid || out_sm !== exp || out_is_temp !== (c % 7 == 3)) begin
        failures++;
        $display("code %0d: got %h valid %b, expected %h", c, out_sm, out_valid, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
