// Self-checking test of the A/D converter model: random voltages on both
// inputs, the selected one must come out as floor(v * 256 / 5000) capped
// at 255, with done exactly 9 clocks after start.
module tb_sar_adc_model;
  logic clk = 0, rst_n = 0;
  logic start = 0, sel_temp = 0;
  logic [12:0] hall_mv = 0, temp_mv = 0;
  logic done;
  logic [7:0] code;
  int checks = 0, failures = 0;

  sar_adc_model dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, t, e, lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      h = $urandom_range(0, 5200); t = $urandom_range(0, 5200);
      if (n == 0) h = 0;
      if (n == 1) h = 4981;      // 255 * 5000 / 256 -> first voltage of code 255
      if (n == 2) h = 4980;
      @(negedge clk);
      hall_mv = 13'(h); temp_mv = 13'(t); sel_temp = n[0]; start = 1;
      @(negedge clk);
      start = 0;
      hall_mv = 0; temp_mv = 0;   // sample-and-hold must keep the value
      lat = 1;
      while (!done && lat < 20) begin @(negedge clk); lat++; end
      e = (sel_temp ? t : h) * 256 / 5000;
      if (e > 255) e = 255;
      checks++;
      if (int'(code) != e || lat != 9) begin
        failures++;
        $display("v=%0d: code %0d expected %0d, latency %0d", sel_temp ? t : h, code, e, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
