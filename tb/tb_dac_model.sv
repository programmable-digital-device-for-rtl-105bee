// Self-checking test of the D/A converter model: every code must give
// code * 5000 / 256 mV (truncated).
module tb_dac_model;
  logic [7:0]  code;
  logic [12:0] vout_mv;
  int checks = 0, failures = 0;

  dac_model dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      code = 8'(c);
      #10;
      checks++;
      if (int'(vout_mv) != c * 5000 / 256) begin
        failures++;
        $display("code %0d: %0d mV", c, vout_mv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
