// Behavioural model of the 8-bit resistor-string D/A converter. The real
// part is a library cell; this model gives its transfer function for
// simulation: vout_mv = code * VREF_MV / 256 (truncated to whole mV), with
// VREF_MV = 5000 for a 5 V string. It is combinational, like a resistor
// string without output register.
module dac_model #(
  parameter int VREF_MV = 5000
) (
  input  logic [7:0]  code,
  output logic [12:0] vout_mv
);
  assign vout_mv = 13'((21'(code) * 21'(VREF_MV)) >> 8);
endmodule
