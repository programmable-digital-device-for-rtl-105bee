// Subtract-and-convert stage at the head of the main signal channel.
//
// The A/D converter delivers an unsigned 8-bit code with zero field at mid
// scale (128). This stage subtracts the mid-scale code and converts the
// result into 9-bit signed magnitude (bit 8 = sign, bits 7:0 = magnitude),
// the number format the two multipliers work in. Code 0 gives -128, code 255
// gives +127; zero is always encoded with a clear sign bit.
// One register stage: out_* are valid one clock after in_*. The slot tag
// in_is_temp (a temperature conversion occupied this slot) travels along.
// The block name is the device's; the mid-scale offset and the output
// format are read from the signed-magnitude Adc register of the register map.
module sub_convert (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_is_temp,
  input  logic [7:0] in_code,
  output logic       out_valid,
  output logic       out_is_temp,
  output logic [8:0] out_sm
);
  logic       neg;
  logic [7:0] mag;

  always_comb begin
    neg = ~in_code[7];
    mag = neg ? (8'd128 - in_code) : (in_code - 8'd128);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_is_temp <= 1'b0;
      out_sm      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_is_temp <= in_is_temp;
        out_sm      <= {neg, mag};
      end
    end
  end
endmodule
