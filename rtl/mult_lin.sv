// Multiply 1: temperature compensation of the Hall value.
//
// Multiplies the 9-bit signed-magnitude Hall value by the correction factor
// F (unsigned Q2.7) from the linearization block. The magnitude product is
// rounded to nearest (halves up) and saturated to 8 bits; the sign passes
// through and a zero result gets a clear sign. The result is the "Adc"
// register value: the linearized Hall reading, 9-bit signed magnitude.
//
// Two pipeline stages, with the multiplier split in two parallel partial
// products: stage 1 forms mag*F[4:0] and mag*F[8:5], stage 2 adds, rounds
// and saturates. out_valid follows in_valid by two clocks; one new operand
// can enter every clock. Rounding and a two/three-stage split of the two
// multipliers are the device's; which multiplier gets two stages, and the
// partial-product split, are this design's choice.
module mult_lin (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [8:0] in_sm,
  input  logic [8:0] factor,
  output logic       out_valid,
  output logic [8:0] out_sm
);
  logic        v1;
  logic        s1;
  logic [12:0] pp_lo;    // mag * F[4:0]
  logic [11:0] pp_hi;    // mag * F[8:5]
  logic [16:0] prod;
  logic [9:0]  rounded;
  logic [7:0]  mag_sat;

  always_comb begin
    prod    = 17'(pp_lo) + (17'(pp_hi) << 5);
    rounded = 10'((prod + 17'd64) >> 7);
    mag_sat = (rounded > 10'd255) ? 8'd255 : rounded[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      s1        <= 1'b0;
      pp_lo     <= '0;
      pp_hi     <= '0;
      out_valid <= 1'b0;
      out_sm    <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        s1    <= in_sm[8];
        pp_lo <= 13'(in_sm[7:0] * factor[4:0]);
        pp_hi <= 12'(in_sm[7:0] * factor[8:5]);
      end
      out_valid <= v1;
      if (v1) out_sm <= {s1 && (mag_sat != 0), mag_sat};
    end
  end
endmodule
