// Multiply 2: sensitivity (slope) adjustment.
//
// Multiplies the linearized 9-bit signed-magnitude value by the Sens
// register, 7-bit signed magnitude: sign plus a 6-bit magnitude in steps of
// 1/16, so the gain spans +-0.0625 .. +-3.9375. The magnitude product is
// rounded to nearest (halves up, i.e. away from zero) at 1/16 and the signed
// result leaves as an 11-bit two's complement number (|result| <= 1004).
//
// Three pipeline stages: (1) two parallel partial products mag*S[2:0] and
// mag*S[5:3]; (2) their sum; (3) rounding and conversion to two's
// complement. out_valid follows in_valid by three clocks; a new operand may
// enter every clock. The gain range and the rounding are the device's; the
// 1/16 step, the stage contents and the output format are this design's.
module mult_sens (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [8:0]        in_sm,
  input  logic [6:0]        sens,
  output logic              out_valid,
  output logic signed [10:0] out_val
);
  logic        v1, v2;
  logic        s1, s2;
  logic [10:0] pp_lo;   // mag * S[2:0]
  logic [10:0] pp_hi;   // mag * S[5:3]
  logic [13:0] prod;
  logic [9:0]  rmag;

  assign rmag = 10'((prod + 14'd8) >> 4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; s1 <= 1'b0; s2 <= 1'b0;
      pp_lo <= '0; pp_hi <= '0; prod <= '0;
      out_valid <= 1'b0;
      out_val   <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        s1    <= in_sm[8] ^ sens[6];
        pp_lo <= 11'(in_sm[7:0] * sens[2:0]);
        pp_hi <= 11'(in_sm[7:0] * sens[5:3]);
      end
      v2 <= v1;
      if (v1) begin
        s2   <= s1;
        prod <= 14'(pp_lo) + (14'(pp_hi) << 3);
      end
      out_valid <= v2;
      if (v2) out_val <= s2 ? -$signed({1'b0, rmag}) : $signed({1'b0, rmag});
    end
  end
endmodule
