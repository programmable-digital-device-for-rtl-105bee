// Temperature linearization block.
//
// The Hall voltage drifts with temperature as V(T) = V(T0)*(1 + TC*dT). The
// drift is undone by multiplying with the second-order Taylor polynomial
//     F = 1 - Tq*dT + Sqtq*dT^2,     dT = temperature - T0,
// where Tq (8-bit signed magnitude, first-order quotient), Sqtq (7-bit
// unsigned, second-order quotient) and T0 (8-bit two's complement, sensor
// reading at 25 degC) are user registers. The polynomial and the quotient
// ranges are the device's; the scaling is this design's choice: one LSB of
// Tq weighs 2^-K1_SHIFT per temperature LSB, one LSB of Sqtq weighs
// 2^-K2_SHIFT per squared temperature LSB. F is rounded to nearest and
// saturated into unsigned Q2.7 (0 .. 511/128).
//
// The block works beside the main channel and only when a temperature sample
// arrives (temp_valid). It is a four-step pipeline: dT, then Tq*dT and dT^2,
// then Sqtq*dT^2, then the sum, rounding and clamp. factor changes four
// clocks after temp_valid and holds until the next sample; busy is high
// meanwhile. After reset factor is 1.0 (128).
module linearize #(
  parameter int K1_SHIFT = 14,
  parameter int K2_SHIFT = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       temp_valid,
  input  logic [7:0] temp_val,   // two's complement
  input  logic [7:0] t0,         // two's complement
  input  logic [7:0] tq,         // signed magnitude
  input  logic [6:0] sqtq,       // unsigned
  output logic [8:0] factor,     // unsigned Q2.7
  output logic       busy
);
  localparam int ACC_W = K2_SHIFT + 8;
  localparam int OUT_SHIFT = K2_SHIFT - 7;

  logic [2:0]               stage;     // stage[i]: data valid after step i
  logic signed [8:0]        d;
  logic signed [8:0]        tq_s;
  logic        [6:0]        sq_r;
  logic signed [17:0]       p1;        // Tq*dT
  logic        [15:0]       dsq;       // dT^2
  logic signed [ACC_W-1:0]  t1, t2;
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  rnd;

  always_comb begin
    acc = (ACC_W'(1) <<< K2_SHIFT) - t1 + t2;
    rnd = (acc + (ACC_W'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
  end

  assign busy = |stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage  <= '0;
      d      <= '0;
      tq_s   <= '0;
      sq_r   <= '0;
      p1     <= '0;
      dsq    <= '0;
      t1     <= '0;
      t2     <= '0;
      factor <= 9'd128;
    end else begin
      stage <= {stage[1:0], temp_valid};
      if (temp_valid) begin
        d    <= $signed({temp_val[7], temp_val}) - $signed({t0[7], t0});
        tq_s <= tq[7] ? -$signed({2'b00, tq[6:0]}) : $signed({2'b00, tq[6:0]});
        sq_r <= sqtq;
      end
      if (stage[0]) begin
        p1  <= tq_s * d;
        dsq <= 16'($signed(d) * $signed(d));
      end
      if (stage[1]) begin
        t1 <= ACC_W'(p1) <<< (K2_SHIFT - K1_SHIFT);
        t2 <= $signed(ACC_W'(sq_r) * ACC_W'(dsq));
      end
      if (stage[2]) begin
        if (rnd < 0)        factor <= 9'd0;
        else if (rnd > 511) factor <= 9'd511;
        else                factor <= 9'(rnd);
      end
    end
  end
endmodule
