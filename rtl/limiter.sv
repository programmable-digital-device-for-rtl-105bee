// Limiter (clamping device) at the end of the main channel.
//
// Limits the 12-bit signed sum to the window [Lo, Hi] and delivers the 8-bit
// code for the D/A converter: values below Lo give Lo ("clamp-low"), values
// above Hi give Hi ("clamp-high"). Lo is 7 bits (0..127), Hi is 8 bits
// (0..255), as in the device's register map. If Lo > Hi, Hi wins (this
// design's choice). One register stage: dac_valid follows in_valid by one
// clock, and dac holds its value between samples.
module limiter (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [11:0] in_val,
  input  logic [6:0]         lo,
  input  logic [7:0]         hi,
  output logic               dac_valid,
  output logic [7:0]         dac,
  output logic               clamped    // this sample hit a limit
);
  logic signed [11:0] v_lo, v_hi;
  logic signed [11:0] lo_s, hi_s;

  always_comb begin
    lo_s = $signed({5'b0, lo});
    hi_s = $signed({4'b0, hi});
    v_lo = (in_val < lo_s) ? lo_s : in_val;
    v_hi = (v_lo > hi_s) ? hi_s : v_lo;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_valid <= 1'b0;
      dac       <= '0;
      clamped   <= 1'b0;
    end else begin
      dac_valid <= in_valid;
      if (in_valid) begin
        dac     <= v_hi[7:0];
        clamped <= (v_hi != in_val);
      end
    end
  end
endmodule
