// Adder: output quiescent value.
//
// Adds the Voq register (9-bit two's complement, -256..255) to the scaled
// signal from Multiply 2 (11-bit two's complement). The 12-bit sum cannot
// overflow, so no saturation is needed; clamping into the output range is
// left to the limiter that follows. One register stage: out_valid follows
// in_valid by one clock. The Voq range is the device's; the register stage
// is this design's choice.
module offset_adder (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [10:0] in_val,
  input  logic signed [8:0]  voq,
  output logic               out_valid,
  output logic signed [11:0] out_val
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_val   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_val <= 12'(in_val) + 12'(voq);
    end
  end
endmodule
