// Output encoder of the serial interface (helper of serial_if).
//
// Sends a reply in the line code of the interface: an acknowledge bit, the
// line held high for one bit time, which also tells the receiver the bit
// time; then nbits data bits, most significant first (payload[nbits-1]
// first). Every bit starts with a change of the line level; a '1' carries a
// second change at 3/4 of the bit time, a '0' none. After the last bit the
// line returns low, its idle level. bt is the bit time in clocks.
// start is taken in idle only; done pulses when the line is back low. The
// reply takes (nbits + 1) * bt clocks. The 3/4 position is this design's
// choice inside the 60..90 % window of the line code.
module biphase_tx #(
  parameter int CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] bt,
  input  logic [3:0]    nbits,
  input  logic [9:0]    payload,
  output logic          line,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {T_IDLE, T_ACK, T_BIT} tstate_e;

  tstate_e       st;
  logic [CW-1:0] cnt;
  logic [3:0]    bi;        // index of the bit being sent
  logic [9:0]    data;
  logic [CW-1:0] q3;

  assign q3   = bt - (bt >> 2);
  assign busy = (st != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= T_IDLE;
      cnt  <= '0;
      bi   <= '0;
      data <= '0;
      line <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        T_IDLE: if (start) begin
          st   <= T_ACK;
          line <= 1'b1;
          cnt  <= '0;
          data <= payload;
        end
        T_ACK: begin
          cnt <= cnt + 1'b1;
          if (cnt == bt - 1'b1) begin
            cnt  <= '0;
            line <= 1'b0;                  // falling edge: end of ack
            if (nbits == 4'd0) begin
              st   <= T_IDLE;
              done <= 1'b1;
            end else begin
              bi <= nbits - 1'b1;
              st <= T_BIT;
            end
          end
        end
        T_BIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == q3 && data[bi]) line <= ~line;   // mid-bit change of a '1'
          if (cnt == bt - 1'b1) begin
            cnt <= '0;
            if (bi == 4'd0) begin
              line <= 1'b0;
              st   <= T_IDLE;
              done <= 1'b1;
            end else begin
              line <= ~line;               // bit boundary
              bi   <= bi - 1'b1;
            end
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
