// Serial interface: a one-pin asynchronous link for reading and writing the
// configuration registers and for the EEPROM/lock commands.
//
// Line code (input and output, idle level low): every bit starts with a
// change of the line level; a '1' has one more change between 60 % and 90 %
// of the bit time, a '0' has none. The telegram starts with the sync bit, a
// '0': the rising edge opens it and the first falling edge closes it, so its
// length is the bit time bt, measured here in clocks. Then follow
//   3 command bits, command parity, 3 address bits, address parity
// and, for Write only, as many data bits as the addressed register has plus
// a data parity bit, all most significant bit first. After the last bit the
// line must go low. Parity is odd (group plus parity bit has an odd number
// of ones).
// Decoding: a change between bt/2 and 15*bt/16 after the start of a bit is
// the mid-bit change of a '1'; a change later than that starts the next
// bit. A change earlier than bt/2, a second mid-bit change, no change by
// 5*bt/4, a sync bit shorter than MIN_BIT_CYCLES, or a line still high bt/2
// after the last bit discards the telegram. The last bit is known from the
// command and address, so it ends by time, not by a change.
// A valid telegram is passed to the memory control logic (cmd_valid, one
// clock). If it acknowledges (cmd_ok with cmd_done), the reply is sent with
// the same bit time: the acknowledge bit, and for Read the register's data
// bits and their parity bit. An invalid or refused telegram gets no reply.
// While locked is high the interface ignores its input and sends nothing.
// The telegram layout, the line code and the reply are the device's; the
// decision thresholds, parity polarity and bit order are this design's.
module serial_if
  import hall_pkg::*;
#(
  parameter int CW             = 16,
  parameter int MIN_BIT_CYCLES = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sin,
  output logic          sout,
  input  logic          locked,
  input  logic [1:0]    rd_sel,      // Special[6:5]: what address 111 reads
  output logic          cmd_valid,
  output logic [2:0]    cmd,
  output logic [2:0]    addr,
  output logic [8:0]    wdata,
  input  logic          cmd_done,
  input  logic          cmd_ok,
  input  logic [8:0]    rdata,
  output logic          frame_ok,    // pulse: valid telegram received
  output logic          frame_err,   // pulse: telegram discarded
  output logic [CW-1:0] bit_time
);
  typedef enum logic [2:0] {R_ARM, R_IDLE, R_SYNC, R_BIT, R_TAIL, R_EXEC, R_TX} rstate_e;

  rstate_e       st;
  logic [2:0]    sync_q;          // two synchronizer stages + previous value
  logic          lvl, edge_seen;
  logic [CW-1:0] cnt;
  logic          mid;             // mid-bit change seen in this bit
  logic [4:0]    nb;              // bits received after the sync bit
  logic [7:0]    hdr;             // command, parity, address, parity
  logic [9:0]    dsh;             // data bits and data parity
  logic [3:0]    dw;              // data width of the addressed register
  logic          last;            // the current bit is the last one
  logic          bitval;
  logic          tx_start, tx_busy, tx_done;
  logic [3:0]    tx_nbits;
  logic [9:0]    tx_payload;

  logic [CW-1:0] t_half, t_mid_hi, t_late;
  assign t_half   = bit_time >> 1;
  assign t_mid_hi = bit_time - (bit_time >> 4);
  assign t_late   = bit_time + (bit_time >> 2);

  assign lvl       = sync_q[1];
  assign edge_seen = sync_q[1] ^ sync_q[2];

  // header fields as they stand after 7 and after 8 received bits
  logic [2:0] h7_cmd, h7_addr;
  assign h7_cmd  = hdr[6:4];
  assign h7_addr = hdr[2:0];

  always_comb begin
    dw = reg_width(nb >= 5'd8 ? hdr[3:1] : h7_addr, rd_sel);
    if (nb < 5'd7)       last = 1'b0;
    else if (nb == 5'd7) last = (h7_cmd != C_WRITE);
    else                 last = (nb == 5'd8 + 5'(dw));
    bitval = mid;
  end

  // parity checks on the completed telegram
  logic [8:0] data_bits;
  logic       good;
  always_comb begin
    data_bits = 9'(dsh >> 1) & width_mask(dw);
    good = (hdr[4] == odd_par({6'b0, hdr[7:5]})) &&
           (hdr[0] == odd_par({6'b0, hdr[3:1]})) &&
           ((hdr[7:5] != C_WRITE) || (dsh[0] == odd_par(data_bits)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= R_ARM;
      sync_q    <= '0;
      cnt       <= '0;
      mid       <= 1'b0;
      nb        <= '0;
      hdr       <= '0;
      dsh       <= '0;
      bit_time  <= '0;
      cmd_valid <= 1'b0;
      cmd       <= '0;
      addr      <= '0;
      wdata     <= '0;
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
      tx_start  <= 1'b0;
      tx_nbits  <= '0;
      tx_payload<= '0;
    end else begin
      sync_q    <= {sync_q[1:0], sin};
      cmd_valid <= 1'b0;
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
      tx_start  <= 1'b0;
      if (cnt != '1) cnt <= cnt + 1'b1;
      unique case (st)
        R_ARM:  if (!lvl && !locked) st <= R_IDLE;
        R_IDLE: begin
          if (locked) st <= R_ARM;
          else if (edge_seen && lvl) begin
            st  <= R_SYNC;
            cnt <= '0;
          end
        end
        R_SYNC: begin
          if (edge_seen) begin
            if (cnt < CW'(MIN_BIT_CYCLES) || cnt == '1) begin
              st        <= R_ARM;
              frame_err <= 1'b1;
            end else begin
              bit_time <= cnt;
              st       <= R_BIT;
              cnt      <= '0;
              mid      <= 1'b0;
              nb       <= '0;
              hdr      <= '0;
              dsh      <= '0;
            end
          end
        end
        R_BIT: begin
          if (edge_seen && cnt < t_half) begin
            st        <= R_ARM;                // glitch or too short
            frame_err <= 1'b1;
          end else if (edge_seen && cnt < t_mid_hi) begin
            if (mid) begin
              st        <= R_ARM;
              frame_err <= 1'b1;
            end
            mid <= 1'b1;
          end else if ((edge_seen) || (last && cnt >= bit_time)) begin
            // bit complete
            if (nb < 5'd8) hdr <= {hdr[6:0], bitval};
            else           dsh <= {dsh[8:0], bitval};
            nb  <= nb + 1'b1;
            mid <= 1'b0;
            cnt <= '0;
            if (last) st <= R_TAIL;
          end else if (cnt >= t_late) begin
            st        <= R_ARM;                // telegram broke off
            frame_err <= 1'b1;
          end
        end
        R_TAIL: begin
          if (!lvl) begin
            if (good) begin
              st        <= R_EXEC;
              cmd_valid <= 1'b1;
              cmd       <= hdr[7:5];
              addr      <= hdr[3:1];
              wdata     <= data_bits;
              frame_ok  <= 1'b1;
            end else begin
              st        <= R_ARM;
              frame_err <= 1'b1;
            end
          end else if (cnt > t_half) begin
            st        <= R_ARM;
            frame_err <= 1'b1;
          end
        end
        R_EXEC: begin
          if (cmd_done) begin
            if (cmd_ok) begin
              tx_start <= 1'b1;
              if (cmd == C_READ) begin
                tx_nbits   <= dw + 4'd1;
                tx_payload <= {(rdata & width_mask(dw)), odd_par(rdata & width_mask(dw))};
              end else begin
                tx_nbits   <= '0;
                tx_payload <= '0;
              end
              st <= R_TX;
            end else begin
              st <= R_ARM;
            end
          end
        end
        R_TX: if (tx_done) st <= R_ARM;
        default: st <= R_ARM;
      endcase
    end
  end

  biphase_tx #(.CW(CW)) u_tx (
    .clk, .rst_n, .start(tx_start), .bt(bit_time), .nbits(tx_nbits),
    .payload(tx_payload), .line(sout), .busy(tx_busy), .done(tx_done));

  // A reply never starts while the previous one is still on the line
  a_tx_free: assert property (@(posedge clk) disable iff (!rst_n) tx_start |-> !tx_busy);
endmodule
