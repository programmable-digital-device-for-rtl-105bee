// Memory control logic: executes the commands of the serial interface on
// the configuration RAM and the EEPROM, and enforces the lock function.
//
// After reset the eight EEPROM words are copied into the RAM (8 clocks), so
// the sensor starts with its stored configuration. Then each command
// (cmd_valid with cmd, addr, wdata) is answered by one cmd_done pulse with
// cmd_ok (acknowledge) and, for Read, rdata:
//   Read    RAM word; address 111 returns T0, Adc or Dac as chosen by
//           Special[6:5] (00 T0, 01 Adc, 10 Dac, 11 T0).
//   Write   RAM word, cut to the register's size; 111 is read-only.
//   Test    asks the DSP for a temperature conversion (meas_req) and
//           writes the result into T0 in RAM when meas_done comes.
//   Program every EEPROM word from the RAM (cells can only be cleared).
//   Erase   every EEPROM word back to all '1'.
//   Lock    programs the Lock cell: every later command is refused, the
//           serial interface stops and the output stays in analog mode.
//   Lock1   programs the Lock1 cell: T0 and the ADC-range bits of Special
//           can no longer be written, programmed or erased; Test refused.
// Program and Erase take 8 EEPROM operations, Lock and Lock1 one, each
// BUSY_CYCLES long in the EEPROM model; the other commands answer with
// cmd_done 4 clocks after cmd_valid.
// The lock cells (Special[8] Lock, Special[7] Lock1, active low since an
// erased cell reads '1') are never touched by Write, Program or Erase.
// Commands, register sizes and the lock rules are the device's; the
// Special bit layout, boot copy and masks are this design's choices.
module mem_ctrl
  import hall_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // command port from the serial interface
  input  logic       cmd_valid,
  input  logic [2:0] cmd,
  input  logic [2:0] addr,
  input  logic [8:0] wdata,
  output logic       cmd_done,
  output logic       cmd_ok,
  output logic [8:0] rdata,
  output logic       locked,
  output logic       lock1,
  output logic       booting,
  // live DSP values
  input  logic [7:0] temp_now,
  output logic       meas_req,
  input  logic       meas_done,
  input  logic [8:0] adc_lin,
  input  logic [7:0] dac_code,
  // RAM
  output logic       ram_we,
  output logic [2:0] ram_waddr,
  output logic [8:0] ram_wdata,
  output logic [2:0] ram_raddr,
  input  logic [8:0] ram_rdata,
  input  logic [8:0] ram_special,
  // EEPROM
  output logic       ee_req,
  output logic       ee_erase,
  output logic [2:0] ee_addr,
  output logic [8:0] ee_mask,
  output logic [8:0] ee_wdata,
  output logic [2:0] ee_raddr,
  input  logic [8:0] ee_rdata,
  input  logic       ee_busy
);
  typedef enum logic [2:0] {S_BOOT, S_IDLE, S_EXEC, S_EE_REQ, S_EE_GAP, S_EE_WAIT, S_MEAS, S_DONE} state_e;

  state_e     state;
  logic [2:0] idx;
  logic       pend;
  cmd_e       c_cmd;
  logic [2:0] c_addr;
  logic [8:0] c_wdata;
  logic       lock_n, lock1_n;     // copies of the EEPROM lock cells
  logic       ok_r;
  logic [8:0] rdata_r;
  logic       single;              // EEPROM operation on one word only
  logic [8:0] single_mask;

  assign locked  = ~lock_n;
  assign lock1   = ~lock1_n;
  assign booting = (state == S_BOOT);
  assign rdata   = rdata_r;

  // Cells of a word that Program and Erase may change
  function automatic logic [8:0] pe_mask(input logic [2:0] a, input logic l1);
    if (a == A_SPECIAL) pe_mask = l1 ? (9'h07F & ~SP_RANGE_MASK) : 9'h07F;
    else if (a == A_RO) pe_mask = l1 ? 9'h000 : 9'h0FF;
    else                pe_mask = width_mask(reg_width(a, SEL_T0));
  endfunction

  logic [8:0] ro_value;
  always_comb begin
    case (ram_special[SP_SEL_HI:SP_SEL_LO])
      SEL_ADC: ro_value = adc_lin;
      SEL_DAC: ro_value = {1'b0, dac_code};
      default: ro_value = ram_rdata;      // T0 is stored at 111
    endcase
  end

  always_comb begin
    ram_raddr = (state == S_EXEC) ? c_addr : idx;
    ee_raddr  = idx;
    ee_addr   = idx;
    ee_erase  = (c_cmd == C_ERASE);
    ee_req    = (state == S_EE_REQ);
    ee_mask   = single ? single_mask : pe_mask(idx, lock1);
    ee_wdata  = single ? 9'h000 : ram_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_BOOT;
      idx         <= '0;
      pend        <= 1'b0;
      c_cmd       <= C_RESERVED;
      c_addr      <= '0;
      c_wdata     <= '0;
      lock_n      <= 1'b1;
      lock1_n     <= 1'b1;
      ok_r        <= 1'b0;
      rdata_r     <= '0;
      single      <= 1'b0;
      single_mask <= '0;
      cmd_done    <= 1'b0;
      cmd_ok      <= 1'b0;
      meas_req    <= 1'b0;
      ram_we      <= 1'b0;
      ram_waddr   <= '0;
      ram_wdata   <= '0;
    end else begin
      cmd_done <= 1'b0;
      ram_we   <= 1'b0;
      meas_req <= 1'b0;
      if (cmd_valid && !pend && state inside {S_BOOT, S_IDLE}) begin
        pend    <= 1'b1;
        c_cmd   <= cmd_e'(cmd);
        c_addr  <= addr;
        c_wdata <= wdata;
      end
      unique case (state)
        S_BOOT: begin
          ram_we    <= 1'b1;
          ram_waddr <= idx;
          ram_wdata <= ee_rdata;
          if (idx == A_SPECIAL) begin
            lock_n  <= ee_rdata[SP_LOCK];
            lock1_n <= ee_rdata[SP_LOCK1];
          end
          idx <= idx + 1'b1;
          if (idx == 3'd7) state <= S_IDLE;
        end
        S_IDLE: if (pend) state <= S_EXEC;
        S_EXEC: begin
          pend    <= 1'b0;
          ok_r    <= 1'b0;
          rdata_r <= '0;
          idx     <= '0;
          single  <= 1'b0;
          state   <= S_DONE;
          if (lock_n) begin
            unique case (c_cmd)
              C_READ: begin
                ok_r <= 1'b1;
                if (c_addr == A_RO)
                  rdata_r <= ro_value & width_mask(reg_width(A_RO, ram_special[SP_SEL_HI:SP_SEL_LO]));
                else if (c_addr == A_SPECIAL)
                  rdata_r <= {lock_n, lock1_n, ram_rdata[6:0]};
                else
                  rdata_r <= ram_rdata;
              end
              C_WRITE: begin
                if (c_addr != A_RO) begin
                  ok_r      <= 1'b1;
                  ram_we    <= 1'b1;
                  ram_waddr <= c_addr;
                  if (c_addr == A_SPECIAL)
                    ram_wdata <= {lock_n, lock1_n,
                                  lock1_n ? c_wdata[6:0]
                                          : ((c_wdata[6:0] & ~SP_RANGE_MASK[6:0]) |
                                             (ram_rdata[6:0] & SP_RANGE_MASK[6:0]))};
                  else
                    ram_wdata <= c_wdata;
                end
              end
              C_TEST: begin
                if (lock1_n) begin
                  ok_r     <= 1'b1;
                  meas_req <= 1'b1;
                  state    <= S_MEAS;
                end
              end
              C_PROGRAM, C_ERASE: begin
                ok_r  <= 1'b1;
                state <= S_EE_REQ;
              end
              C_LOCK, C_LOCK1: begin
                ok_r        <= 1'b1;
                single      <= 1'b1;
                idx         <= A_SPECIAL;
                single_mask <= (c_cmd == C_LOCK) ? 9'h100 : 9'h080;
                state       <= S_EE_REQ;
              end
              default: ok_r <= 1'b0;
            endcase
          end
        end
        S_MEAS: begin
          if (meas_done) begin
            ram_we    <= 1'b1;
            ram_waddr <= A_RO;
            ram_wdata <= {1'b0, temp_now};
            state     <= S_DONE;
          end
        end
        S_EE_REQ:  state <= S_EE_GAP;
        S_EE_GAP:  state <= S_EE_WAIT;
        S_EE_WAIT: begin
          if (!ee_busy) begin
            if (single || idx == 3'd7) begin
              state <= S_DONE;
              if (single) begin
                if (c_cmd == C_LOCK) lock_n  <= 1'b0;
                else                 lock1_n <= 1'b0;
              end
            end else begin
              idx   <= idx + 1'b1;
              state <= S_EE_REQ;
            end
          end
        end
        S_DONE: begin
          cmd_done <= 1'b1;
          cmd_ok   <= ok_r;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
