// Behavioural model of the on-chip EEPROM that keeps the configuration
// through power-down. The real part is a process-specific macro; this model
// gives its behaviour for simulation and is not meant for synthesis.
//
// Eight 9-bit words with the same addresses as the configuration RAM. An
// erased or never-programmed cell reads '1' (the model starts erased).
// A request (req, one clock) on a word either erases the cells selected by
// mask (they become '1') or programs them: a selected cell whose wdata bit
// is '0' is cleared; programming never sets a cell. busy is high for
// BUSY_CYCLES clocks after a request, during which further requests are
// ignored; the change becomes visible when busy falls. Reading (raddr ->
// rdata) is combinational and possible at any time. Reset does not touch
// the cells, only an operation in progress is abandoned.
module eeprom_model #(
  parameter int BUSY_CYCLES = 200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req,
  input  logic       erase,     // 1: erase, 0: program
  input  logic [2:0] addr,
  input  logic [8:0] mask,
  input  logic [8:0] wdata,
  input  logic [2:0] raddr,
  output logic [8:0] rdata,
  output logic       busy
);
  localparam int BW = $clog2(BUSY_CYCLES + 1);

  logic [8:0]    cells [8];
  logic [BW-1:0] timer;
  logic          op_erase;
  logic [2:0]    op_addr;
  logic [8:0]    op_mask, op_data;

  initial for (int i = 0; i < 8; i++) cells[i] = '1;

  assign busy  = (timer != '0);
  assign rdata = cells[raddr];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0;
    end else if (busy) begin
      timer <= timer - 1'b1;
      if (timer == BW'(1)) begin
        if (op_erase) cells[op_addr] <= cells[op_addr] | op_mask;
        else          cells[op_addr] <= cells[op_addr] & ~(op_mask & ~op_data);
      end
    end else if (req) begin
      timer    <= BW'(BUSY_CYCLES);
      op_erase <= erase;
      op_addr  <= addr;
      op_mask  <= mask;
      op_data  <= wdata;
    end
  end
endmodule
