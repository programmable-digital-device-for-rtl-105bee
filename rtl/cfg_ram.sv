// Configuration RAM.
//
// Eight 9-bit words, one per register address of the serial protocol:
// 000 Special, 001 Tq, 010 Sqtq, 011 Sens, 100 Voq, 101 Hi, 110 Lo, and
// 111 holding T0 (the other read-only values at 111, Adc and Dac, are live
// DSP outputs and are not stored). The RAM is the working copy of the
// configuration: the DSP reads it continuously through the cfg port, the
// user may change it and try the result before it is made permanent in
// the EEPROM. A write stores only as many bits as the addressed register
// has (upper bits cleared). Writes take effect at the clock edge; the read
// port is combinational. Reset clears all words; the memory control logic
// then loads them from the EEPROM.
module cfg_ram
  import hall_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [2:0] waddr,
  input  logic [8:0] wdata,
  input  logic [2:0] raddr,
  output logic [8:0] rdata,
  output cfg_t       cfg
);
  logic [8:0] mem [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata & width_mask(reg_width(waddr, SEL_T0));
    end
  end

  assign rdata = mem[raddr];

  always_comb begin
    cfg.special = mem[A_SPECIAL];
    cfg.tq      = mem[A_TQ][7:0];
    cfg.sqtq    = mem[A_SQTQ][6:0];
    cfg.sens    = mem[A_SENS][6:0];
    cfg.voq     = mem[A_VOQ];
    cfg.hi      = mem[A_HI][7:0];
    cfg.lo      = mem[A_LO][6:0];
    cfg.t0      = mem[A_RO][7:0];
  end
endmodule
