// Shared types and constants of the programmable Hall-sensor conditioning device.
//
// The register map, the command codes and the register sizes follow the
// device's configuration-register and command tables. The exact bit layout of
// the Special register (lock cells, read select, ADC input range) is this
// design's own choice; see the field constants below.
package hall_pkg;

  // Register addresses (3-bit field of the serial telegram)
  typedef enum logic [2:0] {
    A_SPECIAL = 3'b000,
    A_TQ      = 3'b001,
    A_SQTQ    = 3'b010,
    A_SENS    = 3'b011,
    A_VOQ     = 3'b100,
    A_HI      = 3'b101,
    A_LO      = 3'b110,
    A_RO      = 3'b111   // read-only: T0, Adc or Dac, chosen by Special[6:5]
  } reg_addr_e;

  // Command codes
  typedef enum logic [2:0] {
    C_RESERVED = 3'b000,
    C_READ     = 3'b001,
    C_WRITE    = 3'b010,
    C_PROGRAM  = 3'b011,
    C_ERASE    = 3'b100,
    C_TEST     = 3'b101,
    C_LOCK     = 3'b110,
    C_LOCK1    = 3'b111
  } cmd_e;

  // Special register fields (design choice)
  localparam int SP_LOCK   = 8;  // EEPROM lock cell, 0 = locked
  localparam int SP_LOCK1  = 7;  // EEPROM Lock1 cell, 0 = T0/range frozen
  localparam int SP_SEL_HI = 6;  // [6:5] selects what address 111 reads
  localparam int SP_SEL_LO = 5;
  localparam logic [8:0] SP_RANGE_MASK = 9'h01F; // [4:0] ADC input range

  // Read selection for address 111
  localparam logic [1:0] SEL_T0  = 2'b00;
  localparam logic [1:0] SEL_ADC = 2'b01;
  localparam logic [1:0] SEL_DAC = 2'b10;

  localparam int WORD_W = 9;   // RAM / EEPROM word width (largest register)

  // Configuration registers as the DSP sees them
  typedef struct packed {
    logic [8:0] special;  // binary
    logic [7:0] tq;       // signed magnitude, first-order temperature quotient
    logic [6:0] sqtq;     // binary, second-order temperature quotient
    logic [6:0] sens;     // signed magnitude, sensitivity in 1/16 steps
    logic [8:0] voq;      // two's complement, output quiescent value
    logic [7:0] hi;       // binary, upper clamp
    logic [6:0] lo;       // binary, lower clamp
    logic [7:0] t0;       // two's complement, temperature at 25 degC
  } cfg_t;

  // Size in bits of the register at an address (address 111 depends on the
  // read selection: Adc is 9 bits, T0 and Dac 8 bits).
  function automatic logic [3:0] reg_width(input logic [2:0] addr, input logic [1:0] sel);
    case (addr)
      A_SPECIAL: reg_width = 4'd9;
      A_TQ:      reg_width = 4'd8;
      A_SQTQ:    reg_width = 4'd7;
      A_SENS:    reg_width = 4'd7;
      A_VOQ:     reg_width = 4'd9;
      A_HI:      reg_width = 4'd8;
      A_LO:      reg_width = 4'd7;
      default:   reg_width = (sel == SEL_ADC) ? 4'd9 : 4'd8;
    endcase
  endfunction

  // Mask of the valid bits of a register
  function automatic logic [8:0] width_mask(input logic [3:0] w);
    width_mask = 9'((10'd1 << w) - 10'd1);
  endfunction

  // Odd parity bit for a group of bits: group plus parity has an odd count of ones
  function automatic logic odd_par(input logic [8:0] bits);
    odd_par = ~(^bits);
  endfunction

endpackage
