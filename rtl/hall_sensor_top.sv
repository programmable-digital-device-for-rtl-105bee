// Programmable digital conditioning device for an integrated Hall sensor.
//
// The chip digitises the Hall voltage, removes its temperature drift,
// scales and offsets it, clamps it and converts it back to an analog
// output, all under user registers that can be tried out in RAM and then
// stored in an on-chip EEPROM through a one-pin serial interface:
//
//   hall_mv/temp_mv -> sar_adc_model -> hall_dsp -> dac_model -> vout_mv
//                                          ^ cfg
//   sin -> serial_if <-> mem_ctrl <-> cfg_ram, eeprom_model  -> sout
//
// The A/D converter is shared: hall_dsp's controller starts a conversion
// every SAMPLE_CYCLES clocks and takes every TEMP_EVERY-th one for the
// temperature sensor. dac_code changes once per conversion. The analog
// parts (clock generator, temperature sensor, low-voltage detector, supply
// comparator of the serial input, pin logic) are outside: their signals
// are the ports clk, temp_mv, rst_n, sin and analog_mode. The converter and
// EEPROM are behavioural models of library/process parts. Voltages are in
// millivolts, full scale 5000.
// analog_mode is the switch control to the pin logic: it goes high for
// good once the Lock command has been executed. adc_range carries the ADC
// input-range bits of the Special register to the analog front end.
module hall_sensor_top
  import hall_pkg::*;
#(
  parameter int SAMPLE_CYCLES  = 10,
  parameter int TEMP_EVERY     = 64,
  parameter int EE_BUSY_CYCLES = 200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [12:0] hall_mv,
  input  logic [12:0] temp_mv,
  input  logic        sin,
  output logic        sout,
  output logic [7:0]  dac_code,
  output logic [12:0] vout_mv,
  output logic        analog_mode,
  output logic [4:0]  adc_range
);
  // converter
  logic       adc_start, adc_sel_temp, adc_done;
  logic [7:0] adc_code;
  // DSP
  cfg_t       cfg;
  logic       dac_valid, dac_clamped, lin_busy;
  logic [8:0] adc_lin, lin_factor;
  logic [7:0] temp_now;
  logic       meas_req, meas_done;
  // serial interface <-> memory control
  logic       cmd_valid, cmd_done, cmd_ok;
  logic [2:0] cmd, addr;
  logic [8:0] wdata, rdata;
  logic       frame_ok, frame_err;
  logic [15:0] bit_time;
  logic       locked, lock1, booting;
  // RAM
  logic       ram_we;
  logic [2:0] ram_waddr, ram_raddr;
  logic [8:0] ram_wdata, ram_rdata;
  // EEPROM
  logic       ee_req, ee_erase, ee_busy;
  logic [2:0] ee_addr, ee_raddr;
  logic [8:0] ee_mask, ee_wdata, ee_rdata;

  sar_adc_model u_adc (
    .clk, .rst_n, .start(adc_start), .sel_temp(adc_sel_temp),
    .hall_mv, .temp_mv, .done(adc_done), .code(adc_code));

  hall_dsp #(.SAMPLE_CYCLES(SAMPLE_CYCLES), .TEMP_EVERY(TEMP_EVERY)) u_dsp (
    .clk, .rst_n, .adc_start, .adc_sel_temp, .adc_done, .adc_code, .cfg,
    .dac_valid, .dac_code, .dac_clamped, .adc_lin, .temp_now, .lin_factor, .lin_busy,
    .meas_req, .meas_done);

  dac_model u_dac (.code(dac_code), .vout_mv);

  serial_if u_sif (
    .clk, .rst_n, .sin, .sout, .locked, .rd_sel(cfg.special[SP_SEL_HI:SP_SEL_LO]),
    .cmd_valid, .cmd, .addr, .wdata, .cmd_done, .cmd_ok, .rdata,
    .frame_ok, .frame_err, .bit_time);

  mem_ctrl u_mctl (
    .clk, .rst_n, .cmd_valid, .cmd, .addr, .wdata, .cmd_done, .cmd_ok, .rdata,
    .locked, .lock1, .booting, .temp_now, .meas_req, .meas_done, .adc_lin, .dac_code,
    .ram_we, .ram_waddr, .ram_wdata, .ram_raddr, .ram_rdata, .ram_special(cfg.special),
    .ee_req, .ee_erase, .ee_addr, .ee_mask, .ee_wdata, .ee_raddr, .ee_rdata, .ee_busy);

  cfg_ram u_ram (
    .clk, .rst_n, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata), .cfg);

  eeprom_model #(.BUSY_CYCLES(EE_BUSY_CYCLES)) u_ee (
    .clk, .rst_n, .req(ee_req), .erase(ee_erase), .addr(ee_addr), .mask(ee_mask),
    .wdata(ee_wdata), .raddr(ee_raddr), .rdata(ee_rdata), .busy(ee_busy));

  assign analog_mode = locked;
  assign adc_range   = cfg.special[4:0];
endmodule
