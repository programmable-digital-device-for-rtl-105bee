// Signal processor of the Hall sensor: main conditioning channel plus the
// temperature linearization block working beside it.
//
// Main channel, one specialised unit per operation, all working all the
// time (no shared ALU):
//   A/D code -> sub_convert (minus mid-scale, to signed magnitude)
//            -> average     (fills the slot of a temperature conversion)
//            -> mult_lin    (x temperature factor F, 2 stages)  = Adc value
//            -> mult_sens   (x sensitivity Sens, 3 stages)
//            -> offset_adder(+ quiescent value Voq)
//            -> limiter     (clamp to [Lo, Hi])                  = Dac code
// dsp_ctrl schedules one conversion every SAMPLE_CYCLES clocks, so a new
// output leaves every ten clocks: every converter result gives one output.
// Temperature conversions go to the linearize block, which updates F in
// the background; the two halves only meet through the factor register.
// Latency from the converter's done pulse to dac_valid: one sample period
// (the averaging delay) plus 8 clocks. The configuration comes from the
// RAM as a cfg_t struct and is read live.
module hall_dsp
  import hall_pkg::*;
#(
  parameter int SAMPLE_CYCLES = 10,
  parameter int TEMP_EVERY    = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       adc_start,
  output logic       adc_sel_temp,
  input  logic       adc_done,
  input  logic [7:0] adc_code,
  input  cfg_t       cfg,
  output logic       dac_valid,
  output logic [7:0] dac_code,
  output logic       dac_clamped,
  output logic [8:0] adc_lin,     // Adc register: linearized Hall value
  output logic [7:0] temp_now,    // last temperature sample
  output logic [8:0] lin_factor,  // temperature factor F, Q2.7
  output logic       lin_busy,    // linearizer is updating F
  input  logic       meas_req,    // Test: take a temperature sample now
  output logic       meas_done    // ... taken, temp_now holds it
);
  logic       h_valid, h_is_temp;
  logic [7:0] h_code;
  logic       t_valid;
  logic [7:0] t_val;
  logic       sc_valid, sc_is_temp;
  logic [8:0] sc_sm;
  logic       av_valid;
  logic [8:0] av_sm;
  logic       m1_valid;
  logic [8:0] m1_sm;
  logic       m2_valid;
  logic signed [10:0] m2_val;
  logic       ad_valid;
  logic signed [11:0] ad_val;

  dsp_ctrl #(.SAMPLE_CYCLES(SAMPLE_CYCLES), .TEMP_EVERY(TEMP_EVERY)) u_ctrl (
    .clk, .rst_n, .adc_start, .adc_sel_temp, .adc_done, .adc_code,
    .hall_valid(h_valid), .hall_is_temp(h_is_temp), .hall_code(h_code),
    .temp_valid(t_valid), .temp_val(t_val), .temp_now, .meas_req, .meas_done);

  sub_convert u_subconv (
    .clk, .rst_n, .in_valid(h_valid), .in_is_temp(h_is_temp), .in_code(h_code),
    .out_valid(sc_valid), .out_is_temp(sc_is_temp), .out_sm(sc_sm));

  average u_avg (
    .clk, .rst_n, .in_valid(sc_valid), .in_is_temp(sc_is_temp), .in_sm(sc_sm),
    .out_valid(av_valid), .out_sm(av_sm));

  linearize u_lin (
    .clk, .rst_n, .temp_valid(t_valid), .temp_val(t_val),
    .t0(cfg.t0), .tq(cfg.tq), .sqtq(cfg.sqtq), .factor(lin_factor), .busy(lin_busy));

  mult_lin u_mult1 (
    .clk, .rst_n, .in_valid(av_valid), .in_sm(av_sm), .factor(lin_factor),
    .out_valid(m1_valid), .out_sm(m1_sm));

  mult_sens u_mult2 (
    .clk, .rst_n, .in_valid(m1_valid), .in_sm(m1_sm), .sens(cfg.sens),
    .out_valid(m2_valid), .out_val(m2_val));

  offset_adder u_add (
    .clk, .rst_n, .in_valid(m2_valid), .in_val(m2_val), .voq(cfg.voq),
    .out_valid(ad_valid), .out_val(ad_val));

  limiter u_lim (
    .clk, .rst_n, .in_valid(ad_valid), .in_val(ad_val), .lo(cfg.lo), .hi(cfg.hi),
    .dac_valid, .dac(dac_code), .clamped(dac_clamped));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        adc_lin <= '0;
    else if (m1_valid) adc_lin <= m1_sm;
  end
endmodule
