// DSP control logic: sampling schedule of the shared A/D converter.
//
// One A/D conversion is started every SAMPLE_CYCLES clocks, so the main
// channel takes a new sample, and produces a new output, every ten clocks
// at the default. Hall voltage and temperature share the converter by time
// separation: every TEMP_EVERY-th conversion is switched to the temperature
// sensor. Each finished conversion is passed to the main channel as one
// slot (hall_valid), tagged with hall_is_temp when the slot was taken by a
// temperature conversion, so the averaging block can fill the gap. A
// temperature result is also converted to two's complement (code - 128) and
// handed to the linearization block (temp_valid, temp_val) and kept in
// temp_now.
// meas_req (one clock, from the memory control logic executing Test) asks
// for an extra temperature conversion: the next conversion is switched to
// the temperature sensor and meas_done pulses with temp_now holding its
// result, at most three sample periods later. Two temperature conversions
// never follow each other: a request or a scheduled temperature slot that
// falls right after one is moved to the next conversion.
// The ten-clock rate and the time separation are the device's; the
// temperature ratio TEMP_EVERY and the request handshake are this design's.
module dsp_ctrl #(
  parameter int SAMPLE_CYCLES = 10,
  parameter int TEMP_EVERY    = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       adc_start,
  output logic       adc_sel_temp,
  input  logic       adc_done,
  input  logic [7:0] adc_code,
  output logic       hall_valid,
  output logic       hall_is_temp,
  output logic [7:0] hall_code,
  output logic       temp_valid,
  output logic [7:0] temp_val,
  output logic [7:0] temp_now,
  input  logic       meas_req,
  output logic       meas_done
);
  localparam int CW = $clog2(SAMPLE_CYCLES);
  localparam int SW = $clog2(TEMP_EVERY);

  logic [CW-1:0] cyc;
  logic [SW-1:0] slot;
  logic          conv_temp;   // the conversion in flight is a temperature one
  logic          conv_meas;   // ... and was asked for by meas_req
  logic          meas_pend;   // a measurement request is waiting
  logic          sched, do_temp;

  always_comb begin
    sched   = (slot == SW'(TEMP_EVERY - 1));
    do_temp = (sched || meas_pend) && !conv_temp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc          <= '0;
      slot         <= '0;
      conv_temp    <= 1'b0;
      conv_meas    <= 1'b0;
      meas_pend    <= 1'b0;
      meas_done    <= 1'b0;
      adc_start    <= 1'b0;
      adc_sel_temp <= 1'b0;
      hall_valid   <= 1'b0;
      hall_is_temp <= 1'b0;
      hall_code    <= '0;
      temp_valid   <= 1'b0;
      temp_val     <= '0;
      temp_now     <= '0;
    end else begin
      adc_start  <= 1'b0;
      hall_valid <= 1'b0;
      temp_valid <= 1'b0;
      meas_done  <= 1'b0;
      if (meas_req) meas_pend <= 1'b1;
      cyc <= (cyc == CW'(SAMPLE_CYCLES - 1)) ? '0 : cyc + 1'b1;
      if (cyc == '0) begin
        adc_start    <= 1'b1;
        adc_sel_temp <= do_temp;
        conv_temp    <= do_temp;
        conv_meas    <= do_temp && meas_pend;
        if (do_temp && meas_pend) meas_pend <= meas_req;
        // a scheduled slot that had to wait stays due
        if (!(sched && !do_temp))
          slot <= sched ? '0 : slot + 1'b1;
      end
      if (adc_done) begin
        hall_valid   <= 1'b1;
        hall_is_temp <= conv_temp;
        hall_code    <= adc_code;
        if (conv_temp) begin
          temp_valid <= 1'b1;
          temp_val   <= adc_code ^ 8'h80;
          temp_now   <= adc_code ^ 8'h80;
          meas_done  <= conv_meas;
        end
      end
    end
  end

  initial begin
    assert (SAMPLE_CYCLES >= 10) else $error("SAMPLE_CYCLES must cover a 9-clock conversion");
    assert (TEMP_EVERY >= 2) else $error("TEMP_EVERY must leave Hall slots between temperature slots");
  end
endmodule
