// Behavioural model of the 8-bit successive-approximation A/D converter
// with its analog input selector. The real part is a library cell; this
// model stands in for it in simulation and is not meant for synthesis.
//
// The analog inputs are given as voltages in millivolts. start samples the
// selected input (Hall voltage, or the temperature sensor when sel_temp is
// 1), then one bit is decided per clock, most significant first, by
// comparing the held voltage against the trial code times VREF_MV/256.
// After eight decisions done pulses for one clock with code valid; code
// holds until the next conversion. A conversion takes 9 clocks from the
// start pulse to done, inside the 10-clock sampling period. Full scale is
// VREF_MV = 5000 (5 V); inputs above full scale give 255.
module sar_adc_model #(
  parameter int VREF_MV = 5000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        sel_temp,
  input  logic [12:0] hall_mv,
  input  logic [12:0] temp_mv,
  output logic        done,
  output logic [7:0]  code
);
  logic [12:0] held;       // sample-and-hold
  logic [7:0]  sar;
  logic [3:0]  bitn;       // bit being decided, 8 = idle
  logic [7:0]  trial;
  logic        keep;

  always_comb begin
    trial = sar | (8'd1 << bitn[2:0]);
    keep  = ({held, 8'b0} >= 21'(trial) * 21'(VREF_MV));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= '0;
      sar  <= '0;
      bitn <= 4'd8;
      done <= 1'b0;
      code <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        held <= sel_temp ? temp_mv : hall_mv;
        sar  <= '0;
        bitn <= 4'd7;
      end else if (bitn != 4'd8) begin
        if (keep) sar <= trial;
        if (bitn == 4'd0) begin
          bitn <= 4'd8;
          done <= 1'b1;
          code <= keep ? trial : sar;
        end else begin
          bitn <= bitn - 1'b1;
        end
      end
    end
  end
endmodule
