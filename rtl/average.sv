// Gap filler for the time-shared A/D converter.
//
// The converter is used now and then for the temperature sensor, so one
// slot of the Hall sample stream carries no Hall value. This block keeps the
// channel continuous: every input slot yields one output slot, delayed by
// one sample. A normal slot is passed on unchanged; a slot tagged in_is_temp
// is replaced by the average of the Hall values before and after it, which
// is why the one-sample delay is needed. The average is rounded to nearest,
// halves away from zero. Values are 9-bit signed magnitude.
// Timing: an output is issued one clock after each in_valid, carrying the
// previous slot. Two temperature slots in a row are not expected (the
// controller separates them by at least one Hall slot).
// Replacing the temperature slot by the neighbours' average is the device's
// scheme; the rounding rule is this design's choice.
module average (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_is_temp,
  input  logic [8:0] in_sm,
  output logic       out_valid,
  output logic [8:0] out_sm
);
  logic       have_prev;   // a previous slot is waiting to be emitted
  logic       prev_temp;   // it was a temperature slot
  logic [8:0] prev_sm;     // its value (Hall slots only)
  logic [8:0] last_hall;   // last Hall value before the waiting slot

  function automatic logic signed [9:0] sm2tc(input logic [8:0] v);
    sm2tc = v[8] ? -$signed({2'b00, v[7:0]}) : $signed({2'b00, v[7:0]});
  endfunction

  logic signed [10:0] sum;
  logic        [9:0]  sum_mag;
  logic        [8:0]  avg_mag;
  logic        [8:0]  avg_sm;

  always_comb begin
    sum     = 11'(sm2tc(last_hall)) + 11'(sm2tc(in_sm));
    sum_mag = sum[10] ? 10'(-sum) : 10'(sum);
    avg_mag = 9'((sum_mag + 10'd1) >> 1);
    avg_sm  = {sum[10] && (avg_mag != 0), avg_mag[7:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev <= 1'b0;
      prev_temp <= 1'b0;
      prev_sm   <= '0;
      last_hall <= '0;
      out_valid <= 1'b0;
      out_sm    <= '0;
    end else begin
      out_valid <= in_valid && have_prev;
      if (in_valid) begin
        if (have_prev)
          out_sm <= prev_temp ? avg_sm : prev_sm;
        have_prev <= 1'b1;
        prev_temp <= in_is_temp;
        if (!in_is_temp) prev_sm <= in_sm;
        // last_hall tracks the Hall value that precedes the waiting slot
        if (have_prev && !prev_temp) last_hall <= prev_sm;
      end
    end
  end
endmodule
