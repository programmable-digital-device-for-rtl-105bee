// Self-checking test of the complete signal processor hall_dsp, fed by the
// A/D converter model. The bench records every conversion result and
// recomputes the whole channel on its own: mid-scale removal, filling of
// temperature slots with the rounded mean of their neighbours, the
// temperature factor F from the latest temperature sample, Multiply 1 with
// rounding and saturation, Multiply 2 with the sensitivity, the Voq offset
// and the clamp. Every output code is compared, outputs must come exactly
// every 10 clocks, and the Adc value must match. Three configurations are
// run: unity gain, a negative slope with both clamps active, and active
// temperature compensation with a drifting temperature.
module tb_hall_dsp;
  import hall_pkg::*;
  localparam int TE = 8;
  logic clk = 0, rst_n = 0;
  logic adc_start, adc_sel_temp, adc_done;
  logic [7:0] adc_code;
  logic [12:0] hall_mv = 2500, temp_mv = 2500;
  cfg_t cfg;
  logic dac_valid, dac_clamped, lin_busy;
  logic [7:0] dac_code, temp_now;
  logic [8:0] adc_lin, lin_factor;
  logic meas_req = 0, meas_done;
  int checks = 0, failures = 0;
  int n_clamp_hi = 0, n_clamp_lo = 0, n_fill = 0, n_fchange = 0;

  hall_dsp #(.TEMP_EVERY(TE)) dut (.*);
  sar_adc_model u_adc (.clk, .rst_n, .start(adc_start), .sel_temp(adc_sel_temp),
                       .hall_mv, .temp_mv, .done(adc_done), .code(adc_code));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ------------------------------------------------
  function automatic int sm_val(input int code);   // code - 128
    return code - 128;
  endfunction
  function automatic int f_of(input int t, input int z, input int a, input int b);
    longint d, acc, r;
    d = t - z;
    acc = (longint'(1) << 20) - longint'(a) * d * 64 + longint'(b) * d * d;
    r = acc + 4096;
    r = (r >= 0) ? (r >> 13) : -((-r + 8191) >> 13);
    if (r < 0) r = 0;
    if (r > 511) r = 511;
    return int'(r);
  endfunction
  function automatic int rnd_div(input int x, input int sh);  // round half away from zero
    int mg;
    mg = ((x < 0 ? -x : x) + (1 << (sh - 1))) >> sh;
    return x < 0 ? -mg : mg;
  endfunction

  int codes[$]; bit tflag[$];
  int exp_dac[$], exp_adc[$];
  int cur_f;
  int tq_v, sq_v, t0_v, sens_v, voq_v, lo_v, hi_v;

  // log converter results (tag: was the conversion a temperature one)
  bit sel_q;
  always @(posedge clk) begin
    if (adc_start) sel_q <= adc_sel_temp;
    if (rst_n && adc_done) begin
      codes.push_back(int'(adc_code));
      tflag.push_back(sel_q);
    end
  end

  // after each new slot, the slot before it becomes computable
  task automatic compute(input int j);
    int h, s, p1, m1, p2, y;
    if (tflag[j]) begin
      cur_f = f_of(codes[j] - 128, t0_v, tq_v, sq_v);
      n_fill++;
      s = sm_val(codes[j - 1]) + sm_val(codes[j + 1]);
      h = rnd_div(s, 1);
      // previous Hall value of a temp slot is the one just before it
    end else begin
      h = sm_val(codes[j]);
    end
    m1 = ((h < 0 ? -h : h) * cur_f + 64) >> 7;
    if (m1 > 255) m1 = 255;
    exp_adc.push_back(h < 0 ? -m1 : m1);
    p2 = (m1 * (sens_v < 0 ? -sens_v : sens_v) + 8) >> 4;
    if ((h < 0) != (sens_v < 0)) p2 = -p2;
    y = p2 + voq_v;
    if (y < lo_v) y = lo_v;
    if (y > hi_v) y = hi_v;
    exp_dac.push_back(y);
  endtask

  task automatic run_phase(input int n_out, input int sens, input int voq, input int lo, input int hi,
                           input int tq, input int sq, input int t0, input bit drift);
    int got, t, last_t, done_j, nslots, adc_sm, e;
    sens_v = sens; voq_v = voq; lo_v = lo; hi_v = hi; tq_v = tq; sq_v = sq; t0_v = t0;
    cfg = '0;
    cfg.sens = {sens < 0, 6'(sens < 0 ? -sens : sens)};
    cfg.voq = 9'(voq); cfg.lo = 7'(lo); cfg.hi = 8'(hi);
    cfg.tq = {tq < 0, 7'(tq < 0 ? -tq : tq)}; cfg.sqtq = 7'(sq); cfg.t0 = 8'(t0);
    codes.delete(); tflag.delete(); exp_dac.delete(); exp_adc.delete();
    cur_f = 128;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    got = 0; t = 0; last_t = -1; done_j = 0;
    while (got < n_out) begin
      @(negedge clk); t++;
      hall_mv = 13'(2500 + 2600.0 * $sin(t * 0.0013));
      if (drift) temp_mv = 13'(2500 + 900.0 * $sin(t * 0.0004));
      // compute every slot whose successor is known
      while (done_j + 1 < codes.size()) begin compute(done_j); done_j++; end
      if (dac_valid) begin
        if (last_t >= 0) begin
          checks++;
          if (t - last_t != 10) begin failures++; $display("output spacing %0d", t - last_t); end
        end
        last_t = t;
        checks++;
        if (exp_dac.size() == 0) begin
          failures++; $display("output before its input");
        end else begin
          e = exp_dac.pop_front();
          if (int'(dac_code) != e) begin failures++; $display("out %0d: dac %0d expected %0d", got, dac_code, e); end
          if (dac_clamped && int'(dac_code) == hi && hi != 255) n_clamp_hi++;
          if (dac_clamped && int'(dac_code) == lo) n_clamp_lo++;
        end
        got++;
      end
      if (dut.u_mult1.out_valid && exp_adc.size() > 0) begin
        // Adc register updates one clock after Multiply 1; check at next clock
        e = exp_adc.pop_front();
        @(negedge clk); t++;
        adc_sm = adc_lin[8] ? -int'(adc_lin[7:0]) : int'(adc_lin[7:0]);
        checks++;
        if (adc_sm != e) begin failures++; $display("Adc %0d expected %0d", adc_sm, e); end
        if (dac_valid) begin failures++; $display("unchecked output"); end
      end
      if (lin_factor != 9'd128 && dut.u_lin.stage[2]) n_fchange++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run_phase(300, 16, 0, 0, 255, 0, 0, 0, 0);           // unity gain around mid scale
    run_phase(300, -19, 128, 60, 215, 0, 0, 0, 0);       // slope -1.19, both clamps
    run_phase(600, 24, 100, 0, 255, -40, 60, 0, 1);      // temperature compensation
    if (n_clamp_hi == 0 || n_clamp_lo == 0 || n_fill == 0 || n_fchange == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("clamp-high %0d clamp-low %0d filled slots %0d factor updates %0d",
             n_clamp_hi, n_clamp_lo, n_fill, n_fchange);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
