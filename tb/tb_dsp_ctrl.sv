// Self-checking test of dsp_ctrl with a small converter stand-in that
// answers each start after 9 clocks (like the converter model) with a running code. Checks: a start
// every 10 clocks, exactly every TEMP_EVERY-th conversion selects the
// temperature input, each result becomes one tagged slot, and temperature
// results reach the linearizer as code - 128. A second phase sends
// measurement requests at random times: each must be answered by meas_done
// on a temperature slot within three sample periods, with temp_now holding
// that slot's result, two temperature slots must never be adjacent, and
// the scheduled temperature slots must keep coming.
module tb_dsp_ctrl;
  localparam int TE = 5;
  logic clk = 0, rst_n = 0;
  logic adc_start, adc_sel_temp, adc_done;
  logic [7:0] adc_code;
  logic hall_valid, hall_is_temp, temp_valid;
  logic [7:0] hall_code, temp_val, temp_now;
  logic meas_req = 0, meas_done;
  int checks = 0, failures = 0;

  dsp_ctrl #(.SAMPLE_CYCLES(10), .TEMP_EVERY(TE)) dut (.*);
  always #5 clk = ~clk;

  // converter stand-in
  int cnt = -1;
  logic [7:0] next_code = 8'd17;
  logic sel_q;
  always_ff @(posedge clk) begin
    adc_done <= 1'b0;
    if (adc_start) begin cnt <= 7; sel_q <= adc_sel_temp; end
    else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) begin
      adc_done <= 1'b1; adc_code <= next_code; next_code <= next_code + 8'd37; cnt <= -1;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_start, nconv, nslots, ntemp, t;
    logic [7:0] exp_code;
    bit exp_temp;
    adc_done = 0; adc_code = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    last_start = -1; nconv = 0; nslots = 0; ntemp = 0; t = 0;
    exp_code = 8'd17;
    while (nslots < 200) begin
      @(negedge clk); t++;
      if (adc_start) begin
        if (last_start >= 0) begin
          checks++;
          if (t - last_start != 10) begin failures++; $display("start spacing %0d", t - last_start); end
        end
        last_start = t;
        checks++;
        if (adc_sel_temp != (nconv % TE == TE - 1)) begin failures++; $display("conversion %0d sel %b", nconv, adc_sel_temp); end
        nconv++;
      end
      if (hall_valid) begin
        exp_temp = ((nslots % TE) == TE - 1);
        checks++;
        if (hall_code !== exp_code || hall_is_temp !== exp_temp) begin
          failures++; $display("slot %0d: code %0d tag %b", nslots, hall_code, hall_is_temp);
        end
        checks++;
        if (temp_valid !== exp_temp || (exp_temp && (temp_val !== (exp_code ^ 8'h80) || temp_now !== temp_val))) begin
          failures++; $display("slot %0d: temp_valid %b val %h", nslots, temp_valid, temp_val);
        end
        if (exp_temp) ntemp++;
        exp_code = exp_code + 8'd37;
        nslots++;
      end else begin
        checks++;
        if (temp_valid) begin failures++; $display("temp_valid without slot"); end
      end
    end
    if (ntemp == 0) failures++;
    $display("temperature slots %0d", ntemp);
    // phase 2: measurement requests
    begin
      int req_t, nreq, nans, prev_temp, since_sched;
      bit waiting;
      req_t = 0; nreq = 0; nans = 0; prev_temp = 0; waiting = 0; since_sched = 0;
      for (int c = 0; c < 20000; c++) begin
        @(negedge clk); t++;
        meas_req = 0;
        if (!waiting && $urandom_range(0, 150) == 0) begin
          meas_req = 1; waiting = 1; req_t = t; nreq++;
        end
        if (hall_valid) begin
          checks++;
          if (hall_is_temp && prev_temp) begin failures++; $display("adjacent temperature slots"); end
          prev_temp = hall_is_temp;
          since_sched = hall_is_temp ? 0 : since_sched + 1;
          checks++;
          if (since_sched > TE) begin failures++; $display("scheduled temperature slot missing"); end
        end
        if (meas_done) begin
          checks++;
          if (!waiting || !hall_valid || !hall_is_temp || temp_now !== (hall_code ^ 8'h80) || t - req_t > 32) begin
            failures++; $display("meas_done: waiting %b slot %b temp %b after %0d clocks", waiting, hall_valid, hall_is_temp, t - req_t);
          end
          waiting = 0; nans++;
        end
      end
      checks++;
      if (nreq < 10 || nans < nreq - 1) begin failures++; $display("requests %0d answered %0d", nreq, nans); end
      $display("measurement requests %0d answered %0d", nreq, nans);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
