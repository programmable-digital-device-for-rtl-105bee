// Workload bench: the two example output characteristics of the device, a
// rising one (slope +1.07, quiescent output 2.5 V) and a falling one
// (slope -1.2, quiescent output 1.3 V), each with an upper and a lower
// clamp. Each is programmed over the serial line into the full device at
// default parameters and the converter input is swept across its range.
// Every output code is compared with the ideal characteristic as the
// registers quantise it: Sens = round(16*slope), Voq = round(V*256/5).
// The clamp levels are this bench's own. The sweep must reach both clamps
// and move in the direction of the slope.
module tb_fig_characteristics;
  import hall_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [12:0] hall_mv = 2500, temp_mv = 2500;
  logic sin, sout, analog_mode;
  logic [7:0] dac_code;
  logic [12:0] vout_mv;
  logic [4:0] adc_range;
  int checks = 0, failures = 0;

  hall_sensor_top dut (.*);
  serial_host host (.clk, .sin, .sout);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input int w, input int v);
    bit ack; logic [9:0] d; int obt;
    host.send(C_WRITE, 3'(a), 9'(v), w);
    host.receive(0, 8 * host.bt, ack, d, obt);
    checks++;
    if (!ack) begin failures++; $display("no ack"); end
  endtask

  task automatic run(input real slope, input real voq_v, input real hi_v, input real lo_v);
    int sens, voq, hi, lo, e, h, p, prev, n_hi, n_lo, wrong_dir;
    sens = int'($floor(16.0 * slope + 0.5));
    voq  = int'($floor(voq_v * 256.0 / 5.0 + 0.5));
    hi   = int'($floor(hi_v * 256.0 / 5.0 + 0.5));
    lo   = int'($floor(lo_v * 256.0 / 5.0 + 0.5));
    wr(A_TQ, 8, 0); wr(A_SQTQ, 7, 0);
    wr(A_SENS, 7, sens < 0 ? (64 | -sens) : sens);
    wr(A_VOQ, 9, voq & 9'h1FF);
    wr(A_HI, 8, hi); wr(A_LO, 7, lo);
    n_hi = 0; n_lo = 0; wrong_dir = 0; prev = -1;
    for (int mv = 0; mv <= 5000; mv += 40) begin
      hall_mv = 13'(mv);
      repeat (300) @(negedge clk);
      h = mv * 256 / 5000 - 128;
      p = ((h < 0 ? -h : h) * (sens < 0 ? -sens : sens) + 8) >> 4;
      if ((h < 0) != (sens < 0)) p = -p;
      e = p + voq;
      if (e < lo) e = lo;
      if (e > hi) e = hi;
      if (e == hi) n_hi++;
      if (e == lo) n_lo++;
      checks++;
      if (int'(dac_code) != e) begin
        failures++; $display("slope %f: %0d mV -> %0d expected %0d", slope, mv, dac_code, e);
      end
      if (prev >= 0 && (slope > 0 ? int'(dac_code) < prev : int'(dac_code) > prev)) wrong_dir++;
      prev = int'(dac_code);
    end
    checks++;
    if (n_hi == 0 || n_lo == 0 || wrong_dir != 0) begin
      failures++; $display("slope %f: clamp-high %0d clamp-low %0d wrong direction %0d", slope, n_hi, n_lo, wrong_dir);
    end
    $display("slope %f (Sens %0d) Voq %0d: %0d points at clamp-high, %0d at clamp-low", slope, sens, voq, n_hi, n_lo);
  endtask

  initial begin
    host.bt = 40;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    run(1.07, 2.5, 4.5, 0.45);
    run(-1.2, 1.3, 4.25, 1.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
