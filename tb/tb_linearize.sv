// Self-checking test of linearize: random temperatures, T0 and quotients.
// The expected factor is F = 1 - Tq*dT/2^14 + Sqtq*dT^2/2^20, rounded to
// the nearest 1/128 and clamped to 0..511/128, computed here in 64-bit
// integers. The factor must change four clocks after temp_valid (busy high
// in between) and be 1.0 after reset.
module tb_linearize;
  logic clk = 0, rst_n = 0;
  logic temp_valid = 0;
  logic [7:0] temp_val = 0, t0 = 0, tq = 0;
  logic [6:0] sqtq = 0;
  logic [8:0] factor;
  logic busy;
  int checks = 0, failures = 0, sat_lo = 0, sat_hi = 0;

  linearize dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_f(input int t, input int z, input int a, input int b);
    longint d, acc, r;
    d = t - z;
    acc = (longint'(1) << 20) - longint'(a) * d * 64 + longint'(b) * d * d;
    // round half up at 2^13
    r = (acc + 4096);
    r = (r >= 0) ? (r >> 13) : -((-r + 8191) >> 13);
    if (r < 0) r = 0;
    if (r > 511) r = 511;
    return int'(r);
  endfunction

  initial begin
    int t, z, a, b, e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (factor !== 9'd128) begin failures++; $display("factor after reset %0d", factor); end
    for (int n = 0; n < 400; n++) begin
      t = $urandom_range(0, 255) - 128;
      z = $urandom_range(0, 255) - 128;
      a = $urandom_range(0, 254) - 127;
      b = $urandom_range(0, 127);
      if (n < 100) begin           // realistic, small drifts
        z = $urandom_range(0, 40) - 20;
        t = z + $urandom_range(0, 60) - 30;
      end
      if (n == 0) begin t = 5; z = 5; end          // dT = 0 -> exactly 1.0
      @(negedge clk);
      temp_val = 8'(t); t0 = 8'(z); b = b;
      tq = {a < 0, 7'(a < 0 ? -a : a)}; sqtq = 7'(b);
      temp_valid = 1;
      @(negedge clk);
      temp_valid = 0;
      for (int k = 1; k < 4; k++) begin
        checks++;
        if (!busy) begin failures++; $display("busy low at step %0d", k); end
        @(negedge clk);
      end
      e = expect_f(t, z, a, b);
      if (e == 0) sat_lo++;
      if (e == 511) sat_hi++;
      checks++;
      if (factor !== 9'(e) || busy) begin
        failures++;
        $display("t=%0d t0=%0d tq=%0d sq=%0d: F=%0d expected %0d busy %b", t, z, a, b, factor, e, busy);
      end
    end
    $display("saturated low %0d high %0d", sat_lo, sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
