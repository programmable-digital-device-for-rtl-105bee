// Self-checking test of mult_lin (Multiply 1): operands enter back to back,
// every clock, and each result must appear exactly two clocks later, equal
// to round(|x| * F / 128) saturated at 255 with the sign of x (a zero
// result has a clear sign).
module tb_mult_lin;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [8:0] in_sm = 0, factor = 0;
  logic out_valid;
  logic [8:0] out_sm;
  int checks = 0, failures = 0, sats = 0, halves = 0;
  logic [8:0] expq[$];
  bit         vq[$];

  mult_lin dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [8:0] ref_mul(input logic [8:0] x, input logic [8:0] f);
    int p, r;
    p = int'(x[7:0]) * int'(f);
    r = (p + 64) / 128;
    if (r > 255) r = 255;
    return {x[8] && r != 0, 8'(r)};
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check what leaves now: issued two clocks ago
      if (vq.size() >= 2) begin
        bit v; logic [8:0] e;
        v = vq.pop_front(); e = expq.pop_front();
        checks++;
        if (out_valid !== v || (v && out_sm !== e)) begin
          failures++;
          $display("n=%0d got %h/%b expected %h/%b", n, out_sm, out_valid, e, v);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      in_sm    = 9'($urandom_range(0, 511));
      factor   = (n % 3 == 0) ? 9'($urandom_range(100, 160)) : 9'($urandom_range(0, 511));
      if (in_valid && (int'(in_sm[7:0]) * int'(factor) + 64) / 128 > 255) sats++;
      if (in_valid && (int'(in_sm[7:0]) * int'(factor)) % 128 == 64) halves++;
      vq.push_back(in_valid);
      expq.push_back(ref_mul(in_sm, factor));
    end
    $display("saturations %0d, exact halves %0d", sats, halves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
