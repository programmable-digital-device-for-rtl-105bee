// Self-checking test of average: a random Hall stream with temperature
// slots at random places (never two in a row). Each output must equal the
// input of the previous slot, or for a temperature slot the rounded mean
// of the Hall values around it (halves away from zero), one sample late.
module tb_average;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_is_temp = 0;
  logic [8:0] in_sm = 0;
  logic out_valid;
  logic [8:0] out_sm;
  int checks = 0, failures = 0, temp_slots = 0;

  average dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int val(input logic [8:0] s);
    return s[8] ? -int'(s[7:0]) : int'(s[7:0]);
  endfunction

  initial begin
    int hv[$];          // values fed
    bit ist[$];         // slot tags
    int n, exp_i, s, m;
    logic [8:0] exp;
    bit prev_t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev_t = 1;
    for (n = 0; n < 600; n++) begin
      bit t;
      int v;
      t = !prev_t && ($urandom_range(0, 4) == 0);
      v = $urandom_range(0, 256) - 128;
      if (n > 0 && n % 50 == 0) v = (n % 100 == 0) ? 128 : -128;   // extremes
      prev_t = t;
      if (n == 0) t = 0;
      @(negedge clk);
      in_valid = 1;
      in_is_temp = t;
      in_sm = t ? 9'h1AA : {v < 0, 8'(v < 0 ? -v : v)};
      hv.push_back(v); ist.push_back(t);
      @(negedge clk);
      in_valid = 0;
      if (n >= 1) begin
        exp_i = n - 1;
        if (ist[exp_i]) begin
          temp_slots++;
          s = hv[exp_i - 1] + hv[exp_i + 1];
          m = ((s < 0 ? -s : s) + 1) / 2;
          exp = {s < 0 && m != 0, 8'(m)};
        end else begin
          exp = {hv[exp_i] < 0, 8'(hv[exp_i] < 0 ? -hv[exp_i] : hv[exp_i])};
        end
        checks++;
        if (!out_valid || out_sm !== exp) begin
          failures++;
          $display("slot %0d (temp %0b): got %h valid %b, expected %h", exp_i, ist[exp_i], out_sm, out_valid, exp);
        end
      end else begin
        checks++;
        if (out_valid) begin failures++; $display("output before the first delay"); end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    if (temp_slots == 0) failures++;
    $display("temperature slots filled: %0d", temp_slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
