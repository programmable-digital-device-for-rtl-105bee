// Self-checking test of mult_sens (Multiply 2): operands every clock,
// results exactly three clocks later, equal to
// sign(x)*sign(S) * round(|x| * |S| / 16) (halves away from zero).
module tb_mult_sens;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [8:0] in_sm = 0;
  logic [6:0] sens = 0;
  logic out_valid;
  logic signed [10:0] out_val;
  int checks = 0, failures = 0;
  int  expq[$];
  bit  vq[$];

  mult_sens dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int m;
      @(negedge clk);
      if (vq.size() >= 3) begin
        bit v; int e;
        v = vq.pop_front(); e = expq.pop_front();
        checks++;
        if (out_valid !== v || (v && int'(out_val) != e)) begin
          failures++;
          $display("n=%0d got %0d/%b expected %0d/%b", n, out_val, out_valid, e, v);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      in_sm    = 9'($urandom_range(0, 511));
      sens     = 7'($urandom_range(0, 127));
      if (n == 10) begin in_sm = 9'h0FF; sens = 7'h3F; end   // largest product
      if (n == 11) begin in_sm = 9'h1FF; sens = 7'h01; end   // -255/16
      m = (int'(in_sm[7:0]) * int'(sens[5:0]) + 8) / 16;
      vq.push_back(in_valid);
      expq.push_back((in_sm[8] ^ sens[6]) ? -m : m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
