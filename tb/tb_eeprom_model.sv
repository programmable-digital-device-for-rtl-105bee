// Self-checking test of the EEPROM model: starts erased (all '1'), program
// only clears masked cells whose data bit is '0', erase sets masked cells,
// busy lasts BUSY_CYCLES, requests while busy are ignored, reset keeps the
// contents.
module tb_eeprom_model;
  localparam int BUSY = 20;
  logic clk = 0, rst_n = 0;
  logic req = 0, erase = 0;
  logic [2:0] addr = 0, raddr = 0;
  logic [8:0] mask = 0, wdata = 0, rdata;
  logic busy;
  int checks = 0, failures = 0;
  logic [8:0] refm [8];

  eeprom_model #(.BUSY_CYCLES(BUSY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 8; a++) begin
      raddr = 3'(a); #1;
      checks++;
      if (rdata !== refm[a]) begin failures++; $display("word %0d: %h expected %h", a, rdata, refm[a]); end
    end
  endtask

  task automatic op(input bit er, input int a, input logic [8:0] m, input logic [8:0] d);
    int t;
    @(negedge clk);
    req = 1; erase = er; addr = 3'(a); mask = m; wdata = d;
    @(negedge clk);
    req = 0;
    // a second request while busy must be ignored
    req = 1; erase = ~er; mask = '1; wdata = '0;
    @(negedge clk);
    req = 0;
    t = 2;
    while (busy) begin
      @(negedge clk); t++;
    end
    checks++;
    if (t != BUSY + 1) begin failures++; $display("busy for %0d clocks", t - 1); end
    if (er) refm[a] = refm[a] | m;
    else    refm[a] = refm[a] & ~(m & ~d);
    check_all();
  endtask

  initial begin
    for (int a = 0; a < 8; a++) refm[a] = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int n = 0; n < 60; n++)
      op($urandom_range(0, 3) == 0, $urandom_range(0, 7), 9'($urandom_range(0, 511)), 9'($urandom_range(0, 511)));
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
