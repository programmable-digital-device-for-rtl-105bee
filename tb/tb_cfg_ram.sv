// Self-checking test of cfg_ram: random writes to all addresses against a
// reference array (each write cut to the register's size), read back
// through the read port and through every field of the cfg struct.
module tb_cfg_ram;
  import hall_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we = 0;
  logic [2:0] waddr = 0, raddr = 0;
  logic [8:0] wdata = 0, rdata;
  cfg_t cfg;
  int checks = 0, failures = 0;
  logic [8:0] refm [8];
  localparam int W [8] = '{9, 8, 7, 7, 9, 8, 7, 8};

  cfg_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 8; a++) begin
      raddr = 3'(a);
      #1;
      checks++;
      if (rdata !== refm[a]) begin failures++; $display("addr %0d: %h expected %h", a, rdata, refm[a]); end
    end
    checks++;
    if (cfg.special !== refm[0] || cfg.tq !== refm[1][7:0] || cfg.sqtq !== refm[2][6:0] ||
        cfg.sens !== refm[3][6:0] || cfg.voq !== refm[4] || cfg.hi !== refm[5][7:0] ||
        cfg.lo !== refm[6][6:0] || cfg.t0 !== refm[7][7:0]) begin
      failures++; $display("cfg struct mismatch");
    end
  endtask

  initial begin
    for (int a = 0; a < 8; a++) refm[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom_range(0, 7);
      @(negedge clk);
      we = 1; waddr = 3'(a); wdata = 9'($urandom_range(0, 511));
      refm[a] = wdata & 9'((1 << W[a]) - 1);
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
