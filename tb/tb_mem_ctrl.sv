// Self-checking test of mem_ctrl together with the configuration RAM and
// the EEPROM model. It walks through the command set: boot from an erased
// EEPROM, Write/Read of every register, the read-only address 111 with
// its three selections, Test, Erase and Program followed by a reset that
// must restore the programmed values, Lock1 (frozen T0 and range bits),
// and Lock (everything refused, locked output high). Expected values are
// kept in a reference model of the registers in this bench.
module tb_mem_ctrl;
  import hall_pkg::*;
  localparam int BUSY = 12;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  logic [2:0] cmd = 0, addr = 0;
  logic [8:0] wdata = 0, rdata;
  logic cmd_done, cmd_ok, locked, lock1, booting;
  logic [7:0] temp_now = 0, dac_code = 0;
  logic meas_req, meas_done = 0;
  logic [7:0] meas_value = 0;
  int n_meas = 0;
  // DSP stand-in: a temperature conversion 15 clocks after each request
  always @(posedge clk) begin
    meas_done <= 1'b0;
    if (meas_req) begin
      n_meas <= n_meas + 1;
      repeat (15) @(posedge clk);
      temp_now  <= meas_value;
      meas_done <= 1'b1;
    end
  end
  logic [8:0] adc_lin = 0;
  logic ram_we; logic [2:0] ram_waddr, ram_raddr; logic [8:0] ram_wdata, ram_rdata;
  logic ee_req, ee_erase, ee_busy; logic [2:0] ee_addr, ee_raddr; logic [8:0] ee_mask, ee_wdata, ee_rdata;
  cfg_t cfg;
  int checks = 0, failures = 0;
  localparam int W [8] = '{9, 8, 7, 7, 9, 8, 7, 8};

  mem_ctrl dut (.*, .ram_special(cfg.special));
  cfg_ram u_ram (.clk, .rst_n, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
                 .raddr(ram_raddr), .rdata(ram_rdata), .cfg);
  eeprom_model #(.BUSY_CYCLES(BUSY)) u_ee (.clk, .rst_n, .req(ee_req), .erase(ee_erase),
                 .addr(ee_addr), .mask(ee_mask), .wdata(ee_wdata), .raddr(ee_raddr),
                 .rdata(ee_rdata), .busy(ee_busy));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat;
  task automatic do_cmd(input cmd_e c, input int a, input logic [8:0] d, output bit ok, output logic [8:0] r);
    @(negedge clk);
    cmd_valid = 1; cmd = c; addr = 3'(a); wdata = d;
    @(negedge clk);
    cmd_valid = 0;
    lat = 1;
    while (!cmd_done) begin @(negedge clk); lat++; end
    ok = cmd_ok; r = rdata;
  endtask

  task automatic expect_cmd(input cmd_e c, input int a, input logic [8:0] d,
                            input bit exp_ok, input logic [8:0] exp_r, input string what);
    bit ok; logic [8:0] r;
    do_cmd(c, a, d, ok, r);
    checks++;
    if (ok !== exp_ok || (exp_ok && c == C_READ && r !== exp_r)) begin
      failures++;
      $display("%s: ok %b data %h, expected ok %b data %h", what, ok, r, exp_ok, exp_r);
    end
  endtask

  function automatic logic [8:0] m(input int a, input logic [8:0] v);
    return v & 9'((1 << W[a]) - 1);
  endfunction

  initial begin
    logic [8:0] regs [8];
    logic [8:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // boot from erased EEPROM: every register all ones
    for (int a = 1; a < 7; a++) expect_cmd(C_READ, a, 0, 1, m(a, '1), "boot value");
    expect_cmd(C_READ, 0, 0, 1, 9'h1FF, "boot special");
    checks++;
    if (locked || lock1) begin failures++; $display("locked after boot"); end
    // write and read back all writable registers
    for (int rep = 0; rep < 20; rep++) begin
      for (int a = 1; a < 7; a++) begin
        v = 9'($urandom_range(0, 511));
        expect_cmd(C_WRITE, a, v, 1, 0, "write");
        checks++;
        if (lat != 4) begin failures++; $display("write took %0d clocks", lat); end
        regs[a] = m(a, v);
      end
      for (int a = 1; a < 7; a++) expect_cmd(C_READ, a, 0, 1, regs[a], "read back");
    end
    // special: lock bits cannot be written, others can; select T0
    expect_cmd(C_WRITE, 0, 9'h015, 1, 0, "write special");
    expect_cmd(C_READ, 0, 0, 1, 9'h195, "read special");
    regs[0] = 9'h015;
    // read-only address and reserved command
    expect_cmd(C_WRITE, 7, 9'h012, 0, 0, "write to read-only address");
    expect_cmd(C_RESERVED, 3, 0, 0, 0, "reserved command");
    // Test command: temperature into T0
    meas_value = 8'hE7;
    expect_cmd(C_TEST, 5, 0, 1, 0, "test");
    checks++;
    if (n_meas != 1 || lat < 16) begin failures++; $display("test: %0d requests, %0d clocks", n_meas, lat); end
    expect_cmd(C_READ, 7, 0, 1, 9'h0E7, "read T0");
    regs[7] = 9'h0E7;
    adc_lin = 9'h1A5; dac_code = 8'h3C;
    expect_cmd(C_WRITE, 0, 9'h035, 1, 0, "select Adc");
    expect_cmd(C_READ, 7, 0, 1, 9'h1A5, "read Adc");
    expect_cmd(C_WRITE, 0, 9'h055, 1, 0, "select Dac");
    expect_cmd(C_READ, 7, 0, 1, 9'h03C, "read Dac");
    expect_cmd(C_WRITE, 0, 9'h015, 1, 0, "select T0");
    // Erase and Program, then a reset must restore the values
    expect_cmd(C_ERASE, 2, 0, 1, 0, "erase");
    checks++;
    if (lat < 8 * BUSY) begin failures++; $display("erase too fast: %0d", lat); end
    expect_cmd(C_PROGRAM, 4, 0, 1, 0, "program");
    for (int a = 0; a < 8; a++) begin
      ee_raddr_probe(a, v);
      checks++;
      if ((v & 9'h07F) !== (m(a, regs[a]) & 9'h07F) && a != 0 ||
          (a == 0 && v !== 9'h195)) begin
        failures++; $display("EEPROM word %0d = %h, RAM %h", a, v, regs[a]);
      end
    end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int a = 1; a < 8; a++) expect_cmd(C_READ, a, 0, 1, regs[a], "after power cycle");
    // Lock1: range bits and T0 frozen, Test refused
    expect_cmd(C_LOCK1, 6, 0, 1, 0, "lock1");
    checks++;
    if (!lock1) begin failures++; $display("lock1 flag not set"); end
    expect_cmd(C_WRITE, 0, 9'h00A, 1, 0, "write special after lock1");
    expect_cmd(C_READ, 0, 0, 1, 9'h115, "special after lock1");
    expect_cmd(C_TEST, 0, 0, 0, 0, "test after lock1");
    checks++;
    if (n_meas != 1) begin failures++; $display("measurement requested after lock1"); end
    expect_cmd(C_ERASE, 0, 0, 1, 0, "erase after lock1");
    ee_raddr_probe(7, v);
    checks++;
    if (v[7:0] !== 8'hE7) begin failures++; $display("T0 erased despite lock1: %h", v); end
    ee_raddr_probe(0, v);
    checks++;
    if (v[4:0] !== 5'h15 || v[7] !== 1'b0) begin failures++; $display("special cells after lock1 erase: %h", v); end
    // Lock: everything refused afterwards
    expect_cmd(C_LOCK, 1, 0, 1, 0, "lock");
    checks++;
    if (!locked) begin failures++; $display("locked flag not set"); end
    expect_cmd(C_READ, 1, 0, 0, 0, "read after lock");
    expect_cmd(C_WRITE, 1, 9'h011, 0, 0, "write after lock");
    expect_cmd(C_ERASE, 1, 0, 0, 0, "erase after lock");
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    repeat (12) @(negedge clk);
    checks++;
    if (!locked) begin failures++; $display("lock lost over reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // peek at an EEPROM word without disturbing the controller
  task automatic ee_raddr_probe(input int a, output logic [8:0] v);
    v = u_ee.cells[a];
  endtask
endmodule
