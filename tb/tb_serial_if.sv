// Self-checking test of serial_if with the line model serial_host and a
// small memory stand-in that acknowledges every command except the
// reserved one and writes to address 111. Checks: Write telegrams deliver
// the right command, address and data and get an acknowledge bit whose
// length equals the input bit time; Read telegrams return the register
// with odd parity; Special telegrams get an acknowledge only; telegrams
// with a parity error, a too-early change, a refused command or while
// locked get no reply; mid-bit changes at 62 % and 88 % are accepted; two
// bit times are used.
module tb_serial_if;
  import hall_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sin, sout, locked = 0;
  logic [1:0] rd_sel = 2'b01;
  logic cmd_valid, cmd_done = 0, cmd_ok = 0;
  logic [2:0] cmd, addr;
  logic [8:0] wdata, rdata = 0;
  logic frame_ok, frame_err;
  logic [15:0] bit_time;
  int checks = 0, failures = 0;
  localparam int W [8] = '{9, 8, 7, 7, 9, 8, 7, 9};  // 111 reads Adc (rd_sel 01)

  serial_if dut (.*);
  serial_host host (.clk, .sin, .sout);
  always #5 clk = ~clk;

  // memory stand-in
  logic [8:0] mem [8];
  logic [2:0] lcmd, laddr;
  logic [8:0] lwdata;
  int ncmd = 0;
  initial for (int i = 0; i < 8; i++) mem[i] = 9'(i * 37 + 5);
  always @(posedge clk) begin
    cmd_done <= 1'b0;
    if (cmd_valid) begin
      lcmd <= cmd; laddr <= addr; lwdata <= wdata; ncmd <= ncmd + 1;
      repeat (3) @(posedge clk);
      cmd_ok   <= (cmd != C_RESERVED) && !(cmd == C_WRITE && addr == 3'd7);
      rdata    <= mem[addr];
      if (cmd == C_WRITE) mem[addr] <= wdata;
      cmd_done <= 1'b1;
    end
  end

  int nerr = 0;
  always @(posedge clk) if (frame_err) nerr <= nerr + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic no_reply(input string what);
    bit ack; logic [9:0] d; int obt;
    host.receive(0, 6 * host.bt, ack, d, obt);
    checks++;
    if (ack) begin failures++; $display("%s: unexpected reply", what); end
  endtask

  initial begin
    bit ack; logic [9:0] d; int obt, n0, e0;
    logic [8:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      host.bt = pass ? 100 : 40;
      for (int k = 0; k < 24; k++) begin
        int a;
        a = $urandom_range(0, 6);
        host.mid_pct = (k % 3 == 0) ? 62 : (k % 3 == 1) ? 88 : 75;
        v = 9'($urandom_range(0, 511)) & 9'((1 << W[a]) - 1);
        n0 = ncmd;
        host.send(C_WRITE, 3'(a), v, W[a]);
        host.receive(0, 4 * host.bt, ack, d, obt);
        checks++;
        if (!ack || ncmd != n0 + 1 || lcmd != C_WRITE || laddr != 3'(a) || lwdata != v) begin
          failures++;
          $display("write a=%0d v=%h: ack %b cmd %0d addr %0d data %h", a, v, ack, lcmd, laddr, lwdata);
        end
        checks++;
        if (obt < host.bt - 2 || obt > host.bt + 2) begin failures++; $display("ack length %0d for bit time %0d", obt, host.bt); end
        // read it back
        host.send(C_READ, 3'(a), 0, 0);
        host.receive(W[a] + 1, 4 * host.bt, ack, d, obt);
        checks++;
        if (!ack || 9'(d >> 1) != v || d[0] != ~(^v)) begin
          failures++;
          $display("read a=%0d: ack %b data %h expected %h", a, ack, d, v);
        end
        repeat (5) @(negedge clk);
      end
    end
    host.bt = 50; host.mid_pct = 75;
    // read of address 111 (Adc selected, 9 bits)
    host.send(C_READ, 3'd7, 0, 0);
    host.receive(10, 4 * host.bt, ack, d, obt);
    checks++;
    if (!ack || d[9:1] != mem[7]) begin failures++; $display("read 111: %h", d); end
    // special command: acknowledge only
    n0 = ncmd;
    host.send(C_PROGRAM, 3'd5, 0, 0);
    host.receive(0, 4 * host.bt, ack, d, obt);
    checks++;
    if (!ack || lcmd != C_PROGRAM || ncmd != n0 + 1) begin failures++; $display("special: ack %b", ack); end
    // refused commands
    host.send(C_WRITE, 3'd7, 9'h055, 9);
    no_reply("write to 111");
    host.send(C_RESERVED, 3'd1, 0, 0);
    no_reply("reserved command");
    // parity error in the command field
    e0 = nerr; n0 = ncmd;
    host.send_raw({3'b001, 1'b1, 3'b010, 1'b0}, 8);
    no_reply("command parity error");
    checks++;
    if (nerr != e0 + 1 || ncmd != n0) begin failures++; $display("parity error not flagged"); end
    // parity error in the data field
    host.send_raw({3'b010, 1'b0, 3'b001, 1'b0, 8'hA5, 1'b0}, 17);
    no_reply("data parity error");
    // change at 30 % of a bit: telegram dropped
    host.mid_pct = 30;
    e0 = nerr;
    host.send(C_READ, 3'd1, 0, 0);
    no_reply("early change");
    checks++;
    if (nerr == e0) begin failures++; $display("early change not flagged"); end
    host.mid_pct = 75;
    // recovers afterwards
    host.send(C_READ, 3'd2, 0, 0);
    host.receive(8, 4 * host.bt, ack, d, obt);
    checks++;
    if (!ack || d[7:1] != mem[2][6:0]) begin failures++; $display("no recovery after error"); end
    // locked: no reaction at all
    locked = 1;
    n0 = ncmd;
    host.send(C_READ, 3'd2, 0, 0);
    no_reply("locked");
    checks++;
    if (ncmd != n0) begin failures++; $display("command passed while locked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
