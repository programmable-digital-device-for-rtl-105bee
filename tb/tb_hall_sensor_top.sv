// End-to-end test of the whole device at its default parameters, driven
// only through its pins: voltages on the converter inputs, telegrams on
// the serial line, and the output code/voltage and serial replies.
// Sequence: boot from an erased EEPROM; configure every register over the
// serial line and read it back; Test (T0 := present temperature); check
// the conditioned output against an independent calculation at several
// field values, including both clamps; read Adc and Dac over the line;
// Erase, Program and a power cycle that must restore the configuration;
// change the temperature and check the compensation; Lock1 (Test then
// refused); Lock (output switched to analog mode, interface silent).
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_hall_sensor_top;
  import hall_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [12:0] hall_mv = 2500, temp_mv = 2600;
  logic sin, sout, analog_mode;
  logic [7:0] dac_code;
  logic [12:0] vout_mv;
  logic [4:0] adc_range;
  int checks = 0, failures = 0;

  hall_sensor_top dut (.*);
  serial_host host (.clk, .sin, .sout);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int m_fill = 0, m_clamp_hi = 0, m_clamp_lo = 0, m_fupd = 0, m_reject = 0, m_prog = 0,
      m_erase = 0, m_restore = 0, m_lock = 0, m_lock1 = 0, m_refused = 0, m_test = 0, m_rdsel = 0;
  always @(posedge clk) begin
    if (dut.u_dsp.u_ctrl.hall_valid && dut.u_dsp.u_ctrl.hall_is_temp) m_fill++;
    if (dut.u_dsp.u_lin.stage[2]) m_fupd++;
  end

  // configuration as the bench believes it
  int tq = -24, sq = 40, sens = 21, voq = 140, hi = 230, lo = 20, t0;
  localparam int W [7] = '{9, 8, 7, 7, 9, 8, 7};

  function automatic int code_of(input int mv);
    int c;
    c = mv * 256 / 5000;
    return c > 255 ? 255 : c;
  endfunction
  function automatic int f_of(input int t, input int z, input int a, input int b);
    longint d, acc, r;
    d = t - z;
    acc = (longint'(1) << 20) - longint'(a) * d * 64 + longint'(b) * d * d;
    r = acc + 4096;
    r = (r >= 0) ? (r >> 13) : -((-r + 8191) >> 13);
    if (r < 0) r = 0;
    if (r > 511) r = 511;
    return int'(r);
  endfunction
  function automatic int expect_out(output int adc_sm);
    int h, f, m1, p2, y;
    h = code_of(int'(hall_mv)) - 128;
    f = f_of(code_of(int'(temp_mv)) - 128, t0, tq, sq);
    m1 = ((h < 0 ? -h : h) * f + 64) >> 7;
    if (m1 > 255) m1 = 255;
    adc_sm = h < 0 ? -m1 : m1;
    p2 = (m1 * (sens < 0 ? -sens : sens) + 8) >> 4;
    if ((h < 0) != (sens < 0)) p2 = -p2;
    y = p2 + voq;
    if (y < lo) y = lo;
    if (y > hi) y = hi;
    return y;
  endfunction
  function automatic logic [8:0] sm(input int v, input int w);
    return 9'(v < 0 ? -v : v) | (v < 0 ? 9'(1 << (w - 1)) : 9'd0);
  endfunction

  task automatic write_reg(input int a, input logic [8:0] v);
    bit ack; logic [9:0] d; int obt;
    host.send(C_WRITE, 3'(a), v, W[a]);
    host.receive(0, 8 * host.bt, ack, d, obt);
    checks++;
    if (!ack) begin failures++; $display("no ack for write to %0d", a); end
  endtask
  task automatic read_reg(input int a, input int w, output bit ack, output logic [8:0] v);
    logic [9:0] d; int obt;
    host.send(C_READ, 3'(a), 0, 0);
    host.receive(w + 1, 8 * host.bt, ack, d, obt);
    v = 9'(d >> 1);
    if (ack) begin
      checks++;
      if (d[0] != ~(^v)) begin failures++; $display("read parity wrong"); end
    end
  endtask
  task automatic special(input cmd_e c, input int timeout, output bit ack);
    logic [9:0] d; int obt;
    host.send(c, 3'd3, 0, 0);
    host.receive(0, timeout, ack, d, obt);
  endtask

  // wait for the pipeline to settle on the present inputs, then compare
  task automatic check_output(input string what);
    int e, a_sm;
    repeat (64 * 10 * 2 + 40) @(negedge clk);   // at least one temperature slot
    e = expect_out(a_sm);
    checks++;
    if (int'(dac_code) != e || int'(vout_mv) != e * 5000 / 256) begin
      failures++;
      $display("%s: hall %0d mV temp %0d mV -> dac %0d (%0d mV), expected %0d", what, hall_mv, temp_mv, dac_code, vout_mv, e);
    end
    if (e == hi) m_clamp_hi++;
    if (e == lo) m_clamp_lo++;
  endtask

  logic [8:0] regs [7];
  initial begin
    bit ack; logic [8:0] v; int a_sm, e;
    host.bt = 40;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    // erased EEPROM at first power-up
    read_reg(A_HI, 8, ack, v);
    checks++;
    if (!ack || v != 9'h0FF) begin failures++; $display("boot Hi %h", v); end
    // configure
    regs[A_SPECIAL] = 9'h00A;                 // read select T0, range 01010
    regs[A_TQ]   = sm(tq, 8);
    regs[A_SQTQ] = 9'(sq);
    regs[A_SENS] = sm(sens, 7);
    regs[A_VOQ]  = 9'(voq);
    regs[A_HI]   = 9'(hi);
    regs[A_LO]   = 9'(lo);
    for (int a = 0; a < 7; a++) write_reg(a, regs[a]);
    for (int a = 1; a < 7; a++) begin
      read_reg(a, W[a], ack, v);
      checks++;
      if (!ack || v != regs[a]) begin failures++; $display("read back %0d: %h expected %h", a, v, regs[a]); end
    end
    checks++;
    if (adc_range != 5'h0A) begin failures++; $display("adc_range %h", adc_range); end
    // a telegram with a parity error is ignored
    host.send_raw({3'b001, 1'b1, 3'b101, 1'b1}, 8);
    host.receive(0, 8 * host.bt, ack, regs[0], e);
    checks++;
    if (ack) failures++; else m_reject++;
    // Test: T0 := present temperature
    repeat (64 * 10 + 40) @(negedge clk);
    special(C_TEST, 8 * host.bt, ack);
    t0 = code_of(int'(temp_mv)) - 128;
    read_reg(A_RO, 8, ack, v);
    checks++;
    if (!ack || v[7:0] != 8'(t0)) begin failures++; $display("T0 %h expected %h", v, 8'(t0)); end
    else m_test++;
    // conditioned output over the field range
    foreach (hall_mv_list[i]) begin
      hall_mv = 13'(hall_mv_list[i]);
      check_output("configured");
    end
    // read Adc and Dac over the line
    write_reg(A_SPECIAL, 9'h02A);
    e = expect_out(a_sm);
    read_reg(A_RO, 9, ack, v);
    checks++;
    if (!ack || v != sm(a_sm, 9)) begin failures++; $display("Adc read %h expected %0d", v, a_sm); end
    else m_rdsel++;
    write_reg(A_SPECIAL, 9'h04A);
    read_reg(A_RO, 8, ack, v);
    checks++;
    if (!ack || v != 9'(dac_code)) begin failures++; $display("Dac read %h, pin %h", v, dac_code); end
    else m_rdsel++;
    write_reg(A_SPECIAL, 9'h00A);
    // store: erase, program, power cycle
    special(C_ERASE, 8 * 220 * 2, ack);
    checks++;
    if (!ack) failures++; else m_erase++;
    special(C_PROGRAM, 8 * 220 * 2, ack);
    checks++;
    if (!ack) failures++; else m_prog++;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    e = 0;
    for (int a = 1; a < 7; a++) begin
      read_reg(a, W[a], ack, v);
      checks++;
      if (!ack || v != regs[a]) begin failures++; e++; $display("after power cycle %0d: %h expected %h", a, v, regs[a]); end
    end
    read_reg(A_RO, 8, ack, v);
    checks++;
    if (!ack || v[7:0] != 8'(t0)) begin failures++; e++; end
    if (e == 0) m_restore++;
    hall_mv = 13'd3300;
    check_output("after power cycle");
    // temperature compensation at other temperatures
    temp_mv = 13'd3400; check_output("warm");
    temp_mv = 13'd1700; check_output("cold");
    // Lock1: Test refused from now on
    special(C_LOCK1, 8 * 220, ack);
    checks++;
    if (!ack) failures++; else m_lock1++;
    special(C_TEST, 8 * host.bt, ack);
    checks++;
    if (ack) failures++; else m_refused++;
    // Lock: analog mode, interface silent
    checks++;
    if (analog_mode) begin failures++; $display("analog mode before lock"); end
    special(C_LOCK, 8 * 220, ack);
    repeat (10) @(negedge clk);
    checks++;
    if (!ack || !analog_mode) begin failures++; $display("lock: ack %b analog %b", ack, analog_mode); end
    else m_lock++;
    read_reg(A_HI, 8, ack, v);
    checks++;
    if (ack) begin failures++; $display("interface answered after lock"); end
    hall_mv = 13'd1200;
    check_output("locked");
    // mechanisms
    $display("filled temperature slots %0d, factor updates %0d, clamp-high %0d, clamp-low %0d",
             m_fill, m_fupd, m_clamp_hi, m_clamp_lo);
    $display("rejected telegram %0d, test %0d, Adc/Dac reads %0d, erase %0d, program %0d, restore %0d, lock1 %0d, refused %0d, lock %0d",
             m_reject, m_test, m_rdsel, m_erase, m_prog, m_restore, m_lock1, m_refused, m_lock);
    if (m_fill == 0 || m_fupd == 0 || m_clamp_hi == 0 || m_clamp_lo == 0 || m_reject == 0 ||
        m_test == 0 || m_rdsel < 2 || m_erase == 0 || m_prog == 0 || m_restore == 0 ||
        m_lock1 == 0 || m_refused == 0 || m_lock == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hall_mv_list [8] = '{2500, 2700, 3000, 3600, 4900, 2200, 1500, 100};
endmodule
