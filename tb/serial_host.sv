// Test-bench model of the external programmer on the serial line.
//
// Builds telegrams (sync bit, command, odd parity, address, odd parity and,
// for Write, data bits plus odd parity, most significant bit first) and
// sends them in the line code: every bit starts with a level change, a '1'
// has one more change at mid_pct percent of the bit time. It also decodes
// the device's reply: the acknowledge bit (high for one bit time, which
// gives the reply's bit time) followed by a given number of data bits.
module serial_host (
  input  logic clk,
  output logic sin,
  input  logic sout
);
  int bt     = 40;   // bit time in clocks
  int mid_pct = 75;  // position of the mid-bit change of a '1'

  initial sin = 1'b0;

  function automatic logic oddp(input logic [9:0] v);
    return ~(^v);
  endfunction

  // Send n bits of 'bits' (bits[n-1] first) after a sync bit.
  task automatic send_raw(input logic [31:0] bits, input int n);
    int mid_t;
    mid_t = bt * mid_pct / 100;
    @(posedge clk);
    sin <= 1'b1;                    // sync bit
    repeat (bt) @(posedge clk);
    for (int i = n - 1; i >= 0; i--) begin
      sin <= ~sin;                  // bit boundary
      if (bits[i]) begin
        repeat (mid_t) @(posedge clk);
        sin <= ~sin;
        repeat (bt - mid_t) @(posedge clk);
      end else begin
        repeat (bt) @(posedge clk);
      end
    end
    sin <= 1'b0;                    // line back to idle
    @(posedge clk);
  endtask

  // Build and send a telegram. w = number of data bits (0: no data field).
  task automatic send(input logic [2:0] cmd, input logic [2:0] addr,
                      input logic [8:0] data, input int w);
    logic [31:0] b;
    int n;
    b = {cmd, oddp({7'b0, cmd}), addr, oddp({7'b0, addr})};
    n = 8;
    if (w > 0) begin
      logic [8:0] d;
      d = data & 9'((1 << w) - 1);
      for (int i = w - 1; i >= 0; i--) b = {b[30:0], d[i]};
      b = {b[30:0], oddp({1'b0, d})};
      n = n + w + 1;
    end
    send_raw(b, n);
  endtask

  // Wait up to 'timeout' clocks for a reply; decode nbits bits after the ack.
  task automatic receive(input int nbits, input int timeout,
                         output bit ack, output logic [9:0] data, output int obt);
    int t, k;
    logic a, b;
    ack = 0; data = '0; obt = 0;
    t = 0;
    while (!sout && t < timeout) begin @(posedge clk); t++; end
    if (!sout) return;
    ack = 1;
    while (sout) begin @(posedge clk); obt++; end
    // now at the first data bit start (falling edge)
    for (int i = 0; i < nbits; i++) begin
      repeat (obt / 8) @(posedge clk);
      a = sout;
      repeat (obt * 7 / 8 - obt / 8) @(posedge clk);
      b = sout;
      data = {data[8:0], a ^ b};
      repeat (obt - obt * 7 / 8) @(posedge clk);
    end
  endtask
endmodule
