// tb_uart_tx: sends random bytes through a parity and a Hamming transmitter
// and records the line every clock cycle after each handshake. In the
// middle of every bit period the line must show start (0), the expected
// payload bits LSB first, and two stop bits (1). The payload is built here
// from a bit count (parity) and from a table-free Hamming encoder. Also
// checks the frame time: ready returns exactly (1 + len + 2) * 16 cycles
// after the handshake (192 cycles for parity, 272 for Hamming).
module tb_uart_tx;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int CPB = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] data = '0;
  logic valid = 1'b0;
  logic ready_p, ready_h, txd_p, txd_h;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB), .CODE(CODE_PARITY)) dut_p (
    .clk(clk), .rst_n(rst_n), .data(data), .valid(valid), .ready(ready_p), .txd(txd_p));
  uart_tx #(.CLKS_PER_BIT(CPB), .CODE(CODE_HAMMING)) dut_h (
    .clk(clk), .rst_n(rst_n), .data(data), .valid(valid), .ready(ready_h), .txd(txd_h));

  function automatic logic [6:0] ham(logic [3:0] d);
    // parity bits at positions 1, 2, 4 cover the positions whose index has
    // that bit set
    logic [7:1] c;
    c = '0;
    c[3] = d[0]; c[5] = d[1]; c[6] = d[2]; c[7] = d[3];
    c[1] = c[3] ^ c[5] ^ c[7];
    c[2] = c[3] ^ c[6] ^ c[7];
    c[4] = c[5] ^ c[6] ^ c[7];
    return c;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s data=%02h at %t", what, data, $realtime);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] exp_p, exp_h;
    logic        line_p [0:299];
    logic        line_h [0:299];
    int          rdy_p, rdy_h;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(txd_p == 1'b1 && txd_h == 1'b1, "idle high");
    for (int t = 0; t < 40; t++) begin
      logic [7:0] v;
      v = (t == 0) ? 8'b0011_0101 : 8'($urandom);
      @(negedge clk);
      data = v; valid = 1'b1;
      @(posedge clk);                     // handshake edge
      #1 valid = 1'b0;
      rdy_p = -1; rdy_h = -1;
      for (int c = 0; c < 300; c++) begin
        @(posedge clk); #1;
        line_p[c] = txd_p; line_h[c] = txd_h;
        if (ready_p && rdy_p < 0) rdy_p = c + 1;
        if (ready_h && rdy_h < 0) rdy_h = c + 1;
      end
      // expected line, bit 0 first
      exp_p = {5'b11111, 2'b11, ^v, v, 1'b0};
      exp_h = {2'b11, ham(v[7:4]), ham(v[3:0]), 1'b0};
      for (int b = 0; b < 12; b++)
        check(line_p[b*CPB + CPB/2 - 1] == exp_p[b], "parity frame bit");
      for (int b = 0; b < 17; b++)
        check(line_h[b*CPB + CPB/2 - 1] == exp_h[b], "hamming frame bit");
      check(rdy_p == 12 * CPB, "parity frame time");
      check(rdy_h == 17 * CPB, "hamming frame time");
      check(line_p[12*CPB + 4] == 1'b1, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
