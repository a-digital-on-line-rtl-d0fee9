// tb_uart_rx: the testbench serialises frames itself (start, 8 data bits
// LSB first, even parity, two stop bits, 16 clock cycles per bit) and
// sometimes flips one payload bit or clears a stop bit. Checks: decoded
// byte, parity and frame error flags, one rx_valid per frame, eleven rising
// edges of the capture clock per frame (payload and stop bits, none for the
// start bit), and that the captured bit equals the bit on the line at each
// of them.
module tb_uart_rx;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int CPB = 16;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic cap_clk, cap_q, busy, parity_err, frame_err, rx_valid;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int n_cap = 0, n_valid = 0, n_perr = 0, n_ferr = 0;
  logic [11:0] cur_frame;
  int cur_bit;

  always #10 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB), .CODE(CODE_PARITY)) dut (
    .clk(clk), .rst_n(rst_n), .rxd(rxd), .cap_clk(cap_clk), .cap_q(cap_q),
    .busy(busy), .data(data), .parity_err(parity_err), .frame_err(frame_err),
    .rx_valid(rx_valid));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge cap_clk) begin
    #1;
    n_cap++;
    check(cap_q == rxd, "captured bit equals line");
  end

  always @(posedge clk) if (rx_valid) n_valid++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      logic [7:0]  v;
      logic [11:0] f;
      int kind, caps0, valid0;
      v = 8'($urandom);
      f = {2'b11, ^v, v, 1'b0};
      kind = (t < 10) ? 0 : $urandom_range(0, 3);
      if (kind == 1) f[$urandom_range(1, 9)] ^= 1'b1;   // payload bit flip
      if (kind == 2) f[$urandom_range(10, 11)] = 1'b0;  // broken stop bit
      caps0 = n_cap; valid0 = n_valid;
      for (int b = 0; b < 12; b++) begin
        rxd = f[b];
        repeat (CPB) @(posedge clk);
      end
      rxd = 1'b1;
      repeat (2 * CPB) @(posedge clk);
      check(n_valid == valid0 + 1, "one rx_valid per frame");
      check(n_cap == caps0 + 11, "eleven capture clocks per frame");
      check(data == f[8:1], "received byte");
      check(parity_err == ^f[9:1], "parity error flag");
      check(frame_err == !(f[10] && f[11]), "frame error flag");
      check(!busy, "idle after frame");
      if (parity_err) n_perr++;
      if (frame_err) n_ferr++;
    end
    check(n_perr > 0 && n_ferr > 0, "error flags exercised");
    $display("parity errors=%0d frame errors=%0d", n_perr, n_ferr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
