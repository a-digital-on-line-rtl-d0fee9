// tb_measured_examples: replays the two measured fault examples of the
// design description on the full board design at its default parameters
// (48 MHz clock, 3 MBd UART, 3 MHz SPI, even parity, two-tap monitors with
// 50 ns delay elements), with both lines running through the RC line model.
//
// UART example: the bit stream 10101100 (data bits in the order sent, so
// the byte is 8'h35; parity 0) is sent once while a burst of three
// resistance pulses hits the line. Times are counted from the falling edge
// of the start bit:
//   460 ohm, 1.80-2.60 us : covers the d5 -> d6 edge (1 -> 0 at 2.33 us);
//                           64 ns of delay is not inside the 100 ns window
//                           before the mid-bit sample, so no warning;
//   535 ohm, 3.20-3.75 us : covers the parity -> stop edge (0 -> 1 at
//                           3.33 us); 74 ns of delay is, so Warning rises
//                           at the falling capture-clock edge of that bit;
//  1720 ohm, 4.00-4.60 us : the line is idle high, no edge, no effect.
// The byte must arrive intact with no parity or frame error, and the host
// must read a mild violation: Out = {Q2, Q1} = 01, only the far tap Q2
// still holds the old value 0.
//
// SPI example: one 580 ohm pulse of 0.56 us on MOSI covering one 1 -> 0
// data edge (byte 8'hCB, edge from bit 3 to bit 4). 80 ns of delay against
// the 167 ns half period: Warning, intact byte, Out = 10 (Q2 still 1).
//
// The testbench also checks, from the transmitted waveform itself, that
// each pulse covers exactly the edges described above. The pulse times of
// the UART burst are those given for the measurement; the third pulse's
// time, the SPI byte and the SPI pulse position are this testbench's
// choices.
module tb_measured_examples;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] uart_tx_data = '0, spi_tx_data = '0;
  logic uart_tx_valid = 1'b0, spi_tx_valid = 1'b0;
  logic uart_tx_ready, uart_txd, uart_rxd, uart_rx_busy, uart_rx_valid;
  logic uart_rx_parity_err, uart_rx_frame_err;
  logic [7:0] uart_rx_data, spi_rx_data;
  logic spi_tx_ready, spi_sclk_o, spi_cs_n_o, spi_mosi_o, spi_mosi_i;
  logic spi_rx_busy, spi_rx_valid, spi_rx_parity_err, spi_rx_frame_err;
  logic [1:0] mon_enable = 2'b11, mon_warning;
  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1, tdo, tdo_en;
  int r_uart = 1, r_spi = 1;
  int checks = 0, failures = 0;

  always #10.4167ns clk = ~clk;   // 48 MHz

  irf_line_model line_u (.in(uart_txd),   .r_ohm(r_uart), .out(uart_rxd));
  irf_line_model line_s (.in(spi_mosi_o), .r_ohm(r_spi),  .out(spi_mosi_i));

  irf_board_top dut (
    .clk(clk), .rst_n(rst_n),
    .uart_tx_data(uart_tx_data), .uart_tx_valid(uart_tx_valid),
    .uart_tx_ready(uart_tx_ready), .uart_txd(uart_txd),
    .uart_rxd(uart_rxd), .uart_rx_busy(uart_rx_busy),
    .uart_rx_data(uart_rx_data), .uart_rx_valid(uart_rx_valid),
    .uart_rx_parity_err(uart_rx_parity_err), .uart_rx_frame_err(uart_rx_frame_err),
    .spi_tx_data(spi_tx_data), .spi_tx_valid(spi_tx_valid),
    .spi_tx_ready(spi_tx_ready), .spi_sclk_o(spi_sclk_o),
    .spi_cs_n_o(spi_cs_n_o), .spi_mosi_o(spi_mosi_o),
    .spi_sclk_i(spi_sclk_o), .spi_cs_n_i(spi_cs_n_o), .spi_mosi_i(spi_mosi_i),
    .spi_rx_busy(spi_rx_busy), .spi_rx_data(spi_rx_data),
    .spi_rx_valid(spi_rx_valid), .spi_rx_parity_err(spi_rx_parity_err),
    .spi_rx_frame_err(spi_rx_frame_err),
    .mon_enable(mon_enable), .mon_warning(mon_warning),
    .tck(tck), .tms(tms), .tdi(tdi), .trst_n(trst_n), .tdo(tdo), .tdo_en(tdo_en)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  // ------------------------------------------------------------------
  // JTAG host (TCK = 10 MHz)
  task automatic clk1(logic m, logic i, output logic o);
    tms = m; tdi = i;
    #25 o = tdo;
    tck = 1'b1;
    #50 tck = 1'b0;
    #25;
  endtask

  task automatic scan(bit ir, input logic [31:0] din, input int n, output logic [31:0] dout);
    logic o;
    dout = '0;
    clk1(1, 0, o);
    if (ir) clk1(1, 0, o);
    clk1(0, 0, o);
    clk1(0, 0, o);
    for (int i = 0; i < n; i++) begin
      clk1(i == n - 1, din[i], o);
      dout[i] = o;
    end
    clk1(1, 0, o);
    clk1(0, 0, o);
  endtask

  // Network scan with the given SIBs open. Monitor 1 is nearest TDO. Per
  // monitor, from the TDO side: SIB, then Warning (closed) or Ack, Out[1],
  // Out[0] (open). Writes sib_nx / ack_nx, returns what was captured.
  logic [1:0] sib_open = 2'b00;
  task automatic net_scan(input logic [1:0] sib_nx, input logic [1:0] ack_nx,
                          output logic [1:0] warn, output logic [1:0][1:0] outv,
                          output logic [1:0] ackv);
    logic [31:0] din, dout;
    int p, n;
    din = '0; p = 0;
    for (int m = 1; m >= 0; m--) begin
      din[p] = sib_nx[m];
      if (sib_open[m]) begin
        din[p+1] = ack_nx[m];
        p += 4;
      end else p += 2;
    end
    n = p;
    scan(0, din, n, dout);
    p = 0; warn = '0; outv = '0; ackv = '0;
    for (int m = 1; m >= 0; m--) begin
      if (sib_open[m]) begin
        ackv[m]    = dout[p+1];
        outv[m][1] = dout[p+2];
        outv[m][0] = dout[p+3];
        p += 4;
      end else begin
        warn[m] = dout[p+1];
        p += 2;
      end
    end
    sib_open = sib_nx;
  endtask

  // access procedure for one monitor: returns the captured Out pattern
  task automatic service(int m, output logic [1:0] outv_m);
    logic [1:0] w, a, sib;
    logic [1:0][1:0] o;
    sib = '0; sib[m] = 1'b1;
    net_scan(sib, 2'b00, w, o, a);            // open SIB
    net_scan(sib, sib, w, o, a);              // read Out, Ack = 1
    outv_m = o[m];
    check(a[m] == 1'b0, "Ack read as 0 before the write");
    check(mon_warning[m] == 1'b0, "Ack cleared the warning");
    net_scan(sib, 2'b00, w, o, a);            // Ack = 0
    net_scan(2'b00, 2'b00, w, o, a);          // close SIB
  endtask

  task automatic poll(output logic [1:0] w);
    logic [1:0] a;
    logic [1:0][1:0] o;
    net_scan(2'b00, 2'b00, w, o, a);
  endtask


  // ------------------------------------------------------------------
  // received bytes
  logic [7:0] u_data, s_data;
  logic       u_perr, u_ferr, s_perr, s_ferr;
  int         n_urx = 0, n_srx = 0;
  always @(posedge clk) if (uart_rx_valid) begin
    u_data = uart_rx_data; u_perr = uart_rx_parity_err; u_ferr = uart_rx_frame_err;
    n_urx++;
  end
  always @(posedge clk) if (spi_rx_valid) begin
    s_data = spi_rx_data; s_perr = spi_rx_parity_err; s_ferr = spi_rx_frame_err;
    n_srx++;
  end

  // edges of the transmitted lines inside the current pulse
  bit in_pulse_u = 0, in_pulse_s = 0;
  int edges_u = 0, edges_u_fall = 0, edges_s = 0, edges_s_fall = 0;
  always @(uart_txd) if (in_pulse_u) begin
    edges_u++;
    if (!uart_txd) edges_u_fall++;
  end
  always @(spi_mosi_o) if (in_pulse_s && !spi_cs_n_o) begin
    edges_s++;
    if (!spi_mosi_o) edges_s_fall++;
  end

  realtime t_fall;
  always @(negedge uart_txd) t_fall = $realtime;

  // one resistance pulse on the UART line, t0-relative times in ns
  task automatic uart_pulse(realtime t0, realtime ts, realtime te, int r);
    #(t0 + ts - $realtime);
    edges_u = 0; edges_u_fall = 0;
    in_pulse_u = 1; r_uart = r;
    #(te - ts);
    in_pulse_u = 0; r_uart = 1;
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic [1:0]  w, o;
    realtime     t0;
    int          n0;
    #10 trst_n = 1'b0;
    #100 trst_n = 1'b1;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    begin
      logic b;
      clk1(0, 0, b);
    end
    scan(1, 32'b1000, 4, r);
    poll(w);
    check(w == 2'b00, "no warning after reset");

    // ---------------- UART example ----------------
    n0 = n_urx;
    @(negedge clk);
    uart_tx_data = 8'h35; uart_tx_valid = 1'b1;
    @(posedge clk); #1 uart_tx_valid = 1'b0;
    if (uart_txd) @(negedge uart_txd);
    t0 = t_fall;
    uart_pulse(t0, 1800, 2600, 460);
    check(edges_u == 1 && edges_u_fall == 1, "460 ohm pulse covers one falling edge");
    check(mon_warning[0] == 1'b0, "460 ohm: no warning");
    uart_pulse(t0, 3200, 3750, 535);
    check(edges_u == 1 && edges_u_fall == 0, "535 ohm pulse covers one rising edge");
    check(mon_warning[0] == 1'b1, "535 ohm: warning raised");
    uart_pulse(t0, 4000, 4600, 1720);
    check(edges_u == 0, "1720 ohm pulse covers no edge");
    #1us;
    check(n_urx == n0 + 1, "one UART byte received");
    check(u_data == 8'h35 && !u_perr && !u_ferr, "UART byte intact, no parity or frame error");
    poll(w);
    check(w == 2'b01, "host sees the UART warning only");
    service(0, o);
    check(o == 2'b01, "UART: mild violation (Out = 01)");
    poll(w);
    check(w == 2'b00, "UART monitor re-armed");

    // ---------------- SPI example ----------------
    n0 = n_srx;
    @(negedge clk);
    spi_tx_data = 8'hCB; spi_tx_valid = 1'b1;
    @(posedge clk); #1 spi_tx_valid = 1'b0;
    repeat (4) @(posedge spi_sclk_o);     // sampling edge of bit 3
    #100;                                 // bit 4 is driven 67 ns later
    edges_s = 0; edges_s_fall = 0;
    in_pulse_s = 1; r_spi = 580;
    #560;
    in_pulse_s = 0; r_spi = 1;
    check(edges_s == 1 && edges_s_fall == 1, "580 ohm pulse covers one falling edge");
    check(mon_warning[1] == 1'b1, "580 ohm: warning raised during the pulse");
    @(posedge spi_rx_valid); @(posedge clk); #1;
    check(n_srx == n0 + 1, "one SPI byte received");
    check(s_data == 8'hCB && !s_perr && !s_ferr, "SPI byte intact, no parity or frame error");
    poll(w);
    check(w == 2'b10, "host sees the SPI warning only");
    service(1, o);
    check(o == 2'b10, "SPI: mild violation (Out = 10)");
    poll(w);
    check(w == 2'b00, "SPI monitor re-armed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
