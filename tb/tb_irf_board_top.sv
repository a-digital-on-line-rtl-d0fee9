// tb_irf_board_top: end-to-end test of the board design at its default
// parameters (48 MHz clock, 3 MBd UART, 3 MHz SPI, even parity, two-tap
// monitors with 50 ns delay elements).
//
// Both links run through an RC line model whose series resistance the
// testbench raises part-way through a frame, the way an intermittent
// resistive fault would. A JTAG host model then runs the monitors' access
// procedure: poll the Warning bits with all SIBs closed, open the SIB of a
// warning monitor, read Out while writing Ack = 1, write Ack = 0, close
// the SIB. Expected outcomes follow from the line delay (about 0.139 ns per
// ohm) against the half-bit margin (167 ns) and the 100 ns detection
// window:
//   200 ohm  ( 28 ns) : no warning, correct data
//   650 ohm  ( 90 ns) : warning, only the far tap (Q2) differs, correct data
//  1000 ohm  (139 ns) : warning, both taps differ, correct data
//  2000 ohm  (277 ns) : warning and wrong data
//  2500 ohm on the stop bit : frame error; the edge lands after the
//                             capture edge, so it is a bit error and
//                             not a timing warning
// Also: a disabled monitor raises nothing; Ack clears a warning; clean
// back-to-back traffic passes with no flag. Each mechanism is counted and
// one that never happened is a failure.
module tb_irf_board_top;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam realtime BIT = 333.333ns;

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

  // mechanism counters
  int n_clean = 0, n_warn_u = 0, n_warn_s = 0, n_quiet = 0, n_sev1 = 0, n_sev2 = 0;
  int n_logic_err = 0, n_parity_err = 0, n_frame_err = 0, n_disabled = 0;
  int n_ack_clear = 0, n_sib_open = 0;

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
    n_sib_open++;
    net_scan(sib, sib, w, o, a);              // read Out, Ack = 1
    outv_m = o[m];
    check(a[m] == 1'b0, "Ack read as 0 before the write");
    check(mon_warning[m] == 1'b0, "Ack cleared the warning");
    if (mon_warning[m] == 1'b0) n_ack_clear++;
    net_scan(sib, 2'b00, w, o, a);            // Ack = 0
    net_scan(2'b00, 2'b00, w, o, a);          // close SIB
  endtask

  task automatic poll(output logic [1:0] w);
    logic [1:0] a;
    logic [1:0][1:0] o;
    net_scan(2'b00, 2'b00, w, o, a);
  endtask

  // ------------------------------------------------------------------
  // links
  logic [7:0] u_data, s_data;
  logic       u_perr, u_ferr, s_perr, s_ferr;
  always @(posedge clk) if (uart_rx_valid) begin
    u_data = uart_rx_data; u_perr = uart_rx_parity_err; u_ferr = uart_rx_frame_err;
  end
  always @(posedge clk) if (spi_rx_valid) begin
    s_data = spi_rx_data; s_perr = spi_rx_parity_err; s_ferr = spi_rx_frame_err;
  end

  // send one UART byte; from bit `fb` on (0 = start bit) the line has r ohm
  task automatic uart_frame(logic [7:0] v, int r, int fb);
    wait (uart_tx_ready);
    @(negedge clk);
    uart_tx_data = v; uart_tx_valid = 1'b1;
    @(posedge clk); #1 uart_tx_valid = 1'b0;
    fork
      begin
        #((fb - 0.5) * BIT);
        r_uart = r;
      end
    join_none
    @(posedge uart_rx_valid);
    @(posedge clk); #1;
    r_uart = 1;
    #(2 * BIT);
  endtask

  task automatic spi_frame(logic [7:0] v, int r, int fb);
    wait (spi_tx_ready);
    @(negedge clk);
    spi_tx_data = v; spi_tx_valid = 1'b1;
    @(posedge clk); #1 spi_tx_valid = 1'b0;
    fork
      begin
        #((fb - 0.5) * BIT);
        r_spi = r;
      end
    join_none
    @(posedge spi_rx_valid);
    @(posedge clk); #1;
    r_spi = 1;
    #(2 * BIT);
  endtask

  // one faulted frame on link m, then the host's procedure
  task automatic faulted(int m, int r, int fb, logic [7:0] v, bit expect_warn,
                         int expect_sev, bit expect_ok, bit expect_ferr);
    logic [1:0] w, o;
    if (m == 0) uart_frame(v, r, fb);
    else        spi_frame(v, r, fb);
    poll(w);
    check(w[m] == expect_warn, $sformatf("warning on link %0d at %0d ohm", m, r));
    check(w[1-m] == 1'b0, "no warning on the other link");
    if (w[m]) begin
      if (m == 0) n_warn_u++; else n_warn_s++;
      service(m, o);
      if (expect_sev == 1) begin
        check(o[0] != o[1], "only the far tap violated");
        if (o[0] != o[1]) n_sev1++;
      end else if (expect_sev == 2) begin
        check(o[0] == o[1], "both taps violated");
        if (o[0] == o[1]) n_sev2++;
      end
    end else n_quiet++;
    if (m == 0) begin
      if (expect_ok) check(u_data == v && !u_perr && !u_ferr, "UART byte intact");
      if (expect_ferr) begin
        check(u_ferr, "UART frame error");
        if (u_ferr) n_frame_err++;
      end
      if (!expect_ok && !expect_ferr) begin
        check(u_data != v || u_perr, "UART logic error");
        if (u_data != v) n_logic_err++;
        if (u_perr) n_parity_err++;
      end
    end else begin
      if (expect_ok) check(s_data == v && !s_perr && !s_ferr, "SPI byte intact");
      if (!expect_ok) begin
        check(s_data != v || s_perr, "SPI logic error");
        if (s_data != v) n_logic_err++;
        if (s_perr) n_parity_err++;
      end
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
    logic [31:0] r;
    logic [1:0]  w;
    #10 trst_n = 1'b0;
    #100 trst_n = 1'b1;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // to Run-Test/Idle, then load the IJTAG access instruction
    begin
      logic o;
      clk1(0, 0, o);
    end
    scan(1, 32'b1000, 4, r);
    check(r[3:0] == 4'b0001, "IR capture");
    poll(w);
    check(w == 2'b00, "no warning after reset");

    // clean traffic, back to back, both links at once
    fork
      for (int i = 0; i < 8; i++) begin
        logic [7:0] v;
        v = 8'($urandom);
        wait (uart_tx_ready);
        @(negedge clk);
        uart_tx_data = v; uart_tx_valid = 1'b1;
        @(posedge clk); #1 uart_tx_valid = 1'b0;
        @(posedge uart_rx_valid); @(posedge clk); #1;
        check(u_data == v && !u_perr && !u_ferr, "clean UART byte");
        n_clean++;
      end
      for (int i = 0; i < 8; i++) begin
        logic [7:0] v;
        v = 8'($urandom);
        wait (spi_tx_ready);
        @(negedge clk);
        spi_tx_data = v; spi_tx_valid = 1'b1;
        @(posedge clk); #1 spi_tx_valid = 1'b0;
        @(posedge spi_rx_valid); @(posedge clk); #1;
        check(s_data == v && !s_perr && !s_ferr, "clean SPI byte");
        n_clean++;
      end
    join
    poll(w);
    check(w == 2'b00, "no warning on clean traffic");

    //          link  ohm  bit  data   warn sev ok  ferr
    faulted(0,  200,  3, 8'h55, 0,   0,  1,  0);
    faulted(0,  650,  3, 8'h55, 1,   1,  1,  0);
    faulted(0, 1000,  3, 8'h55, 1,   2,  1,  0);
    faulted(0, 2000,  3, 8'h55, 1,   2,  0,  0);
    faulted(0, 2500, 10, 8'h55, 0,   0,  0,  1);
    faulted(1,  200,  3, 8'h55, 0,   0,  1,  0);
    faulted(1,  650,  3, 8'h55, 1,   1,  1,  0);
    faulted(1, 1000,  3, 8'h55, 1,   2,  1,  0);
    faulted(1, 2000,  3, 8'h55, 1,   2,  0,  0);

    // a disabled monitor does not react
    mon_enable = 2'b10;
    uart_frame(8'h55, 1000, 3);
    poll(w);
    check(w == 2'b00 && mon_warning == 2'b00, "disabled monitor stays quiet");
    if (w == 2'b00) n_disabled++;
    mon_enable = 2'b11;
    faulted(0, 1000, 3, 8'h55, 1, 2, 1, 0);

    $display("clean=%0d warn_uart=%0d warn_spi=%0d quiet=%0d sev1=%0d sev2=%0d",
             n_clean, n_warn_u, n_warn_s, n_quiet, n_sev1, n_sev2);
    $display("logic_err=%0d parity_err=%0d frame_err=%0d disabled=%0d ack_clear=%0d sib_open=%0d",
             n_logic_err, n_parity_err, n_frame_err, n_disabled, n_ack_clear, n_sib_open);
    check(n_clean > 0, "clean traffic happened");
    check(n_warn_u > 0 && n_warn_s > 0, "warnings on both links");
    check(n_quiet > 0, "small resistance left unflagged");
    check(n_sev1 > 0 && n_sev2 > 0, "both violation degrees seen");
    check(n_logic_err > 0, "logic errors happened");
    check(n_parity_err > 0, "parity errors happened");
    check(n_frame_err > 0, "frame errors happened");
    check(n_disabled > 0, "disabled monitor exercised");
    check(n_ack_clear > 0 && n_sib_open > 0, "Ack and SIB exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
