// tb_fault_campaign: statistical fault-injection run on both links, once
// with even-parity frames and once with Hamming (7,4) frames.
//
// Two boards (one per code) sit in one JTAG chain (TDI -> board 0 ->
// board 1 -> TDO). Each of the four lines (UART and SPI MOSI of each board)
// passes through an RC line model. Every round, each line gets one
// injection drawn from these uniform ranges: start 0.1-2.0 us, burst of
// 1-5 pulses of 1-2500 ohm, each active 0.2-1.5 us and followed by
// 0.2-1.0 us at 1 ohm, then a safe time of 1-20 us. Random bytes flow on
// all links the whole time; each byte is compared with what was sent.
// After a round the host polls the Warning bits through JTAG and
// acknowledges every warning.
//
// Per line and injection it records: a logic error (a byte received
// wrong), a parity error, a frame error, a warning; and from those
// "detected" (logic error with a parity or frame flag), "undetected"
// (logic error with neither) and "only warning" (warning, no logic error,
// no flag). Checks: injections whose pulses all stay below 300 ohm cause
// neither warning nor error; warnings and only-warnings occur; Hamming
// frames detect a larger share of the logic errors than parity frames;
// the JTAG poll agrees with the warning pins.
module tb_fault_campaign;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int N_INJ = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10.4167ns clk = ~clk;

  // per board b (0 = parity, 1 = Hamming), per link l (0 = UART, 1 = SPI)
  logic [7:0] utx_d [2], stx_d [2];
  logic utx_v [2], stx_v [2], utx_r [2], stx_r [2];
  logic txd [2], rxd [2], sclk [2], csn [2], mosi_o [2], mosi_i [2];
  logic [7:0] urx_d [2], srx_d [2];
  logic urx_v [2], urx_pe [2], urx_fe [2], urx_busy [2];
  logic srx_v [2], srx_pe [2], srx_fe [2], srx_busy [2];
  logic [1:0] warn [2];
  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1;
  logic tdo [2], tdo_en [2];
  int   r_ohm [2][2];

  int checks = 0, failures = 0;

  // statistics [board][link]
  int s_inj [2][2], s_err [2][2], s_perr [2][2], s_ferr [2][2], s_det [2][2];
  int s_undet [2][2], s_warn [2][2], s_only [2][2], s_small [2][2];
  // flags of the current injection
  bit f_err [2][2], f_perr [2][2], f_ferr [2][2];
  // bytes sent before the current injection round started are not counted
  realtime win_start = 0;

  for (genvar b = 0; b < 2; b++) begin : g_board
    irf_line_model lu (.in(txd[b]),    .r_ohm(r_ohm[b][0]), .out(rxd[b]));
    irf_line_model ls (.in(mosi_o[b]), .r_ohm(r_ohm[b][1]), .out(mosi_i[b]));
    irf_board_top #(.CODE(b == 0 ? CODE_PARITY : CODE_HAMMING)) dut (
      .clk(clk), .rst_n(rst_n),
      .uart_tx_data(utx_d[b]), .uart_tx_valid(utx_v[b]), .uart_tx_ready(utx_r[b]),
      .uart_txd(txd[b]), .uart_rxd(rxd[b]), .uart_rx_busy(urx_busy[b]),
      .uart_rx_data(urx_d[b]), .uart_rx_valid(urx_v[b]),
      .uart_rx_parity_err(urx_pe[b]), .uart_rx_frame_err(urx_fe[b]),
      .spi_tx_data(stx_d[b]), .spi_tx_valid(stx_v[b]), .spi_tx_ready(stx_r[b]),
      .spi_sclk_o(sclk[b]), .spi_cs_n_o(csn[b]), .spi_mosi_o(mosi_o[b]),
      .spi_sclk_i(sclk[b]), .spi_cs_n_i(csn[b]), .spi_mosi_i(mosi_i[b]),
      .spi_rx_busy(srx_busy[b]), .spi_rx_data(srx_d[b]), .spi_rx_valid(srx_v[b]),
      .spi_rx_parity_err(srx_pe[b]), .spi_rx_frame_err(srx_fe[b]),
      .mon_enable(2'b11), .mon_warning(warn[b]),
      .tck(tck), .tms(tms), .tdi(b == 0 ? tdi : tdo[0]), .trst_n(trst_n),
      .tdo(tdo[b]), .tdo_en(tdo_en[b]));

    // UART traffic: one byte at a time, compared on arrival
    initial begin
      utx_v[b] = 1'b0; utx_d[b] = '0;
      wait (rst_n);
      forever begin
        logic [7:0] v;
        bit got;
        realtime t0;
        v = 8'($urandom);
        t0 = $realtime;
        @(negedge clk);
        utx_d[b] = v; utx_v[b] = 1'b1;
        @(posedge clk); #1 utx_v[b] = 1'b0;
        got = 0;
        fork
          begin @(posedge urx_v[b]); got = 1; end
          #(6us);
        join_any
        disable fork;
        @(posedge clk); #1;
        if (t0 < win_start) begin
          // straddles two rounds: not counted
        end else if (!got) begin
          f_err[b][0] = 1; f_ferr[b][0] = 1;
        end else begin
          if (urx_d[b] != v) f_err[b][0] = 1;
          if (urx_pe[b]) f_perr[b][0] = 1;
          if (urx_fe[b]) f_ferr[b][0] = 1;
        end
        wait (!urx_busy[b] && utx_r[b]);
        #(400ns);
      end
    end

    // SPI traffic
    initial begin
      stx_v[b] = 1'b0; stx_d[b] = '0;
      wait (rst_n);
      forever begin
        logic [7:0] v;
        realtime t0;
        v = 8'($urandom);
        t0 = $realtime;
        @(negedge clk);
        stx_d[b] = v; stx_v[b] = 1'b1;
        @(posedge clk); #1 stx_v[b] = 1'b0;
        @(posedge srx_v[b]);
        @(posedge clk); #1;
        if (t0 >= win_start) begin
          if (srx_d[b] != v) f_err[b][1] = 1;
          if (srx_pe[b]) f_perr[b][1] = 1;
          if (srx_fe[b]) f_ferr[b][1] = 1;
        end
        wait (stx_r[b]);
      end
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  // ---------------- JTAG host ----------------
  task automatic clk1(logic m, logic i, output logic o);
    tms = m; tdi = i;
    #25 o = tdo[1];
    tck = 1'b1;
    #50 tck = 1'b0;
    #25;
  endtask

  task automatic scan(bit ir, input logic [63:0] din, input int n, output logic [63:0] dout);
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

  // monitors from the TDO side: board 1 mon 1, board 1 mon 0, board 0 mon 1, board 0 mon 0
  logic [3:0] sib_open = '0;
  task automatic net_scan(input logic [3:0] sib_nx, input logic [3:0] ack_nx,
                          output logic [3:0] w);
    logic [63:0] din, dout;
    int p;
    din = '0; p = 0; w = '0;
    for (int k = 3; k >= 0; k--) begin
      din[p] = sib_nx[k];
      if (sib_open[k]) begin din[p+1] = ack_nx[k]; p += 4; end
      else p += 2;
    end
    scan(0, din, p, dout);
    p = 0;
    for (int k = 3; k >= 0; k--) begin
      if (sib_open[k]) p += 4;
      else begin w[k] = dout[p+1]; p += 2; end
    end
    sib_open = sib_nx;
  endtask

  // ---------------- injections ----------------
  task automatic inject(int b, int l, output int rmax);
    int n;
    rmax = 1;
    #($urandom_range(100, 2000) * 1ns);
    n = $urandom_range(1, 5);
    for (int i = 0; i < n; i++) begin
      int r;
      r = $urandom_range(1, 2500);
      if (r > rmax) rmax = r;
      r_ohm[b][l] = r;
      #($urandom_range(200, 1500) * 1ns);
      r_ohm[b][l] = 1;
      #($urandom_range(200, 1000) * 1ns);
    end
    #($urandom_range(1000, 20000) * 1ns);
  endtask

  initial begin
    #900ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r;
    logic [3:0] w, pins;
    logic o;
    foreach (r_ohm[i, j]) r_ohm[i][j] = 1;
    #10 trst_n = 1'b0;
    #100 trst_n = 1'b1;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    clk1(0, 0, o);
    scan(1, 64'h88, 8, r);                  // IJTAG instruction in both TAPs
    check(r[7:0] == 8'h11, "both TAPs capture 0001");
    #(10us);
    for (int t = 0; t < N_INJ; t++) begin
      int rmax [2][2];
      foreach (f_err[i, j]) begin f_err[i][j] = 0; f_perr[i][j] = 0; f_ferr[i][j] = 0; end
      win_start = $realtime;
      fork
        inject(0, 0, rmax[0][0]);
        inject(0, 1, rmax[0][1]);
        inject(1, 0, rmax[1][0]);
        inject(1, 1, rmax[1][1]);
      join
      pins = {warn[1], warn[0]};
      net_scan(4'b0000, 4'b0000, w);
      check(w == pins, "JTAG poll matches the warning pins");
      for (int b = 0; b < 2; b++)
        for (int l = 0; l < 2; l++) begin
          bit wn, det;
          wn  = w[2*b + l];
          det = f_perr[b][l] || f_ferr[b][l];
          s_inj[b][l]++;
          if (f_err[b][l]) s_err[b][l]++;
          if (f_perr[b][l]) s_perr[b][l]++;
          if (f_ferr[b][l]) s_ferr[b][l]++;
          if (f_err[b][l] && det) s_det[b][l]++;
          if (f_err[b][l] && !det) s_undet[b][l]++;
          if (wn) s_warn[b][l]++;
          if (wn && !f_err[b][l] && !det) s_only[b][l]++;
          if (rmax[b][l] < 300) begin
            s_small[b][l]++;
            check(!wn && !f_err[b][l] && !det, "no effect below 300 ohm");
            if (wn || f_err[b][l] || det)
              $display("  board %0d link %0d rmax=%0d warn=%b err=%b perr=%b ferr=%b",
                       b, l, rmax[b][l], wn, f_err[b][l], f_perr[b][l], f_ferr[b][l]);
          end
        end
      // acknowledge every warning: open SIBs, Ack = 1, Ack = 0, close
      if (w != '0) begin
        net_scan(w, 4'b0000, pins);
        net_scan(w, w, pins);
        check({warn[1], warn[0]} == 4'b0000, "Ack cleared all warnings");
        net_scan(w, 4'b0000, pins);
        net_scan(4'b0000, 4'b0000, pins);
      end
    end
    for (int b = 0; b < 2; b++)
      for (int l = 0; l < 2; l++)
        $display("%s %-4s inj=%0d total_err=%0d frame_err=%0d parity_err=%0d detected=%0d undetected=%0d warn=%0d only_warn=%0d below300=%0d",
                 b == 0 ? "parity " : "hamming", l == 0 ? "UART" : "SPI", s_inj[b][l], s_err[b][l],
                 s_ferr[b][l], s_perr[b][l], s_det[b][l], s_undet[b][l], s_warn[b][l],
                 s_only[b][l], s_small[b][l]);
    for (int b = 0; b < 2; b++)
      for (int l = 0; l < 2; l++) begin
        check(s_warn[b][l] > 0, "warnings occurred");
        check(s_only[b][l] > 0, "warnings without logic errors occurred");
        check(s_err[b][l] > 0, "logic errors occurred");
        check(s_small[b][l] > 0, "small-resistance injections occurred");
      end
    for (int l = 0; l < 2; l++)
      check(s_det[1][l] * s_err[0][l] >= s_det[0][l] * s_err[1][l],
            "Hamming detects a larger share of logic errors than parity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
