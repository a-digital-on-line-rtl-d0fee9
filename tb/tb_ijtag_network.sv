// tb_ijtag_network: two wrapped monitors in one network, IJTAG controls
// driven directly. Checks the path length with both SIBs closed (4 bits),
// with the SIB of monitor 1 open (6 bits) and with both open (8 bits);
// that a warning on monitor 1 shows at its position in the poll and not at
// monitor 0's; and that Ack reaches only the monitor it is written to.
module tb_ijtag_network;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic        tck = 1'b0, si = 1'b0, so;
  ijtag_ctrl_t ctrl = '0;
  logic [1:0]  mon_clk = '0, mon_enable = 2'b11, q0 = '0, warning, ack;
  logic [1:0][2:1] d = '0;
  logic [1:0][1:0] out;
  int checks = 0, failures = 0;

  ijtag_network #(.N_MON(2), .TAPS(2)) dut (
    .tck(tck), .si(si), .ctrl(ctrl), .so(so), .mon_clk(mon_clk),
    .mon_enable(mon_enable), .q0(q0), .d(d), .warning(warning), .out(out),
    .ack(ack));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  task automatic tck_cycle();
    #50 tck = 1'b1;
    #50 tck = 1'b0;
  endtask

  task automatic scan(input logic [15:0] din, input int n, output logic [15:0] dout,
                      input bit do_capture = 1, input bit do_update = 1);
    dout = '0;
    ctrl.sel = 1'b1;
    if (do_capture) begin
      ctrl.ce = 1'b1; tck_cycle(); ctrl.ce = 1'b0;
    end
    ctrl.se = 1'b1;
    for (int i = 0; i < n; i++) begin
      si = din[i];
      dout[i] = so;
      tck_cycle();
    end
    ctrl.se = 1'b0;
    if (do_update) begin
      ctrl.ue = 1'b1; tck_cycle(); ctrl.ue = 1'b0;
    end
    ctrl.sel = 1'b0;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    ctrl.rst = 1'b1; #100 ctrl.rst = 1'b0;
    scan(16'b0000_0000_1011, 12, r, 0, 0);
    check(r[11:4] == 8'b0000_1011, "closed network is 4 bits");
    // violation on monitor 1 only (Q0=1, Q2=0)
    q0 = 2'b11; d = '{2'b01, 2'b11};
    #100 mon_clk = 2'b11; #100 mon_clk = 2'b00; #10;
    check(warning == 2'b10, "monitor 1 warns, monitor 0 not");
    // poll: out order SIB1, Warn1, SIB0, Warn0
    scan(16'b0000, 4, r);
    check(r[3:0] == 4'b0010, "poll shows Warning of monitor 1 only");
    // open SIB of monitor 1 only
    scan(16'b0001, 4, r);
    scan(16'b0000_0010_1101, 12, r, 0, 0);
    check(r[11:6] == 6'b10_1101, "network is 6 bits with one SIB open");
    // read monitor 1 and write its Ack (in order: SIB1, Ack1, Out1_1, Out1_0, SIB0, Warn0)
    scan(16'b00_0011, 6, r);
    check(r[0] == 1'b1 && r[1] == 1'b0, "SIB1 open, Ack1 0");
    check(r[2] == 1'b0 && r[3] == 1'b1, "Out[1]=0 Out[0]=1");
    check(ack == 2'b10, "Ack reached monitor 1 only");
    check(warning == 2'b00, "monitor 1 cleared");
    // open both SIBs, release Ack
    scan(16'b01_0001, 6, r);
    check(ack == 2'b00, "Ack released");
    scan(16'b0000_0000_1010_0111, 16, r, 0, 0);
    check(r[15:8] == 8'b1010_0111, "network is 8 bits with both SIBs open");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
