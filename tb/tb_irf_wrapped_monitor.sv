// tb_irf_wrapped_monitor: replays the host's access procedure on one
// wrapped monitor, driving the IJTAG client controls directly. Checks the
// scan-path length with the SIB closed (2) and open (4), the bit order
// (SIB nearest SO, then Warning or Ack, Out[1], Out[0]), that Warning and
// Out read back what the monitor captured, that writing Ack = 1 clears the
// monitor and Ack = 0 re-arms it, that nothing moves while the segment is
// not selected, and that reset closes the SIB and clears Ack.
module tb_irf_wrapped_monitor;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic        tck = 1'b0, si = 1'b0, so;
  ijtag_ctrl_t ctrl = '0;
  logic        mon_clk = 1'b0, mon_enable = 1'b0, q0 = 1'b0;
  logic [2:1]  d = '0;
  logic        warning, ack;
  logic [1:0]  out;
  int checks = 0, failures = 0;

  irf_wrapped_monitor #(.TAPS(2)) dut (
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

  // capture, shift n bits (bit 0 first in and out), update
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

  // one clean clock pulse (which also completes a pending reset release),
  // then one pulse with the given receiver bit and taps
  task automatic violation(logic qv, logic [2:1] dv);
    q0 = dv[2]; d = {dv[2], dv[2]};
    #100 mon_clk = 1'b1;
    #100 mon_clk = 1'b0;
    #10 q0 = qv; d = dv;
    #100 mon_clk = 1'b1;
    #100 mon_clk = 1'b0;
    #10;
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
    check(ack == 1'b0, "ack cleared by reset");
    // length with SIB closed: a marker comes out after 2 bits
    scan(16'b0000_0000_0010_1100, 8, r, 0, 0);
    check(r[7:2] == 6'b10_1100, "closed path is 2 bits");
    // no violation: Warning reads 0
    mon_enable = 1'b1;
    violation(1'b1, 2'b11);
    check(!warning, "no warning for a clean bit");
    scan(16'b00, 2, r);
    check(r[1:0] == 2'b00, "poll: SIB=0 Warning=0");
    // violation: Q0=0, Q2=1, Q1=0
    violation(1'b0, 2'b10);
    check(warning && out == 2'b10, "monitor raised warning");
    scan(16'b00, 2, r);
    check(r[0] == 1'b0 && r[1] == 1'b1, "poll: Warning=1");
    // open the SIB (first bit shifted ends up in the SIB)
    scan(16'b01, 2, r);
    // read Out and write Ack=1 (keep SIB open): in order SIB, Ack, Out1, Out0
    scan(16'b0011, 4, r);
    check(r[0] == 1'b1, "SIB reads open");
    check(r[1] == 1'b0, "Ack reads 0");
    check(r[2] == 1'b1 && r[3] == 1'b0, "Out[1]=1 Out[0]=0");
    check(ack == 1'b1, "Ack written");
    check(!warning && out == 2'b00, "monitor cleared by Ack");
    violation(1'b0, 2'b10);
    check(!warning, "monitor held in reset while Ack=1");
    // Ack = 0, SIB stays open
    scan(16'b0001, 4, r);
    check(r[1] == 1'b1, "Ack reads back 1");
    check(ack == 1'b0, "Ack released");
    violation(1'b1, 2'b01);
    check(warning && out == 2'b01, "monitor re-armed");
    // open path is 4 bits
    scan(16'b0000_0001_0000_0011, 12, r, 0, 0);
    check(r[11:4] == 8'b0000_0011, "open path is 4 bits");
    scan(16'b0001, 4, r, 0, 1);        // restore SIB=1, Ack=0
    // close SIB: shift 0 into the SIB, Ack 0
    scan(16'b0000, 4, r);
    scan(16'b00, 2, r);
    check(r[0] == 1'b0 && r[1] == 1'b1, "closed again, Warning still 1");
    // not selected: so does not move
    begin
      logic s0;
      s0 = so;
      ctrl.se = 1'b1; si = ~s0;
      repeat (4) tck_cycle();
      ctrl.se = 1'b0;
      check(so == s0, "no shift while not selected");
    end
    // reset closes an open SIB
    scan(16'b01, 2, r);
    scan(16'b0011, 4, r);
    check(ack == 1'b1, "ack set before reset");
    ctrl.rst = 1'b1; #100 ctrl.rst = 1'b0;
    check(ack == 1'b0, "reset clears ack");
    scan(16'b0001_0110, 8, r, 0, 0);
    check(r[7:2] == 6'b01_0110, "reset closed the SIB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
