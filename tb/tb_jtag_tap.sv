// tb_jtag_tap: walks the TAP controller through reset, instruction scans
// and data scans. Checks: reset state drives the IJTAG reset; the
// instruction register captures 0001; after loading the IJTAG opcode the
// network is selected and a data scan goes through a testbench model of
// the network (a 5-bit shift register) with exactly one capture and one
// update pulse; after loading BYPASS the data path is one bit long and
// captures 0; TRST returns the controller to reset at once.
module tb_jtag_tap;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b1;
  logic tdo, tdo_en, net_si, net_so;
  ijtag_ctrl_t ctrl;
  logic [4:0] netreg = 5'b10110;
  int n_ce = 0, n_ue = 0;
  int checks = 0, failures = 0;

  jtag_tap dut (.tck(tck), .tms(tms), .tdi(tdi), .trst_n(trst_n), .tdo(tdo),
    .tdo_en(tdo_en), .ctrl(ctrl), .net_si(net_si), .net_so(net_so));

  // model of a network segment: 5-bit shift register, SI at bit 4
  assign net_so = netreg[0];
  always @(posedge tck) begin
    if (ctrl.sel && ctrl.ce) n_ce++;
    if (ctrl.sel && ctrl.se) netreg <= {net_si, netreg[4:1]};
  end
  always @(negedge tck) if (ctrl.sel && ctrl.ue) n_ue++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $realtime);
    end
  endtask

  task automatic clk1(logic m, logic i, output logic o);
    tms = m; tdi = i;
    #25 o = tdo;
    tck = 1'b1;
    #50 tck = 1'b0;
    #25;
  endtask

  // from Run-Test/Idle: scan n bits into IR (ir=1) or DR (ir=0), back to RTI
  task automatic scan(bit ir, input logic [31:0] din, input int n, output logic [31:0] dout);
    logic o;
    dout = '0;
    clk1(1, 0, o);               // Select-DR
    if (ir) clk1(1, 0, o);       // Select-IR
    clk1(0, 0, o);               // Capture
    clk1(0, 0, o);               // Shift
    for (int i = 0; i < n; i++) begin
      clk1(i == n - 1, din[i], o);
      dout[i] = o;
    end
    clk1(1, 0, o);               // Update
    clk1(0, 0, o);               // Run-Test/Idle
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic o;
    #10 trst_n = 1'b0;
    #100 trst_n = 1'b1;
    check(ctrl.rst && !ctrl.sel, "reset state");
    clk1(0, 0, o);
    check(!ctrl.rst, "left reset");
    // IR capture value and load the IJTAG instruction
    scan(1, 32'b1000, 4, r);
    check(r[3:0] == 4'b0001, "IR captures 0001");
    check(ctrl.sel, "IJTAG instruction selects the network");
    // data scan through the network model
    n_ce = 0; n_ue = 0;
    scan(0, 32'b01001, 5, r);
    check(r[4:0] == 5'b10110, "network contents on TDO");
    check(netreg == 5'b01001, "TDI shifted into the network");
    check(n_ce == 1 && n_ue == 1, "one capture and one update per scan");
    // longer scan shows the 5-bit delay
    scan(0, 32'h0000_0123, 12, r);
    check(r[11:5] == 7'h23 && r[4:0] == 5'b01001, "5-bit path through network");
    // BYPASS
    scan(1, 32'b1111, 4, r);
    check(!ctrl.sel, "BYPASS deselects the network");
    begin
      logic [4:0] keep;
      keep = netreg;
      scan(0, 32'b1101, 4, r);
      check(r[0] == 1'b0 && r[3:1] == 3'b101, "bypass is one bit and captures 0");
      check(netreg == keep, "network untouched in BYPASS");
    end
    // TRST
    scan(1, 32'b1000, 4, r);
    check(ctrl.sel, "IJTAG selected again");
    trst_n = 1'b0; #10;
    check(ctrl.rst && !ctrl.sel, "TRST resets TAP and instruction");
    trst_n = 1'b1;
    // five TMS=1 clocks reach reset from anywhere
    clk1(0, 0, o); clk1(1, 0, o); clk1(0, 0, o);     // RTI, Sel-DR, Capture-DR
    repeat (5) clk1(1, 0, o);
    check(ctrl.rst, "TMS=1 x5 reaches Test-Logic-Reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
