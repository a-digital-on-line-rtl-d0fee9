// tb_irf_monitor: drives the monitor's capture clock, the receiver's
// captured bit and the delayed line copies directly. For every trial the
// expected pattern Out = {D2, D1} at the rising edge and Warning = Q0 ^ D2
// at the falling edge are worked out in the testbench. It also checks that
// a raised warning freezes Out and Warning over later clock edges, that a
// disabled monitor captures nothing, that reset clears both, and that a
// reset released while the clock is high raises no false warning at the
// following falling edge.
module tb_irf_monitor;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0, enable = 1'b0, rst = 1'b1, q0 = 1'b0;
  logic [2:1] d = '0;
  logic       warning;
  logic [1:0] out;
  int checks = 0, failures = 0;
  int n_warn = 0, n_frozen = 0, n_disabled = 0;

  irf_monitor #(.TAPS(2)) dut (.clk(clk), .enable(enable), .rst(rst),
    .q0(q0), .d(d), .warning(warning), .out(out));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t: warning=%b out=%b", what, $realtime, warning, out);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 rst = 1'b0;
    for (int t = 0; t < 400; t++) begin
      logic       en, eq0;
      logic [2:1] ed;
      en  = ($urandom_range(0, 5) != 0);
      eq0 = 1'($urandom);
      ed  = 2'($urandom);
      // reset and apply stimulus while the clock is low
      rst = 1'b1; #5 rst = 1'b0;
      check(warning == 1'b0 && out == 2'b00, "reset clears");
      // reset is released at the next falling clock edge
      enable = 1'b0;
      #5 clk = 1'b1; #5 clk = 1'b0;
      enable = en; q0 = eq0; d = ed;
      #50 clk = 1'b1;                       // rising edge: capture
      #1;
      check(out == (en ? ed : 2'b00), "capture pattern");
      #50 clk = 1'b0;                       // falling edge: compare
      #1;
      check(warning == (en && (eq0 ^ ed[2])), "warning = Q0 xor Q2");
      if (warning) n_warn++;
      if (!en) n_disabled++;
      // a second cycle with new data: frozen if a warning was raised
      begin
        logic       w0;
        logic [1:0] o0;
        w0 = warning; o0 = out;
        q0 = ~q0; d = ~d;
        #50 clk = 1'b1; #1;
        if (w0) begin
          check(out == o0, "pattern frozen after warning");
          n_frozen++;
        end else if (en) begin
          check(out == d, "next capture");
        end
        #50 clk = 1'b0; #1;
        if (w0) check(warning == 1'b1, "warning sticky");
        else    check(warning == (en && (q0 ^ d[2])), "next compare");
      end
    end
    // reset released while the clock is high: no compare against cleared data
    for (int t = 0; t < 20; t++) begin
      enable = 1'b1; q0 = 1'b1; d = 2'b00;
      #50 clk = 1'b1;
      #10 rst = 1'b1;
      #10 rst = 1'b0;
      #30 clk = 1'b0; #1;
      check(warning == 1'b0, "no false warning after reset release");
      q0 = 1'b0; d = 2'b11;
      #50 clk = 1'b1; #1;
      check(out == 2'b11, "captures after reset release");
      #50 clk = 1'b0; #1;
      check(warning == 1'b1, "compares after reset release");
      rst = 1'b1; #5 rst = 1'b0;
    end
    check(n_warn > 0 && n_frozen > 0 && n_disabled > 0, "all cases exercised");
    $display("warnings=%0d frozen=%0d disabled=%0d", n_warn, n_frozen, n_disabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
