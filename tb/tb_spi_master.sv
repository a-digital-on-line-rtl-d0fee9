// tb_spi_master: random bytes through a parity and a Hamming master. A
// testbench-side mode-0 slave samples MOSI at every rising SCLK edge while
// CS is low. Checks: the sampled bits equal the payload worked out here
// (byte LSB first + even parity, or two Hamming (7,4) words), 9 / 14 SCLK
// edges per frame, SCLK period of 16 clock cycles, SCLK low whenever CS
// changes, and MOSI stable around each rising edge.
module tb_spi_master;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int CPB = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] data = '0;
  logic valid = 1'b0;
  logic ready_p, sclk_p, cs_p, mosi_p;
  logic ready_h, sclk_h, cs_h, mosi_h;
  int checks = 0, failures = 0;
  logic [13:0] got_p, got_h;
  int n_p = 0, n_h = 0;
  realtime last_rise_p = 0;

  always #10 clk = ~clk;

  spi_master #(.CLKS_PER_BIT(CPB), .CODE(CODE_PARITY)) dut_p (
    .clk(clk), .rst_n(rst_n), .data(data), .valid(valid), .ready(ready_p),
    .sclk(sclk_p), .cs_n(cs_p), .mosi(mosi_p));
  spi_master #(.CLKS_PER_BIT(CPB), .CODE(CODE_HAMMING)) dut_h (
    .clk(clk), .rst_n(rst_n), .data(data), .valid(valid), .ready(ready_h),
    .sclk(sclk_h), .cs_n(cs_h), .mosi(mosi_h));

  function automatic logic [6:0] ham(logic [3:0] d);
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

  always @(posedge sclk_p) begin
    check(!cs_p, "SCLK only while selected");
    if (n_p > 0) check($realtime - last_rise_p == CPB * 20.0, "SCLK period");
    last_rise_p = $realtime;
    if (n_p < 14) got_p[n_p] = mosi_p;
    n_p++;
  end
  always @(posedge sclk_h) begin
    if (n_h < 14) got_h[n_h] = mosi_h;
    n_h++;
  end
  always @(mosi_p) if (!cs_p) check(!sclk_p, "MOSI changes while SCLK low");
  always @(cs_p) check(!sclk_p, "CS changes while SCLK low");

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 30; t++) begin
      logic [7:0] v;
      v = 8'($urandom);
      wait (ready_p && ready_h);
      @(negedge clk);
      data = v; valid = 1'b1;
      @(posedge clk); #1 valid = 1'b0;
      got_p = '0; got_h = '0; n_p = 0; n_h = 0;
      @(posedge cs_p);
      @(posedge cs_h);
      check(n_p == 9, "9 SCLK edges (parity)");
      check(n_h == 14, "14 SCLK edges (Hamming)");
      check(got_p[8:0] == {^v, v}, "parity payload");
      check(got_h == {ham(v[7:4]), ham(v[3:0])}, "Hamming payload");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
