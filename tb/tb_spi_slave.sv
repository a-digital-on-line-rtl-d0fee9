// tb_spi_slave: the testbench plays a mode-0 master (SCLK period 320 ns)
// and sends frames of 9 bits (byte LSB first + even parity), sometimes with
// a flipped bit, or with 8 or 10 clock edges. Checks: decoded byte, parity
// and frame error flags, one rx_valid per frame, and that the captured bit
// equals MOSI at each rising SCLK edge.
module tb_spi_slave;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0;
  logic cap_q, busy, parity_err, frame_err, rx_valid;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int n_valid = 0, n_perr = 0, n_ferr = 0;

  always #10 clk = ~clk;

  spi_slave #(.CODE(CODE_PARITY)) dut (
    .clk(clk), .rst_n(rst_n), .sclk(sclk), .cs_n(cs_n), .mosi(mosi),
    .cap_q(cap_q), .busy(busy), .data(data), .parity_err(parity_err),
    .frame_err(frame_err), .rx_valid(rx_valid));

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

  always @(posedge clk) if (rx_valid) n_valid++;
  always @(posedge sclk) begin
    #1 check(cap_q == mosi, "captured bit equals MOSI");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      logic [7:0]  v;
      logic [9:0]  f;
      int nb, kind, valid0;
      v  = 8'($urandom);
      f  = {1'($urandom), ^v, v};
      nb = 9;
      kind = (t < 8) ? 0 : $urandom_range(0, 3);
      if (kind == 1) f[$urandom_range(0, 8)] ^= 1'b1;
      if (kind == 2) nb = ($urandom_range(0, 1) != 0) ? 8 : 10;
      valid0 = n_valid;
      cs_n = 1'b0;
      for (int b = 0; b < nb; b++) begin
        mosi = f[b];
        #160 sclk = 1'b1;
        #160 sclk = 1'b0;
      end
      #160 cs_n = 1'b1; mosi = 1'b0;
      #320;
      check(n_valid == valid0 + 1, "one rx_valid per frame");
      check(data == f[7:0], "received byte");
      check(frame_err == (nb != 9), "frame error flag");
      if (nb >= 9) check(parity_err == ^f[8:0], "parity error flag");
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
