// tb_frame_decoder: random payloads for both codes. Expected values come
// from a bit count (parity), the position-index definition of the Hamming
// checks, and the frame-size rule (9 or 14 bits, stop condition good).
module tb_frame_decoder;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic [13:0] payload;
  logic [4:0]  nbits;
  logic        stop_ok;
  logic [7:0]  data_p, data_h;
  logic        perr_p, perr_h, ferr_p, ferr_h;
  int checks = 0, failures = 0;
  int n_perr = 0;

  frame_decoder #(.CODE(CODE_PARITY)) dut_p (
    .payload(payload), .nbits(nbits), .stop_ok(stop_ok),
    .data(data_p), .parity_err(perr_p), .frame_err(ferr_p));
  frame_decoder #(.CODE(CODE_HAMMING)) dut_h (
    .payload(payload), .nbits(nbits), .stop_ok(stop_ok),
    .data(data_h), .parity_err(perr_h), .frame_err(ferr_h));

  function automatic bit ham_bad(logic [6:0] c);
    for (int j = 0; j < 3; j++) begin
      logic s;
      s = 1'b0;
      for (int i = 1; i <= 7; i++) if (((i >> j) & 1) == 1) s ^= c[i-1];
      if (s) return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s payload=%04h nbits=%0d stop=%b", what, payload, nbits, stop_ok);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ones;
      payload = 14'($urandom);
      nbits   = (t % 4 == 0) ? 5'($urandom_range(0, 20)) : ((t % 2) ? 5'd9 : 5'd14);
      stop_ok = ($urandom_range(0, 7) != 0);
      #1;
      ones = 0;
      for (int i = 0; i < 9; i++) ones += int'(payload[i]);
      check(data_p == payload[7:0], "parity data");
      check(perr_p == ones[0], "parity error");
      check(ferr_p == ((nbits != 5'd9) || !stop_ok), "parity frame error");
      check(data_h == {payload[13], payload[12], payload[11], payload[9],
                       payload[6], payload[5], payload[4], payload[2]}, "hamming data");
      check(perr_h == (ham_bad(payload[6:0]) || ham_bad(payload[13:7])), "hamming error");
      check(ferr_h == ((nbits != 5'd14) || !stop_ok), "hamming frame error");
      if (perr_p) n_perr++;
    end
    check(n_perr > 0, "parity errors were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
