// tb_frame_encoder: exhaustive check of both payload codes.
// For every byte the parity payload is compared with a bit count, and the
// Hamming payload with code words found by trying every parity
// combination against the position-index definition of the code (bit at
// 1-based position i takes part in check j when bit j of i is set).
module tb_frame_encoder;
  import irf_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0]  data;
  logic [13:0] pay_p, pay_h;
  logic [4:0]  len_p, len_h;
  int checks = 0, failures = 0;

  frame_encoder #(.CODE(CODE_PARITY))  dut_p (.data(data), .payload(pay_p), .len(len_p));
  frame_encoder #(.CODE(CODE_HAMMING)) dut_h (.data(data), .payload(pay_h), .len(len_h));

  function automatic logic [6:0] ref_hamming(logic [3:0] d);
    logic [6:0] c;
    for (int p = 0; p < 8; p++) begin
      logic ok;
      // positions 1..7; parity at 1,2,4; data at 3,5,6,7
      c = {d[3], d[2], d[1], p[2], d[0], p[1], p[0]};
      ok = 1'b1;
      for (int j = 0; j < 3; j++) begin
        logic s;
        s = 1'b0;
        for (int i = 1; i <= 7; i++) if (((i >> j) & 1) == 1) s ^= c[i-1];
        if (s) ok = 1'b0;
      end
      if (ok) return c;
    end
    return 7'h7f;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s data=%02h p=%04h h=%04h", what, data, pay_p, pay_h);
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
    for (int v = 0; v < 256; v++) begin
      int ones;
      data = 8'(v);
      #1;
      ones = 0;
      for (int i = 0; i < 8; i++) ones += int'(data[i]);
      check(pay_p[7:0] == data, "parity data bits");
      check(pay_p[8] == ones[0], "even parity bit");
      check(pay_p[13:9] == '0, "unused bits zero");
      check(len_p == 5'd9, "parity length");
      check(pay_h[6:0] == ref_hamming(data[3:0]), "hamming low nibble");
      check(pay_h[13:7] == ref_hamming(data[7:4]), "hamming high nibble");
      check(len_h == 5'd14, "hamming length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
