// tb_irf_delay_chain: random input edges, including pulses shorter than
// one delay element. The testbench keeps the input history at 1 ns steps
// and checks every tap against the input k * 50 ns earlier (sampled
// half a step off the edges).
module tb_irf_delay_chain;
  timeunit 1ns; timeprecision 1ps;

  logic       d0 = 1'b0;
  logic [2:1] d;
  logic       hist [0:19999];
  int checks = 0, failures = 0;
  int n_short = 0;

  irf_delay_chain #(.TAPS(2), .TAP_DELAY_PS(50_000)) dut (.d0(d0), .d(d));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: change only on integer ns
  initial begin
    for (int i = 0; i < 20000; i++) begin
      int w;
      if (i % 37 == 0) begin
        w = $urandom_range(0, 3);
        if (w == 0) d0 = ~d0;
      end
      if (i % 211 == 100) begin          // a 7 ns pulse
        d0 = ~d0; #7 d0 = ~d0; n_short++;
        i += 7;
      end
      #1;
    end
  end

  initial begin
    #0.5;
    for (int t = 0; t < 19990; t++) begin
      hist[t] = d0;
      if (t >= 100) begin
        checks++;
        if (d[1] !== hist[t-50] || d[2] !== hist[t-100]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d d0(t-50)=%b d1=%b d0(t-100)=%b d2=%b",
                                      t, hist[t-50], d[1], hist[t-100], d[2]);
        end
      end
      #1;
    end
    checks++;
    if (n_short == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
