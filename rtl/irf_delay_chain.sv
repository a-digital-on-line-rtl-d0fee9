// irf_delay_chain: behavioural model (not synthesizable) of the delay chain
// in front of the IRF monitor's flip-flops.
//
// TAPS buffers in series; tap k is the input delayed by k * TAP_DELAY_PS
// picoseconds. Every edge is passed on (transport delay), so short pulses
// survive, as they do through a chain of real buffers. In silicon this is
// a chain of delay cells sized for the wanted detection window
// (TAPS * TAP_DELAY_PS before the clock edge); replace this model by the
// technology's delay cells. The description uses two delay elements but
// gives no delay value; 50 ns per element (a 100 ns window against a
// 333 ns bit at 3 MBd) is this design's choice.
module irf_delay_chain #(
  parameter int unsigned TAPS         = 2,
  parameter int unsigned TAP_DELAY_PS = 50_000
) (
  input  logic          d0,   // line at the receiver input
  output logic [TAPS:1] d     // delayed copies
);
  timeunit 1ns; timeprecision 1ps;

  localparam realtime STEP = TAP_DELAY_PS * 1ps;

  logic [TAPS:0] tap;
  assign tap[0] = d0;
  assign d      = tap[TAPS:1];

  for (genvar k = 1; k <= TAPS; k++) begin : g_buf
    initial begin
      tap[k] = 1'b0;
      forever begin
        @(tap[k-1]);
        fork
          begin
            automatic logic v = tap[k-1];
            #(STEP) tap[k] = v;
          end
        join_none
      end
    end
  end
endmodule
