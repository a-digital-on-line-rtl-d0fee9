// irf_monitor: digital in-situ monitor for intermittent resistive faults
// (IRFs) on a serial line.
//
// The receiver samples the line (D0) into its own flip-flop at the rising
// edge of its capture clock; that bit arrives here as `q0` ("Captured
// Data"). The monitor samples TAPS delayed copies of the same line, d[1]
// (one delay element after D0) up to d[TAPS], into its own flip-flops
// Q1..Q<TAPS> at the same rising edge. Q<k> therefore holds the line as it
// was k delay elements before the edge. If the line changed inside the
// detection window (the last TAPS delays before the edge) Q<TAPS> differs
// from Q0. A comparator (XOR of Q0 and Q<TAPS>) is registered at the
// falling clock edge into the sticky `warning` flag.
//
// The monitor clock is gated: gclk = clk & enable & ~warning. While the
// monitor is disabled, or after a warning, nothing new is captured, so
// `warning` and the violation pattern `out` (Q1..Q<TAPS>) stay frozen until
// `rst` clears them. `rst` is asynchronous and active high; in the wrapped
// monitor it is driven by the IJTAG Ack register. Its release is
// re-timed to the falling edge of `clk` (rst_hold), so that after a reset
// the first event is always a capture (rising edge) and the first compare
// uses freshly captured data. Without it, releasing Ack while the clock is
// high would compare Q0 with the cleared Q<TAPS> at the next falling edge
// and raise a false warning.
//
// Follows the design description: two flip-flops behind a two-element
// delay chain, XOR comparator on Q0 and Q2, warning registered at the
// falling edge, clock gated by Enable and Warning, reset from Ack. The
// delay elements themselves are outside this module (irf_delay_chain), as
// they are a timing element and not logic. The gated clock is deliberate:
// it is the mechanism that freezes the monitor. The reset-release
// re-timing flip-flop is this design's addition.
module irf_monitor #(
  parameter int unsigned TAPS = 2
) (
  input  logic            clk,      // receiver capture clock
  input  logic            enable,   // monitor enable
  input  logic            rst,      // clears Q1..Q<TAPS> and warning (Ack)
  input  logic            q0,       // bit captured by the receiver
  input  logic [TAPS:1]   d,        // delayed copies of the line
  output logic            warning,  // sticky timing-violation flag
  output logic [TAPS-1:0] out       // captured violation pattern Q1..Q<TAPS>
);
  timeunit 1ns; timeprecision 1ps;

  logic            gclk;
  logic [TAPS:1]   q;
  logic            mismatch;
  logic            rst_hold;   // reset, released at a falling clock edge

  assign gclk     = clk & enable & ~warning;
  assign mismatch = q0 ^ q[TAPS];

  always_ff @(negedge clk or posedge rst) begin
    if (rst) rst_hold <= 1'b1;
    else     rst_hold <= 1'b0;
  end

  always_ff @(posedge gclk or posedge rst_hold) begin
    if (rst_hold) q <= '0;
    else          q <= d;
  end

  always_ff @(negedge gclk or posedge rst_hold) begin
    if (rst_hold) warning <= 1'b0;
    else          warning <= mismatch;
  end

  assign out = q;
endmodule
