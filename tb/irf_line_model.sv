// irf_line_model: behavioural model of a board trace with a fault injector
// in series (not synthesizable; testbench only).
//
// The receiver input is modelled as a capacitance C_PF charged through the
// injected series resistance `r_ohm`: the node voltage follows the driver
// with time constant tau = r_ohm * C_PF and the receiver sees a logic 1
// above half the supply. The node is updated every STEP_PS picoseconds.
// A fault-free line has r_ohm = 1, giving a delay well below one step.
// With the default 200 pF, the 50 % delay is about 0.139 ns per ohm: 64 ns
// at 460 ohm and 166 ns at 1.2 kohm. These constants are chosen so that,
// at 3 MBd with bits sampled mid-bit and a 100 ns detection window,
// resistances of a few hundred ohms cause warnings without bit errors and
// resistances above about 1.2 kohm cause bit errors.
module irf_line_model #(
  parameter real C_PF    = 200.0,
  parameter int  STEP_PS = 1000
) (
  input  logic in,
  input  int   r_ohm,
  output logic out
);
  timeunit 1ns; timeprecision 1ps;

  real v = 0.0;

  initial begin
    out = in;
    v   = in ? 1.0 : 0.0;
    forever begin
      real tau_ps, a;
      #(STEP_PS * 1ps);
      tau_ps = real'(r_ohm) * C_PF;          // ohm * pF = ps
      a = (tau_ps <= real'(STEP_PS) / 20.0) ? 1.0 : 1.0 - $exp(-real'(STEP_PS) / tau_ps);
      v = v + ((in ? 1.0 : 0.0) - v) * a;
      out = (v > 0.5);
    end
  end
endmodule
