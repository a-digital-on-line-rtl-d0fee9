// ijtag_network: the IJTAG network that gives the TAP controller access to
// all IRF monitors of the board.
//
// N_MON wrapped monitors (each with its own segment insertion bit) are
// chained in series: the network input `si` feeds monitor 0, the scan
// output of monitor k feeds monitor k+1, and the last one drives `so`.
// With every SIB closed the scan path is 2 * N_MON bits long (Warning and
// SIB of each monitor, monitor N_MON-1 nearest to `so`); opening the SIB of
// monitor k lengthens its part from 2 to TAPS + 2 bits. All segments share
// `tck` and the control bundle `ctrl`. Monitor-side signals are arrays
// indexed by monitor number.
// The description names the network and shows one wrapped monitor per
// link; the flat chain of SIB-wrapped monitors is this design's choice.
module ijtag_network
  import irf_pkg::*;
#(
  parameter int unsigned N_MON = 2,
  parameter int unsigned TAPS  = 2
) (
  input  logic        tck,
  input  logic        si,
  input  ijtag_ctrl_t ctrl,
  output logic        so,
  input  logic [N_MON-1:0]         mon_clk,
  input  logic [N_MON-1:0]         mon_enable,
  input  logic [N_MON-1:0]         q0,
  input  logic [N_MON-1:0][TAPS:1] d,
  output logic [N_MON-1:0]         warning,
  output logic [N_MON-1:0][TAPS-1:0] out,
  output logic [N_MON-1:0]         ack
);
  timeunit 1ns; timeprecision 1ps;

  logic [N_MON:0] chain;
  assign chain[0] = si;
  assign so       = chain[N_MON];

  for (genvar k = 0; k < N_MON; k++) begin : g_mon
    irf_wrapped_monitor #(.TAPS(TAPS)) u_wm (
      .tck(tck), .si(chain[k]), .ctrl(ctrl), .so(chain[k+1]),
      .mon_clk(mon_clk[k]), .mon_enable(mon_enable[k]), .q0(q0[k]),
      .d(d[k]), .warning(warning[k]), .out(out[k]), .ack(ack[k])
    );
  end
endmodule
