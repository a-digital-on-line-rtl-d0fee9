// irf_wrapped_monitor: an IRF monitor behind its own IJTAG segment.
//
// Scan structure (SI on the left, SO on the right):
//
//   SI --+--> Warning -------------------------> mux 0 --+
//        |                                       mux 1 <-+-- ... --> SIB --> SO
//        +--> Out[0] --> Out[1] --> Ack ------> mux 1
//
// The segment insertion bit (SIB) is the last cell before SO. While its
// update bit is 0 (after reset) the mux takes the short path and the scan
// path through this segment is two bits long: Warning, SIB. Writing 1 into
// the SIB opens the long path: Out[0], Out[1], Ack, SIB (four bits).
// Warning, Out[0] and Out[1] are read-only cells that capture the
// monitor's flag and violation pattern. Ack is a read/write cell whose
// update bit drives the monitor's asynchronous reset; a host reads Out and
// writes Ack = 1 in one scan, then writes Ack = 0 to re-arm the monitor.
//
// Timing (IJTAG client conventions): capture and shift on the rising edge
// of `tck` while ctrl.sel and ctrl.ce / ctrl.se are high; update on the
// falling edge of `tck` while ctrl.sel and ctrl.ue are high; ctrl.rst
// clears the SIB and Ack update bits asynchronously and also holds the
// monitor in reset, so that it starts from a known state. Warning and Out are
// captured straight from the monitor: once Warning reads 1 the monitor's
// clock is stopped, so Out is stable when the host reads it.
// The cell order, the SIB and the Ack handshake follow the design
// description; the TAPS generalisation (Out[0..TAPS-1]), the asynchronous
// reset and resetting the monitor from ctrl.rst are this design's choices.
module irf_wrapped_monitor
  import irf_pkg::*;
#(
  parameter int unsigned TAPS = 2
) (
  // IJTAG client interface
  input  logic          tck,
  input  logic          si,
  input  ijtag_ctrl_t   ctrl,
  output logic          so,
  // monitored link
  input  logic          mon_clk,     // receiver capture clock
  input  logic          mon_enable,
  input  logic          q0,          // bit captured by the receiver
  input  logic [TAPS:1] d,           // delayed copies of the line
  output logic          warning,
  output logic [TAPS-1:0] out,
  output logic          ack          // monitor reset
);
  timeunit 1ns; timeprecision 1ps;

  logic            warn_sh;
  logic [TAPS-1:0] out_sh;
  logic            ack_sh, ack_upd;
  logic            sib_sh, sib_upd;
  logic            seg_so, mux;
  logic            seg_rst;
  logic            mon_rst;

  assign seg_rst = ctrl.rst;
  assign mon_rst = ack_upd | ctrl.rst;

  irf_monitor #(.TAPS(TAPS)) u_mon (
    .clk(mon_clk), .enable(mon_enable), .rst(mon_rst),
    .q0(q0), .d(d), .warning(warning), .out(out)
  );

  assign seg_so = ack_sh;
  assign mux    = sib_upd ? seg_so : warn_sh;
  assign so     = sib_sh;
  assign ack    = ack_upd;

  // capture / shift
  always_ff @(posedge tck) begin
    if (ctrl.sel && ctrl.ce) begin
      warn_sh <= warning;
      sib_sh  <= sib_upd;
      if (sib_upd) begin
        out_sh <= out;
        ack_sh <= ack_upd;
      end
    end else if (ctrl.sel && ctrl.se) begin
      warn_sh <= si;
      sib_sh  <= mux;
      if (sib_upd) begin
        out_sh <= TAPS'({out_sh, si});
        ack_sh <= out_sh[TAPS-1];
      end
    end
  end

  // update
  always_ff @(negedge tck or posedge seg_rst) begin
    if (seg_rst) begin
      sib_upd <= 1'b0;
      ack_upd <= 1'b0;
    end else if (ctrl.sel && ctrl.ue) begin
      sib_upd <= sib_sh;
      if (sib_upd) ack_upd <= ack_sh;
    end
  end
endmodule
