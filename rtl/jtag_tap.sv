// jtag_tap: IEEE 1149.1 test access port controller in front of the IJTAG
// network.
//
// The standard 16-state TAP state machine advances on rising `tck` edges
// under `tms`; `trst_n` forces Test-Logic-Reset asynchronously. The
// instruction register is IR_W bits wide, captures 0...01 and is loaded in
// Update-IR (falling edge); reset loads BYPASS (all ones). Instructions:
//   IJTAG  (IR = IJTAG_OPCODE): the IJTAG network is the data register;
//   any other value: the one-bit bypass register.
// Towards the network the controller drives the IJTAG client controls:
// sel = IJTAG instruction active, ce = Capture-DR, se = Shift-DR,
// ue = Update-DR, rst = Test-Logic-Reset. `tdo` changes on the falling edge
// of `tck` and is 0 outside Shift-IR / Shift-DR (`tdo_en` low).
// The description only names the TAP controller; the state machine and
// conventions are those of IEEE 1149.1, and the instruction width and
// opcode are this design's choices.
module jtag_tap
  import irf_pkg::*;
#(
  parameter int unsigned     IR_W         = 4,
  parameter logic [IR_W-1:0] IJTAG_OPCODE = 4'b1000
) (
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  input  logic        trst_n,
  output logic        tdo,
  output logic        tdo_en,
  // IJTAG network side
  output ijtag_ctrl_t ctrl,
  output logic        net_si,
  input  logic        net_so
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [3:0] {
    TLR, RTI,
    SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_state_e;

  tap_state_e      state, nxt;
  logic [IR_W-1:0] ir_sh, ir;
  logic            bypass;

  always_comb begin
    unique case (state)
      TLR:    nxt = tms ? TLR    : RTI;
      RTI:    nxt = tms ? SEL_DR : RTI;
      SEL_DR: nxt = tms ? SEL_IR : CAP_DR;
      CAP_DR: nxt = tms ? EX1_DR : SH_DR;
      SH_DR:  nxt = tms ? EX1_DR : SH_DR;
      EX1_DR: nxt = tms ? UPD_DR : PAU_DR;
      PAU_DR: nxt = tms ? EX2_DR : PAU_DR;
      EX2_DR: nxt = tms ? UPD_DR : SH_DR;
      UPD_DR: nxt = tms ? SEL_DR : RTI;
      SEL_IR: nxt = tms ? TLR    : CAP_IR;
      CAP_IR: nxt = tms ? EX1_IR : SH_IR;
      SH_IR:  nxt = tms ? EX1_IR : SH_IR;
      EX1_IR: nxt = tms ? UPD_IR : PAU_IR;
      PAU_IR: nxt = tms ? EX2_IR : PAU_IR;
      EX2_IR: nxt = tms ? UPD_IR : SH_IR;
      UPD_IR: nxt = tms ? SEL_DR : RTI;
      default: nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= nxt;
  end

  // instruction register: shift stage on rising edges, update on falling
  always_ff @(posedge tck) begin
    if (state == CAP_IR)     ir_sh <= IR_W'(1);
    else if (state == SH_IR) ir_sh <= {tdi, ir_sh[IR_W-1:1]};
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)               ir <= '1;
    else if (state == TLR)     ir <= '1;
    else if (state == UPD_IR)  ir <= ir_sh;
  end

  // bypass register
  always_ff @(posedge tck) begin
    if (state == CAP_DR)     bypass <= 1'b0;
    else if (state == SH_DR) bypass <= tdi;
  end

  always_comb begin
    ctrl.sel = (ir == IJTAG_OPCODE);
    ctrl.ce  = (state == CAP_DR);
    ctrl.se  = (state == SH_DR);
    ctrl.ue  = (state == UPD_DR);
    ctrl.rst = (state == TLR);
  end
  assign net_si = tdi;

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo_en <= (state == SH_IR) || (state == SH_DR);
      if (state == SH_IR)      tdo <= ir_sh[0];
      else if (state == SH_DR) tdo <= ctrl.sel ? net_so : bypass;
      else                     tdo <= 1'b0;
    end
  end
endmodule
