// irf_pkg: types, constants and coding functions shared by the IRF
// monitoring design.
//
// The serial links carry one byte per frame. Two payload codes exist:
//   CODE_PARITY  : 8 data bits, LSB first, followed by one even-parity bit
//                  (9 payload bits). This is the main configuration.
//   CODE_HAMMING : the byte is split into two nibbles, low nibble first,
//                  each sent as a Hamming (7,4) code word (14 payload bits).
// Hamming code word layout (bit 0 sent first): p1 p2 d0 p3 d1 d2 d3, with
// p1 = d0^d1^d3, p2 = d0^d2^d3, p3 = d1^d2^d3 (the classic positions 1..7).
// The parity and Hamming codes follow the design description; the bit
// order inside the Hamming frame is this design's own choice.
//
// ijtag_ctrl_t bundles the IJTAG client control signals that a TAP
// controller drives into every network segment (select, capture, shift,
// update, reset); SI, SO and TCK travel as separate wires.
package irf_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DATA_BITS   = 8;
  localparam int unsigned MAX_PAYLOAD = 14;   // longest payload (Hamming)
  localparam int unsigned CNT_W       = 5;    // width of a bit counter

  typedef enum logic {
    CODE_PARITY  = 1'b0,
    CODE_HAMMING = 1'b1
  } code_e;

  typedef struct packed {
    logic sel;   // segment selected by the active TAP instruction
    logic ce;    // capture enable (Capture-DR)
    logic se;    // shift enable (Shift-DR)
    logic ue;    // update enable (Update-DR)
    logic rst;   // reset (Test-Logic-Reset)
  } ijtag_ctrl_t;

  // Number of payload bits of a frame for a given code.
  function automatic logic [CNT_W-1:0] payload_len(code_e code);
    return (code == CODE_HAMMING) ? CNT_W'(14) : CNT_W'(9);
  endfunction

  function automatic logic [6:0] hamming74_encode(logic [3:0] d);
    logic p1, p2, p3;
    p1 = d[0] ^ d[1] ^ d[3];
    p2 = d[0] ^ d[2] ^ d[3];
    p3 = d[1] ^ d[2] ^ d[3];
    return {d[3], d[2], d[1], p3, d[0], p2, p1};
  endfunction

  // Syndrome of a received Hamming (7,4) code word; zero when consistent.
  function automatic logic [2:0] hamming74_syndrome(logic [6:0] c);
    logic s1, s2, s3;
    s1 = c[0] ^ c[2] ^ c[4] ^ c[6];
    s2 = c[1] ^ c[2] ^ c[5] ^ c[6];
    s3 = c[3] ^ c[4] ^ c[5] ^ c[6];
    return {s3, s2, s1};
  endfunction

  function automatic logic [3:0] hamming74_data(logic [6:0] c);
    return {c[6], c[5], c[4], c[2]};
  endfunction
endpackage
