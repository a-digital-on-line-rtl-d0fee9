// frame_decoder: checks the payload of a received frame and recovers the
// data byte.
//
// Parity error: with CODE_PARITY, the nine payload bits hold an odd number
// of ones; with CODE_HAMMING, either code word has a non-zero syndrome.
// The Hamming code is used for detection only; the data bits are passed on
// uncorrected, so a flipped bit shows as both a parity error and a data
// error. Frame error: the number of received payload bits `nbits` differs
// from the frame size of the code, or the receiver saw a bad stop
// condition (`stop_ok` low; a UART's stop bits). Purely combinational.
// The checks are the ones the design description names; detection-only
// Hamming is this design's choice.
module frame_decoder
  import irf_pkg::*;
#(
  parameter code_e CODE = CODE_PARITY
) (
  input  logic [MAX_PAYLOAD-1:0] payload,
  input  logic [CNT_W-1:0]       nbits,
  input  logic                   stop_ok,
  output logic [DATA_BITS-1:0]   data,
  output logic                   parity_err,
  output logic                   frame_err
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    if (CODE == CODE_HAMMING) begin
      data       = {hamming74_data(payload[13:7]), hamming74_data(payload[6:0])};
      parity_err = (hamming74_syndrome(payload[6:0])  != 3'd0) ||
                   (hamming74_syndrome(payload[13:7]) != 3'd0);
    end else begin
      data       = payload[7:0];
      parity_err = ^payload[8:0];
    end
    frame_err = (nbits != payload_len(CODE)) || !stop_ok;
  end
endmodule
