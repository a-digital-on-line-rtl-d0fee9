// frame_encoder: turns a data byte into the payload bits of one serial
// frame (everything between the start condition and the stop condition).
//
// With CODE_PARITY the payload is the byte, LSB first, followed by an even
// parity bit, so that the nine bits hold an even number of ones. With
// CODE_HAMMING it is two Hamming (7,4) code words, low nibble first. Bit 0
// of `payload` is sent first; `len` is the number of valid payload bits.
// Purely combinational. The parity rule, byte order and the use of
// Hamming (7,4) follow the design description; the code-word bit order is
// this design's own choice (see irf_pkg).
module frame_encoder
  import irf_pkg::*;
#(
  parameter code_e CODE = CODE_PARITY
) (
  input  logic [DATA_BITS-1:0]   data,
  output logic [MAX_PAYLOAD-1:0] payload,
  output logic [CNT_W-1:0]       len
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    payload = '0;
    if (CODE == CODE_HAMMING) begin
      payload[6:0]  = hamming74_encode(data[3:0]);
      payload[13:7] = hamming74_encode(data[7:4]);
    end else begin
      payload[7:0] = data;
      payload[8]   = ^data;           // even parity
    end
    len = payload_len(CODE);
  end
endmodule
