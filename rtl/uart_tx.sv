// uart_tx: UART transmitter.
//
// Frame: one start bit (0), the payload from frame_encoder (8 data bits LSB
// first plus even parity, or two Hamming (7,4) code words), then two stop
// bits (1). The line idles high. Each bit lasts CLKS_PER_BIT cycles of
// `clk`; with the default 48 MHz clock and 16 cycles per bit the rate is
// 3 MBd.
// Interface: a byte is taken when `valid` and `ready` are both high at a
// rising clock edge; `ready` is low while a frame is being sent. `rst_n`
// is an asynchronous active-low reset.
// Frame format and 3 MBd follow the design description; the 48 MHz clock,
// the divider and the handshake are this design's choices.
module uart_tx
  import irf_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 16,
  parameter code_e       CODE         = CODE_PARITY
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DATA_BITS-1:0] data,
  input  logic                 valid,
  output logic                 ready,
  output logic                 txd
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DIV_W = $clog2(CLKS_PER_BIT);
  localparam int unsigned STOP_BITS = 2;
  // shift register: start + payload + stop bits
  localparam int unsigned SH_W = 1 + MAX_PAYLOAD + STOP_BITS;

  logic [MAX_PAYLOAD-1:0] payload;
  logic [CNT_W-1:0]       len;
  logic [SH_W-1:0]        sh;
  logic [CNT_W-1:0]       bits_left;
  logic [DIV_W-1:0]       div;
  logic                   busy;

  frame_encoder #(.CODE(CODE)) u_enc (.data(data), .payload(payload), .len(len));

  // Stop bits sit right after the last payload bit, whatever the code.
  function automatic logic [SH_W-1:0] build_frame(logic [MAX_PAYLOAD-1:0] p,
                                                  logic [CNT_W-1:0] n);
    logic [SH_W-1:0] f;
    f = '1;
    for (int i = 0; i < MAX_PAYLOAD; i++)
      if (i < int'(n)) f[i+1] = p[i];
    f[0] = 1'b0;
    return f;
  endfunction

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      sh        <= '1;
      bits_left <= '0;
      div       <= '0;
      txd       <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (valid) begin
        sh        <= build_frame(payload, len) >> 1;
        txd       <= 1'b0;                        // start bit
        bits_left <= len + CNT_W'(STOP_BITS);
        div       <= '0;
        busy      <= 1'b1;
      end
    end else if (div == DIV_W'(CLKS_PER_BIT - 1)) begin
      div <= '0;
      if (bits_left == '0) begin
        busy <= 1'b0;
        txd  <= 1'b1;
      end else begin
        txd       <= sh[0];
        sh        <= {1'b1, sh[SH_W-1:1]};
        bits_left <= bits_left - 1'b1;
      end
    end else begin
      div <= div + 1'b1;
    end
  end
endmodule
