// spi_slave: SPI slave, mode 0 (CPOL = 0, CPHA = 0), receive only.
//
// SCLK side: at every rising SCLK edge while `cs_n` is low the receiver
// flip-flop samples `mosi` into `cap_q` ("Captured Data", watched by the
// IRF monitor, whose clock is SCLK), the bit is shifted into a shift
// register from the top (the last bit received ends up in the top bit), and
// a free-running edge counter advances. Nothing in the SCLK domain is reset:
// it needs no reset, because the `clk` side only looks at differences.
// `clk` side: `cs_n` is synchronised; when it rises (end of a frame) the
// SCLK side is idle, and the frame's bit count is the edge counter minus
// its value at the previous frame end (`cnt_prev`, which follows the
// counter while the synchronised chip select has been high for two
// cycles; so the first rising SCLK edge must come at least three `clk`
// cycles after `cs_n` falls). The payload is the top `nbits` bits of the
// shift register, moved down to bit 0. `data`, `parity_err` and `frame_err` (number of SCLK edges
// differs from the frame size) are then valid with the one-cycle
// `rx_valid` pulse, 3 `clk` cycles after `cs_n` rises. `busy` follows the
// synchronised chip select. The edge counter is CNT_W bits wide, so a frame
// of 2**CNT_W or more edges is counted modulo 2**CNT_W.
// Mode 0, LSB first, even parity and the bit-count frame check follow the
// design description; the two-domain structure is this design's choice.
module spi_slave
  import irf_pkg::*;
#(
  parameter code_e CODE = CODE_PARITY
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sclk,
  input  logic                 cs_n,
  input  logic                 mosi,
  output logic                 cap_q,      // captured bit (Q0)
  output logic                 busy,
  output logic [DATA_BITS-1:0] data,
  output logic                 parity_err,
  output logic                 frame_err,
  output logic                 rx_valid
);
  timeunit 1ns; timeprecision 1ps;

  // ---- SCLK domain ----
  logic [CNT_W-1:0]       cnt;
  logic [MAX_PAYLOAD-1:0] sh;

  always_ff @(posedge sclk) begin
    if (!cs_n) begin
      cap_q <= mosi;
      sh    <= {mosi, sh[MAX_PAYLOAD-1:1]};
      cnt   <= cnt + 1'b1;
    end
  end

  // ---- clk domain ----
  logic [2:0]             cs_sync;
  logic [CNT_W-1:0]       cnt_prev, nbits;
  logic [MAX_PAYLOAD-1:0] payload;
  logic [DATA_BITS-1:0]   dec_data;
  logic                   dec_perr, dec_ferr;

  assign nbits = cnt - cnt_prev;

  always_comb begin
    payload = '0;
    if (nbits <= CNT_W'(MAX_PAYLOAD))
      payload = sh >> (CNT_W'(MAX_PAYLOAD) - nbits);
  end

  frame_decoder #(.CODE(CODE)) u_dec (
    .payload(payload), .nbits(nbits), .stop_ok(1'b1),
    .data(dec_data), .parity_err(dec_perr), .frame_err(dec_ferr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_sync    <= 3'b111;
      data       <= '0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
      rx_valid   <= 1'b0;
    end else begin
      cs_sync  <= {cs_sync[1:0], cs_n};
      rx_valid <= 1'b0;
      if (cs_sync[1] && !cs_sync[2]) begin
        data       <= dec_data;
        parity_err <= dec_perr;
        frame_err  <= dec_ferr;
        rx_valid   <= 1'b1;
      end
    end
  end

  // edge count at the end of the previous frame: follows the counter while
  // the link is idle (the counter only moves while cs_n is low)
  always_ff @(posedge clk) begin
    if (cs_sync[1] && cs_sync[2]) cnt_prev <= cnt;
  end

  assign busy = !cs_sync[1];
endmodule
