// spi_master: SPI master, mode 0 (CPOL = 0, CPHA = 0), transmit only.
//
// A frame is one byte coded by frame_encoder: 8 data bits LSB first and an
// even parity bit (9 SCLK periods), or two Hamming (7,4) code words (14
// periods). On a handshake (`valid` and `ready` high at a rising `clk`
// edge) the master drops `cs_n` and puts the first bit on `mosi`. Half an
// SCLK period later `sclk` rises (the slave samples), another half period
// later it falls and the next bit is driven. Half a period after the last
// falling edge `cs_n` rises; `cs_n` then stays high for one SCLK period
// before the next frame. SCLK period = CLKS_PER_BIT cycles of `clk`
// (3 MHz from the default 48 MHz clock). `mosi` is 0 while idle.
// Mode 0, LSB first and even parity follow the design description; the
// clock divider, the gaps and the handshake are this design's choices.
module spi_master
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
  output logic                 sclk,
  output logic                 cs_n,
  output logic                 mosi
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DIV_W = $clog2(CLKS_PER_BIT);
  localparam int unsigned HALF  = CLKS_PER_BIT / 2;

  typedef enum logic [2:0] {S_IDLE, S_LOW, S_HIGH, S_TRAIL, S_GAP} state_e;

  state_e                 state;
  logic [DIV_W-1:0]       div;
  logic [CNT_W-1:0]       idx;
  logic [MAX_PAYLOAD-1:0] sh;
  logic [MAX_PAYLOAD-1:0] payload;
  logic [CNT_W-1:0]       len, len_q;

  frame_encoder #(.CODE(CODE)) u_enc (.data(data), .payload(payload), .len(len));

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      div   <= '0;
      idx   <= '0;
      sh    <= '0;
      len_q <= '0;
      sclk  <= 1'b0;
      cs_n  <= 1'b1;
      mosi  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (valid) begin
          cs_n  <= 1'b0;
          mosi  <= payload[0];
          sh    <= payload >> 1;
          len_q <= len;
          idx   <= '0;
          div   <= '0;
          state <= S_LOW;
        end
        S_LOW: if (div == DIV_W'(HALF - 1)) begin
          div   <= '0;
          sclk  <= 1'b1;
          state <= S_HIGH;
        end else div <= div + 1'b1;
        S_HIGH: if (div == DIV_W'(HALF - 1)) begin
          div  <= '0;
          sclk <= 1'b0;
          if (idx == len_q - 1'b1) begin
            mosi  <= 1'b0;
            state <= S_TRAIL;
          end else begin
            idx   <= idx + 1'b1;
            mosi  <= sh[0];
            sh    <= sh >> 1;
            state <= S_LOW;
          end
        end else div <= div + 1'b1;
        S_TRAIL: if (div == DIV_W'(HALF - 1)) begin
          div   <= '0;
          cs_n  <= 1'b1;
          state <= S_GAP;
        end else div <= div + 1'b1;
        S_GAP: if (div == DIV_W'(CLKS_PER_BIT - 1)) begin
          div   <= '0;
          state <= S_IDLE;
        end else div <= div + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
