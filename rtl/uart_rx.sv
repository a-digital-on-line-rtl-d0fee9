// uart_rx: UART receiver with an explicit bit-capture clock for the IRF
// monitor.
//
// The line is synchronised into the `clk` domain to find the falling edge
// of the start bit. Half a bit later the start bit is checked again (a
// glitch sends the receiver back to idle). From then on, in the middle of
// every payload and stop bit, the receiver raises `cap_clk` for half a bit
// period. A flip-flop clocked by the rising edge of `cap_clk` samples the
// raw line `rxd` into `cap_q` ("Captured Data"); these two signals, with
// the raw line, are what the IRF monitor watches (it registers its warning
// at the falling edge of `cap_clk`). One `clk` cycle after `cap_clk` rises
// the captured bit is shifted into the payload register. After the second stop
// bit the frame is decoded (and the receiver waits for a high line before
// it looks for the next start bit): `data`, `parity_err` and `frame_err` (a stop
// bit read as 0) are valid with the one-cycle `rx_valid` pulse. `busy` is
// high from the start edge to the end of the frame.
// Follows the design description for the frame format (start, 8 data bits
// LSB first, even parity, two stop bits, 3 MBd), the per-bit capture clock
// shown in its UART measurement, and the parity and frame checks. The
// 16-times oversampling and the half-bit clock pulse are this design's
// choices.
module uart_rx
  import irf_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 16,
  parameter code_e       CODE         = CODE_PARITY
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rxd,        // line at the receiver (D0)
  output logic                 cap_clk,    // bit-capture clock
  output logic                 cap_q,      // captured bit (Q0)
  output logic                 busy,
  output logic [DATA_BITS-1:0] data,
  output logic                 parity_err,
  output logic                 frame_err,
  output logic                 rx_valid
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DIV_W = $clog2(CLKS_PER_BIT);
  localparam int unsigned HALF  = CLKS_PER_BIT / 2;
  // The start edge reaches the state machine SYNC_LAT cycles late (two
  // synchroniser stages and the idle state); the start-bit wait is shortened
  // by as much so that bits are captured in their middle.
  localparam int unsigned SYNC_LAT = 3;
  localparam int unsigned START_WAIT = (HALF > SYNC_LAT) ? HALF - SYNC_LAT : 1;
  localparam int unsigned STOP_BITS = 2;
  localparam int unsigned PLEN = int'(payload_len(CODE));
  localparam logic [CNT_W-1:0] NBITS = payload_len(CODE) + CNT_W'(STOP_BITS);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BITS, S_DONE, S_WAIT_HIGH} state_e;

  state_e                 state;
  logic [1:0]             sync;
  logic [DIV_W-1:0]       div;
  logic [CNT_W-1:0]       nrx;        // bits received so far
  localparam int unsigned BITS_W = MAX_PAYLOAD + STOP_BITS;
  logic [BITS_W-1:0]      bits;
  logic [DIV_W-1:0]       hi_cnt;     // remaining high time of cap_clk
  logic                   cap_clk_q;
  logic [MAX_PAYLOAD-1:0] payload;
  logic                   stop_ok;
  logic [DATA_BITS-1:0]   dec_data;
  logic                   dec_perr, dec_ferr;

  // Receiver capture flip-flop, clocked by the bit-capture clock.
  always_ff @(posedge cap_clk) cap_q <= rxd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sync       <= 2'b11;
      div        <= '0;
      nrx        <= '0;
      bits       <= '0;
      cap_clk    <= 1'b0;
      cap_clk_q  <= 1'b0;
      hi_cnt     <= '0;
      data       <= '0;
      parity_err <= 1'b0;
      frame_err  <= 1'b0;
      rx_valid   <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      cap_clk_q <= cap_clk;
      rx_valid  <= 1'b0;
      // shift the captured bit in one cycle after the capture clock rose
      if (cap_clk && !cap_clk_q) begin
        bits[$clog2(BITS_W)'(nrx)] <= cap_q;
        nrx <= nrx + 1'b1;
      end
      // capture clock: high for half a bit, whatever the state
      if (cap_clk) begin
        if (hi_cnt == '0) cap_clk <= 1'b0;
        else              hi_cnt  <= hi_cnt - 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          div <= '0;
          nrx <= '0;
          if (!sync[1]) state <= S_START;
        end
        S_START: begin
          if (div == DIV_W'(START_WAIT - 1)) begin
            div   <= '0;
            state <= sync[1] ? S_IDLE : S_BITS;
          end else begin
            div <= div + 1'b1;
          end
        end
        S_BITS: begin
          if (div == DIV_W'(CLKS_PER_BIT - 1)) begin
            div     <= '0;
            cap_clk <= 1'b1;
            hi_cnt  <= DIV_W'(HALF - 1);
          end else begin
            div <= div + 1'b1;
          end
          if (nrx == NBITS) state <= S_DONE;
        end
        S_DONE: begin
          data       <= dec_data;
          parity_err <= dec_perr;
          frame_err  <= dec_ferr;
          rx_valid   <= 1'b1;
          state      <= S_WAIT_HIGH;
        end
        // after a frame (a low stop bit included) wait for the line to be
        // high before looking for the next start bit
        S_WAIT_HIGH: if (sync[1]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    payload = '0;
    for (int i = 0; i < MAX_PAYLOAD; i++)
      if (i < PLEN) payload[i] = bits[i];
    stop_ok = bits[PLEN] & bits[PLEN + 1];
  end

  frame_decoder #(.CODE(CODE)) u_dec (
    .payload(payload), .nbits(payload_len(CODE)), .stop_ok(stop_ok),
    .data(dec_data), .parity_err(dec_perr), .frame_err(dec_ferr)
  );

  assign busy = (state != S_IDLE) && (state != S_WAIT_HIGH);
endmodule
