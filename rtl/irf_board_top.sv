// irf_board_top: receiver-side board design with on-line monitoring of two
// serial links for intermittent resistive faults (IRFs).
//
// Two links leave and re-enter the chip through ports, so that the board
// wiring (and, in test, a fault injector) sits between transmitter and
// receiver:
//   UART : uart_tx -> uart_txd ... uart_rxd -> uart_rx
//   SPI  : spi_master -> spi_*_o ... spi_*_i -> spi_slave (MOSI only)
// Each receiver's line input goes through a delay chain into an IRF
// monitor that watches the same capture clock as the receiver (the UART
// receiver's per-bit capture clock, or SCLK for SPI) and compares its
// delayed samples with the receiver's captured bit. Monitor 0 watches the
// UART link, monitor 1 the SPI link. Both monitors sit in one IJTAG network
// behind the JTAG TAP (tck/tms/tdi/trst_n/tdo), where a host polls the
// Warning bits, reads the violation pattern Out and acknowledges with Ack.
// The warning flags are also brought out (`mon_warning`) for observation.
//
// Parameters: CLKS_PER_BIT clock cycles per bit (48 MHz / 16 = 3 MBd for
// UART, 3 MHz SCLK for SPI); CODE selects even parity or Hamming (7,4)
// frames for both links; TAPS delay elements and flip-flops per monitor;
// TAP_DELAY_PS delay per element. The delay chain is a behavioural model
// (irf_delay_chain); for silicon it is replaced by delay cells.
// Which blocks exist and how they connect follow the design description;
// port names, the clock frequency and the delay value are this design's.
module irf_board_top
  import irf_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 16,
  parameter code_e       CODE         = CODE_PARITY,
  parameter int unsigned TAPS         = 2,
  parameter int unsigned TAP_DELAY_PS = 50_000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // UART transmit side
  input  logic [DATA_BITS-1:0] uart_tx_data,
  input  logic                 uart_tx_valid,
  output logic                 uart_tx_ready,
  output logic                 uart_txd,
  // UART receive side
  input  logic                 uart_rxd,
  output logic                 uart_rx_busy,
  output logic [DATA_BITS-1:0] uart_rx_data,
  output logic                 uart_rx_valid,
  output logic                 uart_rx_parity_err,
  output logic                 uart_rx_frame_err,
  // SPI master side
  input  logic [DATA_BITS-1:0] spi_tx_data,
  input  logic                 spi_tx_valid,
  output logic                 spi_tx_ready,
  output logic                 spi_sclk_o,
  output logic                 spi_cs_n_o,
  output logic                 spi_mosi_o,
  // SPI slave side
  input  logic                 spi_sclk_i,
  input  logic                 spi_cs_n_i,
  input  logic                 spi_mosi_i,
  output logic                 spi_rx_busy,
  output logic [DATA_BITS-1:0] spi_rx_data,
  output logic                 spi_rx_valid,
  output logic                 spi_rx_parity_err,
  output logic                 spi_rx_frame_err,
  // monitors
  input  logic [1:0]           mon_enable,
  output logic [1:0]           mon_warning,
  // JTAG
  input  logic                 tck,
  input  logic                 tms,
  input  logic                 tdi,
  input  logic                 trst_n,
  output logic                 tdo,
  output logic                 tdo_en
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N_MON = 2;

  logic [N_MON-1:0]            mon_clk, mon_q0, mon_ack;
  logic [N_MON-1:0][TAPS:1]    mon_d;
  logic [N_MON-1:0][TAPS-1:0]  mon_out;
  logic                        uart_cap_clk;
  ijtag_ctrl_t                 ctrl;
  logic                        net_si, net_so;

  // ---- UART link ----
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT), .CODE(CODE)) u_uart_tx (
    .clk(clk), .rst_n(rst_n), .data(uart_tx_data), .valid(uart_tx_valid),
    .ready(uart_tx_ready), .txd(uart_txd)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT), .CODE(CODE)) u_uart_rx (
    .clk(clk), .rst_n(rst_n), .rxd(uart_rxd), .cap_clk(uart_cap_clk),
    .cap_q(mon_q0[0]), .busy(uart_rx_busy), .data(uart_rx_data),
    .parity_err(uart_rx_parity_err), .frame_err(uart_rx_frame_err),
    .rx_valid(uart_rx_valid)
  );

  irf_delay_chain #(.TAPS(TAPS), .TAP_DELAY_PS(TAP_DELAY_PS)) u_dly_uart (
    .d0(uart_rxd), .d(mon_d[0])
  );
  assign mon_clk[0] = uart_cap_clk;

  // ---- SPI link ----
  spi_master #(.CLKS_PER_BIT(CLKS_PER_BIT), .CODE(CODE)) u_spi_master (
    .clk(clk), .rst_n(rst_n), .data(spi_tx_data), .valid(spi_tx_valid),
    .ready(spi_tx_ready), .sclk(spi_sclk_o), .cs_n(spi_cs_n_o),
    .mosi(spi_mosi_o)
  );

  spi_slave #(.CODE(CODE)) u_spi_slave (
    .clk(clk), .rst_n(rst_n), .sclk(spi_sclk_i), .cs_n(spi_cs_n_i),
    .mosi(spi_mosi_i), .cap_q(mon_q0[1]), .busy(spi_rx_busy),
    .data(spi_rx_data), .parity_err(spi_rx_parity_err),
    .frame_err(spi_rx_frame_err), .rx_valid(spi_rx_valid)
  );

  irf_delay_chain #(.TAPS(TAPS), .TAP_DELAY_PS(TAP_DELAY_PS)) u_dly_spi (
    .d0(spi_mosi_i), .d(mon_d[1])
  );
  assign mon_clk[1] = spi_sclk_i;

  // ---- monitors and test access ----
  ijtag_network #(.N_MON(N_MON), .TAPS(TAPS)) u_net (
    .tck(tck), .si(net_si), .ctrl(ctrl), .so(net_so),
    .mon_clk(mon_clk), .mon_enable(mon_enable), .q0(mon_q0), .d(mon_d),
    .warning(mon_warning), .out(mon_out), .ack(mon_ack)
  );

  jtag_tap u_tap (
    .tck(tck), .tms(tms), .tdi(tdi), .trst_n(trst_n), .tdo(tdo),
    .tdo_en(tdo_en), .ctrl(ctrl), .net_si(net_si), .net_so(net_so)
  );
endmodule
