// hs_uart: UART with automatic address identification (top level).
//
// A UART for a multi-drop serial line where each character carries a ninth
// bit that marks it as an address or a data character. A slave only compares
// address characters with its own address and silently discards the data
// characters addressed to other slaves, so its host never spends time on them.
// Each 12-bit frame is start, eight bits, address/data identifier, parity,
// stop.
//
// Structure (host side on host_clk, UART side on clk, 25 MHz nominal):
//
//   host --> tx FIFO --> uart_tx --> txd
//   rxd  --> uart_rx --> addr_filter --> rx FIFO --> host
//            baud_gen (rate chosen by baud_sel) enables uart_tx and uart_rx
//
// The transmitter pulls a character from the transmit FIFO whenever its buffer
// is empty. The receiver hands every character to the address filter, which
// drops address characters and the data meant for other slaves and writes the
// rest, with their parity and frame error flags, into the receive FIFO. When
// the receive FIFO is full the character stays in the receiver and a further
// frame sets the overrun flag, oerr.
//
// Host interface: tx_wr writes {tx_is_addr, tx_data} when tx_full is 0.
// While rx_empty is 0, rx_data/rx_perr/rx_ferr show the oldest received
// data character, and rx_rd removes it. Status signals on the clk side:
// treg_e (transmit buffer empty), tx_idle, oerr, selected, plus one-cycle pulses
// addr_hit, addr_miss and data_drop. The blocks, their signals and the
// 25 MHz clock follow the document; the FIFO depth, the rate table and the
// host-side handshakes are this design's choices. Both resets are active low;
// assert them together.
module hs_uart
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned BASE_DIV    = 1,
  parameter int unsigned BAUD_STAGES = 8
) (
  input  logic                           clk,        // UART clock, 25 MHz
  input  logic                           rst_n,
  input  logic                           host_clk,
  input  logic                           host_rst_n,
  input  logic [$clog2(BAUD_STAGES)-1:0] baud_sel,
  input  logic [7:0]                     my_addr,
  // serial line
  output logic                           txd,
  input  logic                           rxd,
  // host: transmit
  input  logic                           tx_wr,
  input  logic                           tx_is_addr,
  input  logic [7:0]                     tx_data,
  output logic                           tx_full,
  // host: receive
  input  logic                           rx_rd,
  output logic [7:0]                     rx_data,
  output logic                           rx_perr,
  output logic                           rx_ferr,
  output logic                           rx_empty,
  // status (clk domain)
  output logic                           treg_e,
  output logic                           tx_idle,    // nothing being shifted out
  output logic                           oerr,
  output logic                           selected,
  output logic                           addr_hit,
  output logic                           addr_miss,
  output logic                           data_drop
);

  logic       tick;
  uart_char_t tx_char, host_char;
  logic       txf_empty, tx_load;

  uart_char_t rx_char;
  logic       rx_drdy, rx_read, rx_perr_i, rx_ferr_i;
  rx_word_t   rx_word, flt_word, host_word;
  logic       flt_valid, rxf_full;

  baud_gen #(.BASE_DIV(BASE_DIV), .STAGES(BAUD_STAGES)) u_baud (
    .clk, .rst_n, .sel(baud_sel), .tick
  );

  // ---------------- transmit path ----------------
  assign host_char = '{is_addr: tx_is_addr, data: tx_data};

  async_fifo #(.WIDTH($bits(uart_char_t)), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .wclk(host_clk), .wrst_n(host_rst_n), .wr_en(tx_wr), .wdata(host_char), .full(tx_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(tx_load), .rdata(tx_char), .empty(txf_empty)
  );

  assign tx_load = treg_e && !txf_empty;

  uart_tx u_tx (
    .clk, .rst_n, .tick, .load(tx_load), .din(tx_char), .treg_e, .tsr_e(tx_idle), .txd
  );

  // ---------------- receive path ----------------
  uart_rx u_rx (
    .clk, .rst_n, .tick, .rxd, .read(rx_read), .dout(rx_char), .drdy(rx_drdy),
    .perr(rx_perr_i), .ferr(rx_ferr_i), .oerr
  );

  assign rx_word = '{ferr: rx_ferr_i, perr: rx_perr_i, ch: rx_char};

  addr_filter u_filter (
    .clk, .rst_n, .my_addr,
    .in_valid(rx_drdy), .in_word(rx_word), .in_ready(rx_read),
    .out_valid(flt_valid), .out_word(flt_word), .out_ready(!rxf_full),
    .selected, .hit(addr_hit), .miss(addr_miss), .drop(data_drop)
  );

  async_fifo #(.WIDTH($bits(rx_word_t)), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(flt_valid && !rxf_full), .wdata(flt_word), .full(rxf_full),
    .rclk(host_clk), .rrst_n(host_rst_n), .rd_en(rx_rd), .rdata(host_word), .empty(rx_empty)
  );

  assign rx_data = host_word.ch.data;
  assign rx_perr = host_word.perr;
  assign rx_ferr = host_word.ferr;

endmodule
