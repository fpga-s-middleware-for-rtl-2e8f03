// daisy_itf: daisy-chain physical interface (L_ITF / R_ITF).
//
// Connects the FPGA to a neighbour board on a daisy chain. The link is a
// 16-bit word path in each direction. Receive words (link_rx_valid,
// link_rx_data) arrive without flow control and are buffered in a
// DEPTH-word FIFO; a word that finds it full is lost and raises overrun,
// which the status monitor records. The buffered words are offered to the
// internal bus as a packet stream with last recovered from the header
// length. Transmit packets from the internal bus are buffered in a second
// DEPTH-word FIFO and sent while the neighbour shows link_tx_ready.
// The two daisy-chain interfaces follow the document; the link signals,
// buffering and overrun behaviour are this design's choices.
module daisy_itf
  import phal_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  // external link
  input  logic  link_rx_valid,
  input  word_t link_rx_data,
  output logic  link_tx_valid,
  output word_t link_tx_data,
  input  logic  link_tx_ready,
  // internal bus: packets received
  output logic  rx_valid,
  output word_t rx_data,
  output logic  rx_last,
  input  logic  rx_ready,
  // internal bus: packets to send
  input  logic  tx_valid,
  input  word_t tx_data,
  output logic  tx_ready,
  output logic  overrun
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic          rx_empty, tx_empty, tx_full;
  logic [CW-1:0] rx_count, tx_count;
  logic          rx_full_unused, tx_ovr_unused;

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .push(link_rx_valid), .wdata(link_rx_data),
    .pop(rx_valid && rx_ready), .rdata(rx_data),
    .empty(rx_empty), .full(rx_full_unused), .count(rx_count), .overrun(overrun)
  );
  assign rx_valid = !rx_empty;

  pkt_framer u_framer (
    .clk, .rst_n, .valid(rx_valid), .data(rx_data), .ready(rx_ready), .last(rx_last)
  );

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .push(tx_valid && tx_ready), .wdata(tx_data),
    .pop(link_tx_valid && link_tx_ready), .rdata(link_tx_data),
    .empty(tx_empty), .full(tx_full), .count(tx_count), .overrun(tx_ovr_unused)
  );
  assign tx_ready      = !tx_full;
  assign link_tx_valid = !tx_empty;

endmodule
