// ibus_itf: local-bus interface (IBUS) of the FPGA.
//
// The board's local bus is synchronous and moves bursts of up to
// MAX_BURST 16-bit words (32 words = 64 bytes). The FPGA is a bus slave
// with two addresses:
//   addr 0  data port: a write pushes a word into the receive FIFO, a read
//           pops a word from the transmit FIFO (0 when it is empty)
//   addr 1  status (read): {tx words waiting[7:0], rx words free[7:0]}
// A bus cycle is one clock with bus_cs high; a burst is a run of
// consecutive such cycles. Read data comes back one clock later on
// bus_rdata with bus_rvalid. Both FIFOs hold DEPTH = 64 words, two full
// bursts, so a master can write a burst while the previous one is being
// routed. A write that finds the receive FIFO full is lost and raises
// overrun. Received words go to the internal bus as a packet stream with
// last recovered from the header length. The 64-byte synchronous bursts
// and the two-burst buffering follow the document; the address map and
// the read latency are this design's choices.
module ibus_itf
  import phal_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned MAX_BURST = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  // local bus
  input  logic  bus_cs,
  input  logic  bus_we,
  input  logic  bus_addr,
  input  word_t bus_wdata,
  output word_t bus_rdata,
  output logic  bus_rvalid,
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
  logic          rx_empty, rx_full, tx_empty, tx_full, tx_ovr_unused;
  logic [CW-1:0] rx_count, tx_count;
  word_t         tx_head;
  logic          wr_data, rd_data, rd_stat;
  logic [7:0]    burst_len;

  assign wr_data = bus_cs && bus_we && !bus_addr;
  assign rd_data = bus_cs && !bus_we && !bus_addr;
  assign rd_stat = bus_cs && !bus_we && bus_addr;

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .push(wr_data), .wdata(bus_wdata),
    .pop(rx_valid && rx_ready), .rdata(rx_data),
    .empty(rx_empty), .full(rx_full), .count(rx_count), .overrun(overrun)
  );
  assign rx_valid = !rx_empty;

  pkt_framer u_framer (
    .clk, .rst_n, .valid(rx_valid), .data(rx_data), .ready(rx_ready), .last(rx_last)
  );

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .push(tx_valid && tx_ready), .wdata(tx_data),
    .pop(rd_data), .rdata(tx_head),
    .empty(tx_empty), .full(tx_full), .count(tx_count), .overrun(tx_ovr_unused)
  );
  assign tx_ready = !tx_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
      burst_len  <= '0;
    end else begin
      bus_rvalid <= rd_data || rd_stat;
      if (rd_data)      bus_rdata <= tx_empty ? '0 : tx_head;
      else if (rd_stat) bus_rdata <= {8'(tx_count), 8'(CW'(DEPTH) - rx_count)};
      burst_len <= bus_cs ? burst_len + 1'b1 : '0;
    end
  end

  // bus rule: a burst is at most MAX_BURST data words
  assert property (@(posedge clk) disable iff (!rst_n)
                   bus_cs |-> burst_len < 8'(MAX_BURST + 1))
    else $error("local bus burst longer than %0d words", MAX_BURST + 1);

endmodule
