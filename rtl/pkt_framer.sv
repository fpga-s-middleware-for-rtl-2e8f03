// pkt_framer: recovers packet boundaries on a word stream.
//
// Physical links carry packets as bare 16-bit words. This helper watches
// the words leaving a receive FIFO, reads the payload length from header
// word 1 and raises last on word 3 + length, so the internal bus can hand
// whole packets to the router. It passes valid/data/ready through and only
// adds last; its counter advances on every accepted word. The length-based
// framing follows the header layout chosen in phal_pkg.
module pkt_framer
  import phal_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  word_t data,
  input  logic  ready,
  output logic  last
);
  logic [15:0] idx, len;
  logic        take;

  assign take = valid && ready;
  assign last = valid && (idx >= 16'd3) && (idx == len + 16'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      len <= '0;
    end else if (take) begin
      if (idx == 16'd1) len <= data;
      idx <= last ? '0 : idx + 1'b1;
    end
  end

endmodule
