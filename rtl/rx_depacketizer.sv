// rx_depacketizer: delivers incoming packets' payload to the object.
//
// Packets routed to the object arrive on a stream (valid/ready/last). The
// four header words are consumed here: the origin time stamp is reported
// on ts_valid/ts for the monitor's arrival-time check and the origin on
// src. Payload words are pushed into the object's input FIFO, from which
// the object reads as from an ordinary FIFO. The stream is held off
// (pkt_ready low) while the FIFO is full, so no word is lost. Packet
// delivery into an internal FIFO follows the document; the header layout
// is this design's (see phal_pkg).
module rx_depacketizer
  import phal_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pkt_valid,
  input  word_t       pkt_data,
  input  logic        pkt_last,
  output logic        pkt_ready,
  // input FIFO of the object
  output logic        fifo_push,
  output word_t       fifo_wdata,
  input  logic        fifo_full,
  // header information
  output logic        ts_valid,
  output logic [31:0] ts,
  output addr_word_t  src
);
  logic [2:0]  hdr_idx;     // 0..3 header word, 4 payload
  logic [15:0] ts_hi;
  logic        in_hdr, take;

  assign in_hdr     = (hdr_idx < 3'd4);
  assign pkt_ready  = in_hdr || !fifo_full;
  assign take       = pkt_valid && pkt_ready;
  assign fifo_push  = take && !in_hdr;
  assign fifo_wdata = pkt_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_idx  <= '0;
      ts_hi    <= '0;
      ts       <= '0;
      ts_valid <= 1'b0;
      src      <= '0;
    end else begin
      ts_valid <= 1'b0;
      if (take) begin
        if (pkt_last)    hdr_idx <= '0;
        else if (in_hdr) hdr_idx <= hdr_idx + 1'b1;
        case (hdr_idx)
          3'd0: src   <= pkt_data;
          3'd2: ts_hi <= pkt_data;
          3'd3: begin
            ts       <= {ts_hi, pkt_data};
            ts_valid <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
