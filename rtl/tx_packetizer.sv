// tx_packetizer: builds packets from the object's output FIFO.
//
// The object writes its output as if into a plain FIFO. When PAYLOAD_LEN
// words are waiting, this block emits one packet on its stream output:
// the four header words (destination and origin object/interface, payload
// length, origin time stamp taken when the packet starts) followed by
// PAYLOAD_LEN words popped from the FIFO. Stream handshake: a word moves
// when pkt_valid and pkt_ready are both high; pkt_last marks the final
// word. The FIFO is first-word fall-through, so a payload word is popped in
// the cycle it is accepted. "A packet is constructed when enough data are
// available" follows the document; the header layout (see phal_pkg) and
// the payload length of 28 words, which makes a 32-word, 64-byte packet
// that fits one local-bus burst, are this design's choices.
module tx_packetizer
  import phal_pkg::*;
#(
  parameter int unsigned PAYLOAD_LEN = 28,
  parameter int unsigned CNT_W       = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  // output FIFO of the object
  input  logic [CNT_W-1:0] fifo_count,
  input  word_t            fifo_rdata,
  output logic             fifo_pop,
  // addressing and time
  input  logic [3:0]       src_obj,
  input  logic [3:0]       src_itf,
  input  logic [3:0]       dst_obj,
  input  logic [3:0]       dst_itf,
  input  logic [31:0]      now,
  // packet stream
  output logic             pkt_valid,
  output word_t            pkt_data,
  output logic             pkt_last,
  input  logic             pkt_ready
);
  typedef enum logic [2:0] {S_IDLE, S_H0, S_H1, S_H2, S_H3, S_PAY} state_e;
  state_e      state;
  logic [31:0] ts;
  logic [$clog2(PAYLOAD_LEN+1)-1:0] left;
  addr_word_t  aw;

  assign aw = '{dst_obj: dst_obj, dst_itf: dst_itf, src_obj: src_obj, src_itf: src_itf};

  always_comb begin
    pkt_valid = (state != S_IDLE);
    pkt_last  = (state == S_PAY) && (left == 1);
    case (state)
      S_H0:    pkt_data = aw;
      S_H1:    pkt_data = word_t'(PAYLOAD_LEN);
      S_H2:    pkt_data = ts[31:16];
      S_H3:    pkt_data = ts[15:0];
      S_PAY:   pkt_data = fifo_rdata;
      default: pkt_data = '0;
    endcase
    fifo_pop = (state == S_PAY) && pkt_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ts    <= '0;
      left  <= '0;
    end else begin
      case (state)
        S_IDLE: if (fifo_count >= CNT_W'(PAYLOAD_LEN)) begin
          state <= S_H0;
          ts    <= now;
          left  <= $bits(left)'(PAYLOAD_LEN);
        end
        S_H0: if (pkt_ready) state <= S_H1;
        S_H1: if (pkt_ready) state <= S_H2;
        S_H2: if (pkt_ready) state <= S_H3;
        S_H3: if (pkt_ready) state <= S_PAY;
        S_PAY: if (pkt_ready) begin
          left <= left - 1'b1;
          if (left == 1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a payload word is only taken from a FIFO that holds one
  assert property (@(posedge clk) disable iff (!rst_n) fifo_pop |-> fifo_count != 0);

endmodule
