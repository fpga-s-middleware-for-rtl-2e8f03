// control_port: serial management port of the P-HAL layer.
//
// A platform master reaches the object's parameters and the layer's
// registers over a two-wire bidirectional serial link (ser_in, ser_out),
// both idle high, one bit every CLKS_PER_BIT clocks, most significant bit
// first.
//   Inbound frame:   start bit 0, then 24 bits {wr, addr[6:0], data[15:0]}.
//                    wr = 1 writes data to addr; wr = 0 reads addr (the
//                    data bits are sent but ignored).
//   Outbound frame:  start bit 0, then 17 bits {kind, payload[15:0]}, then
//                    the line returns high for at least one bit time.
//                    kind = 0: reply to a read, payload = register value.
//                    kind = 1: request from the object for parameter
//                    payload[6:0] (e.g. its initialisation values); the
//                    master answers with write frames.
// Inbound bits are sampled in the middle of each bit time. After a frame,
// reg_we or reg_re pulses for one clock with reg_addr/reg_wdata; on a read
// reg_rdata is taken in that same clock and sent back. A request waiting
// on req_valid is sent when the transmitter is free (req_ready pulses).
// The serial port, reading and modifying parameters and object-initiated
// requests follow the document; framing, bit order and rate are this
// design's choices.
module control_port #(
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ser_in,
  output logic        ser_out,
  // register bus
  output logic        reg_we,
  output logic        reg_re,
  output logic [6:0]  reg_addr,
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata,
  // parameter requests from the object
  input  logic        req_valid,
  input  logic [6:0]  req_addr,
  output logic        req_ready
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned RX_BITS = 24;
  localparam int unsigned TX_BITS = 19;   // start + 17 + one stop bit

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA} rx_state_e;
  rx_state_e          rx_state;
  logic [CW-1:0]      rx_cnt;
  logic [4:0]         rx_nbits;
  logic [RX_BITS-1:0] rx_sh;
  logic               ser_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ser_q     <= 1'b1;
      rx_state  <= RX_IDLE;
      rx_cnt    <= '0;
      rx_nbits  <= '0;
      rx_sh     <= '0;
      reg_we    <= 1'b0;
      reg_re    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
    end else begin
      ser_q  <= ser_in;
      reg_we <= 1'b0;
      reg_re <= 1'b0;
      case (rx_state)
        RX_IDLE: if (!ser_q) begin
          rx_state <= RX_START;
          rx_cnt   <= CW'(CLKS_PER_BIT / 2);
        end
        RX_START: begin
          if (rx_cnt == 0) begin
            // middle of the start bit: a glitch returns to idle
            rx_state <= ser_q ? RX_IDLE : RX_DATA;
            rx_cnt   <= CW'(CLKS_PER_BIT - 1);
            rx_nbits <= '0;
          end else rx_cnt <= rx_cnt - 1'b1;
        end
        RX_DATA: begin
          if (rx_cnt == 0) begin
            rx_sh    <= {rx_sh[RX_BITS-2:0], ser_q};
            rx_cnt   <= CW'(CLKS_PER_BIT - 1);
            rx_nbits <= rx_nbits + 1'b1;
            if (rx_nbits == 5'(RX_BITS - 1)) begin
              rx_state  <= RX_IDLE;
              reg_we    <= rx_sh[RX_BITS-2];
              reg_re    <= !rx_sh[RX_BITS-2];
              reg_addr  <= rx_sh[RX_BITS-3 -: 7];
              reg_wdata <= {rx_sh[14:0], ser_q};
            end
          end else rx_cnt <= rx_cnt - 1'b1;
        end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  // ---------------- transmitter ----------------
  logic [TX_BITS-1:0] tx_sh;
  logic [4:0]         tx_nbits;
  logic [CW-1:0]      tx_cnt;
  logic               tx_busy;
  logic               rd_pending;
  logic [15:0]        rd_data;

  assign ser_out   = tx_busy ? tx_sh[TX_BITS-1] : 1'b1;
  assign req_ready = !tx_busy && !rd_pending && req_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh      <= '1;
      tx_nbits   <= '0;
      tx_cnt     <= '0;
      tx_busy    <= 1'b0;
      rd_pending <= 1'b0;
      rd_data    <= '0;
    end else begin
      if (reg_re) begin
        rd_pending <= 1'b1;
        rd_data    <= reg_rdata;
      end
      if (tx_busy) begin
        if (tx_cnt == 0) begin
          tx_sh  <= {tx_sh[TX_BITS-2:0], 1'b1};
          tx_cnt <= CW'(CLKS_PER_BIT - 1);
          tx_nbits <= tx_nbits + 1'b1;
          if (tx_nbits == 5'(TX_BITS - 1)) tx_busy <= 1'b0;
        end else tx_cnt <= tx_cnt - 1'b1;
      end else if (rd_pending) begin
        tx_busy    <= 1'b1;
        rd_pending <= 1'b0;
        tx_sh      <= {1'b0, 1'b0, rd_data, 1'b1};
        tx_cnt     <= CW'(CLKS_PER_BIT - 1);
        tx_nbits   <= '0;
      end else if (req_valid) begin
        tx_busy    <= 1'b1;
        tx_sh      <= {1'b0, 1'b1, 9'b0, req_addr, 1'b1};
        tx_cnt     <= CW'(CLKS_PER_BIT - 1);
        tx_nbits   <= '0;
      end
    end
  end

endmodule
