// phal_pkg: types and constants shared by the P-HAL FPGA layer and its
// down-converter object.
//
// Data moves inside the layer as 16-bit words grouped into packets. A packet
// is a four-word header followed by LEN payload words:
//   word 0  {dst_obj[3:0], dst_itf[3:0], src_obj[3:0], src_itf[3:0]}
//   word 1  payload length in words
//   word 2  origin time stamp [31:16]
//   word 3  origin time stamp [15:0]
// The header carries origin and destination object and interface and the
// origin time stamp, as the architecture requires; the field widths and
// the word order are this design's own choice.
package phal_pkg;

  localparam int unsigned WORD_W   = 16;   // internal bus and FIFO word
  localparam int unsigned HDR_WORDS = 4;

  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic [3:0] dst_obj;
    logic [3:0] dst_itf;
    logic [3:0] src_obj;
    logic [3:0] src_itf;
  } addr_word_t;

  // Physical ports reachable through the internal bus. The routing table
  // stores one of these per destination object.
  typedef enum logic [1:0] {
    PORT_LEFT  = 2'd0,   // L_ITF daisy chain
    PORT_RIGHT = 2'd1,   // R_ITF daisy chain
    PORT_IBUS  = 2'd2,   // local bus
    PORT_DROP  = 2'd3    // no route: packet is discarded
  } port_e;

  // Packet sources on the internal bus, in round-robin order.
  localparam int unsigned N_SRC = 4;
  localparam int unsigned SRC_LEFT  = 0;
  localparam int unsigned SRC_RIGHT = 1;
  localparam int unsigned SRC_IBUS  = 2;
  localparam int unsigned SRC_LOCAL = 3;

  // Control-port register map (7-bit register address).
  localparam logic [6:0] REG_COEF0   = 7'h00;  // 0x00..0x0C: h[0],h[2]..h[24]
  localparam logic [6:0] REG_COEFC   = 7'h0D;  // centre tap h[25]
  localparam logic [6:0] REG_CTRL    = 7'h10;  // control word
  localparam logic [6:0] REG_STATUS  = 7'h11;  // status (read only)
  localparam logic [6:0] REG_TIME_HI = 7'h12;  // time register [31:16]
  localparam logic [6:0] REG_TIME_LO = 7'h13;  // time register [15:0]
  localparam logic [6:0] REG_OBJ     = 7'h14;  // {own obj id, in itf, out itf}
  localparam logic [6:0] REG_DEST    = 7'h15;  // {dst_obj, dst_itf} of output
  localparam logic [6:0] REG_MAXLAT  = 7'h16;  // allowed packet age, cycles
  localparam logic [6:0] REG_LATE    = 7'h17;  // late packet count (read)
  localparam logic [6:0] REG_WSTART_HI = 7'h18; // run window start [31:16]
  localparam logic [6:0] REG_WSTART_LO = 7'h19; // run window start [15:0]
  localparam logic [6:0] REG_WSTOP_HI  = 7'h1A; // run window stop [31:16]
  localparam logic [6:0] REG_WSTOP_LO  = 7'h1B; // run window stop [15:0]
  localparam logic [6:0] REG_MISSED    = 7'h1C; // missed deadline count (read)
  localparam logic [6:0] REG_ROUTE0  = 7'h20;  // 0x20..0x2F routing table

  // Control word bits (REG_CTRL).
  localparam int unsigned CTRL_ENABLE = 0;
  localparam int unsigned CTRL_RESET  = 1;
  localparam int unsigned CTRL_TIMED  = 2;   // run only inside the window

endpackage
