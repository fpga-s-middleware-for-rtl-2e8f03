// packet_router: internal-bus arbiter and packet routing table.
//
// All packet traffic of the FPGA crosses one internal bus, one 16-bit word
// per clock. Four sources offer packets (left and right daisy chains, the
// local bus, and the object's packetizer); a round-robin arbiter grants the
// bus to one of them for a whole packet, from its first word to the word
// marked last. On the first word (the address word, see phal_pkg) the
// destination is chosen:
//   * dst_obj equal to this object's id and dst_itf equal to its input
//     interface: the object's receive path (local);
//   * any other dst_obj: the physical port stored for that object in the
//     routing table (left, right, local bus, or drop);
//   * this object's id with an unknown interface: drop.
// A dropped packet is read and discarded so it cannot block the bus.
// The table has one 2-bit entry per object id (16), written by the control
// port at REG_ROUTE0 + id and read back on rdata.
// Timing: one idle clock to choose the route, then one word per clock while
// the destination is ready. route_ev pulses when a route is chosen,
// drop_ev when it is "drop".
// Routing by a table that the platform master writes through the control
// port, packet transfer and a bus arbiter follow the document; round-robin
// order, whole-packet grants and the table format are this design's
// choices.
module packet_router
  import phal_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [3:0]              my_obj,
  input  logic [3:0]              my_in_itf,
  // sources: SRC_LEFT, SRC_RIGHT, SRC_IBUS, SRC_LOCAL
  input  logic [N_SRC-1:0]        src_valid,
  input  logic [N_SRC-1:0][15:0]  src_data,
  input  logic [N_SRC-1:0]        src_last,
  output logic [N_SRC-1:0]        src_ready,
  // destinations: left, right, local bus (indexed by port_e), local object
  output logic [2:0]              port_valid,
  output word_t                   bus_data,
  output logic                    bus_last,
  input  logic [2:0]              port_ready,
  output logic                    loc_valid,
  input  logic                    loc_ready,
  // routing table access
  input  logic                    reg_we,
  input  logic [6:0]              reg_addr,
  input  logic [15:0]             reg_wdata,
  output logic [15:0]             rdata,
  // events
  output logic                    route_ev,
  output logic                    drop_ev
);
  localparam int unsigned SW = $clog2(N_SRC);

  port_e          table_q [16];
  logic           busy, to_local;
  port_e          dest;
  logic [SW-1:0]  grant, rr, pick;
  logic           any_req;
  addr_word_t     aw;
  logic           dst_ready, xfer;

  // round-robin choice starting at rr
  always_comb begin
    any_req = 1'b0;
    pick    = rr;
    for (int k = N_SRC - 1; k >= 0; k--) begin
      if (src_valid[SW'(32'(rr) + k)]) begin
        any_req = 1'b1;
        pick    = SW'(32'(rr) + k);
      end
    end
  end

  assign aw       = src_data[pick];
  assign bus_data = src_data[grant];
  assign bus_last = src_last[grant];

  always_comb begin
    dst_ready  = to_local ? loc_ready : (dest == PORT_DROP) ? 1'b1 : port_ready[dest];
    loc_valid  = busy && to_local && src_valid[grant];
    port_valid = '0;
    if (busy && !to_local && dest != PORT_DROP) port_valid[dest] = src_valid[grant];
    src_ready  = '0;
    if (busy) src_ready[grant] = dst_ready;
  end
  assign xfer = busy && src_valid[grant] && dst_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      to_local <= 1'b0;
      dest     <= PORT_DROP;
      grant    <= '0;
      rr       <= '0;
      route_ev <= 1'b0;
      drop_ev  <= 1'b0;
      for (int i = 0; i < 16; i++) table_q[i] <= PORT_DROP;
    end else begin
      route_ev <= 1'b0;
      drop_ev  <= 1'b0;
      if (!busy && any_req) begin
        busy     <= 1'b1;
        grant    <= pick;
        route_ev <= 1'b1;
        if (aw.dst_obj == my_obj) begin
          to_local <= (aw.dst_itf == my_in_itf);
          dest     <= PORT_DROP;
          drop_ev  <= (aw.dst_itf != my_in_itf);
        end else begin
          to_local <= 1'b0;
          dest     <= table_q[aw.dst_obj];
          drop_ev  <= (table_q[aw.dst_obj] == PORT_DROP);
        end
      end else if (xfer && bus_last) begin
        busy <= 1'b0;
        rr   <= grant + 1'b1;
      end
      if (reg_we && reg_addr[6:4] == REG_ROUTE0[6:4])
        table_q[reg_addr[3:0]] <= port_e'(reg_wdata[1:0]);
    end
  end

  assign rdata = (reg_addr[6:4] == REG_ROUTE0[6:4]) ? {14'b0, table_q[reg_addr[3:0]]} : '0;

  // a granted source keeps its packet on the bus until the last word
  assert property (@(posedge clk) disable iff (!rst_n)
                   busy && src_valid[grant] && !dst_ready |=> busy && src_valid[grant]);

endmodule
