// phal_fpga_top: one FPGA of a software-radio platform, running a digital
// down converter as an application object inside the P-HAL middleware layer.
//
// The object (ddc_filter) only sees a FIFO of input samples, a FIFO for its
// output samples, a coefficient port and an enable/reset control word. The
// P-HAL layer around it supplies all of that from the board's physical
// interfaces, so the same object could run behind a different set of
// interfaces:
//   * control_port: serial link from the platform master. It writes and
//     reads the filter coefficients, the control word, the routing table
//     and the object's addresses; after reset it asks the master once for
//     the object's initialisation parameters (request for REG_COEF0).
//   * daisy_itf x2 (left, right) and ibus_itf (local bus): physical ports
//     carrying packets.
//   * packet_router: arbiter of the internal bus and routing table. Packets
//     addressed to this object's input interface go through rx_depacketizer
//     into the 256-word input FIFO; others are forwarded by the table.
//   * tx_packetizer: when 28 output samples wait in the 256-word output
//     FIFO, builds a packet to the configured destination, time-stamped by
//     time_status.
//   * time_status: time register, control word, run window, status, the
//     packet age check and the processing deadline (input still waiting in
//     the input FIFO when the run window closes).
//   * ram_adapter: the RAM adaptation service. This object keeps its tables
//     in internal RAM and does not use it, so its object side is brought
//     out as ports (ram_*) next to the SRAM pins, for an object that does.
// Registers beyond those of the blocks (all through the control port):
//   REG_OBJ   {8'b0, obj id[3:0], input itf[3:0]}; the output interface is
//             input itf + 1
//   REG_DEST  {8'b0, dst_obj[3:0], dst_itf[3:0]} of the output packets
// The set of blocks and how they connect follows the document's
// implementation case; register map, default object id 1, input interface
// 0 and the start-up parameter request are this design's choices.
module phal_fpga_top
  import phal_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 256,
  parameter int unsigned ITF_DEPTH    = 64,
  parameter int unsigned PAYLOAD_LEN  = 28,
  parameter int unsigned CLKS_PER_BIT = 4,
  parameter int unsigned SRAM_ADDR_W  = 18,
  parameter int unsigned SRAM_WAIT    = 2,
  parameter logic [3:0]  OBJ_ID       = 4'd1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // serial control interface
  input  logic                   ser_in,
  output logic                   ser_out,
  // on-board time interface
  input  logic                   time_load,
  input  logic [31:0]            time_in,
  // left daisy chain
  input  logic                   l_rx_valid,
  input  logic [15:0]            l_rx_data,
  output logic                   l_tx_valid,
  output logic [15:0]            l_tx_data,
  input  logic                   l_tx_ready,
  // right daisy chain
  input  logic                   r_rx_valid,
  input  logic [15:0]            r_rx_data,
  output logic                   r_tx_valid,
  output logic [15:0]            r_tx_data,
  input  logic                   r_tx_ready,
  // local bus
  input  logic                   bus_cs,
  input  logic                   bus_we,
  input  logic                   bus_addr,
  input  logic [15:0]            bus_wdata,
  output logic [15:0]            bus_rdata,
  output logic                   bus_rvalid,
  // RAM adaptation service, object side
  input  logic                   ram_en,
  input  logic                   ram_we,
  input  logic [SRAM_ADDR_W-1:0] ram_addr,
  input  logic [15:0]            ram_wdata,
  output logic [15:0]            ram_rdata,
  output logic                   ram_rvalid,
  output logic                   ram_wait,
  // external SRAM
  output logic                   sram_ce_n,
  output logic                   sram_we_n,
  output logic                   sram_oe_n,
  output logic [SRAM_ADDR_W-1:0] sram_addr,
  output logic [15:0]            sram_dq_out,
  output logic                   sram_dq_oe,
  input  logic [15:0]            sram_dq_in
);
  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);

  // ---------------- control port and register bus ----------------
  logic        reg_we, reg_re;
  logic [6:0]  reg_addr;
  logic [15:0] reg_wdata, reg_rdata, ts_rdata, rt_rdata;
  logic        init_req, req_ready;
  logic [3:0]  my_obj, my_in_itf, dst_obj, dst_itf;

  control_port #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_ctrl (
    .clk, .rst_n, .ser_in, .ser_out,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata,
    .req_valid(init_req), .req_addr(REG_COEF0), .req_ready
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_req  <= 1'b1;
      my_obj    <= OBJ_ID;
      my_in_itf <= 4'd0;
      dst_obj   <= '0;
      dst_itf   <= '0;
    end else begin
      if (req_ready) init_req <= 1'b0;
      if (reg_we && reg_addr == REG_OBJ)  {my_obj, my_in_itf} <= reg_wdata[7:0];
      if (reg_we && reg_addr == REG_DEST) {dst_obj, dst_itf}  <= reg_wdata[7:0];
    end
  end

  // ---------------- time and status ----------------
  logic [31:0] now, rx_ts;
  logic        obj_enable, obj_reset, rx_ts_valid, late_pkt, deadline_miss;
  logic        in_ovr, out_ovr, l_ovr, r_ovr, b_ovr;
  logic        in_empty;

  time_status u_time (
    .clk, .rst_n, .time_load, .time_in, .now,
    .reg_we, .reg_addr, .reg_wdata, .reg_re, .rdata(ts_rdata),
    .obj_enable, .obj_reset,
    .obj_running(obj_enable && !obj_reset),
    .obj_pending(!in_empty),
    .in_overrun(in_ovr), .out_overrun(out_ovr), .itf_overrun(l_ovr || r_ovr || b_ovr),
    .pkt_ts_valid(rx_ts_valid), .pkt_ts(rx_ts), .late_pkt, .deadline_miss
  );

  // ---------------- object: down converter ----------------
  logic        in_full, in_pop, in_push;
  word_t       in_rdata, in_wdata;
  logic [FCW-1:0] in_count, out_count;
  logic        y_valid, y_ready, out_empty, out_full, out_pop;
  word_t       y_data, out_rdata;
  logic        coef_busy, f_stall;
  logic signed [15:0] coef_rdata;
  logic        coef_sel;

  assign coef_sel = (reg_addr <= REG_COEFC);

  ddc_filter u_filter (
    .clk, .rst_n, .soft_rst(obj_reset), .enable(obj_enable),
    .in_valid(!in_empty), .in_data(in_rdata), .in_pop,
    .out_valid(y_valid), .out_data(y_data), .out_ready(y_ready),
    .coef_we(reg_we && coef_sel), .coef_addr(reg_addr[3:0]), .coef_wdata(reg_wdata),
    .coef_busy, .coef_raddr(reg_addr[3:0]), .coef_rdata,
    .stall(f_stall)
  );

  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .push(in_push), .wdata(in_wdata), .pop(in_pop), .rdata(in_rdata),
    .empty(in_empty), .full(in_full), .count(in_count), .overrun(in_ovr)
  );

  assign y_ready = !out_full;
  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .push(y_valid && y_ready), .wdata(y_data), .pop(out_pop), .rdata(out_rdata),
    .empty(out_empty), .full(out_full), .count(out_count), .overrun(out_ovr)
  );

  // ---------------- packet layer ----------------
  logic [N_SRC-1:0]       src_valid, src_last, src_ready;
  logic [N_SRC-1:0][15:0] src_data;
  logic [2:0]             port_valid, port_ready;
  word_t                  ibus_data;
  logic                   ibus_last, loc_valid, loc_ready, route_ev, drop_ev;
  addr_word_t             rx_src;

  tx_packetizer #(.PAYLOAD_LEN(PAYLOAD_LEN), .CNT_W(FCW)) u_pktz (
    .clk, .rst_n,
    .fifo_count(out_count), .fifo_rdata(out_rdata), .fifo_pop(out_pop),
    .src_obj(my_obj), .src_itf(my_in_itf + 4'd1), .dst_obj, .dst_itf, .now,
    .pkt_valid(src_valid[SRC_LOCAL]), .pkt_data(src_data[SRC_LOCAL]),
    .pkt_last(src_last[SRC_LOCAL]), .pkt_ready(src_ready[SRC_LOCAL])
  );

  rx_depacketizer u_depkt (
    .clk, .rst_n,
    .pkt_valid(loc_valid), .pkt_data(ibus_data), .pkt_last(ibus_last), .pkt_ready(loc_ready),
    .fifo_push(in_push), .fifo_wdata(in_wdata), .fifo_full(in_full),
    .ts_valid(rx_ts_valid), .ts(rx_ts), .src(rx_src)
  );

  packet_router u_router (
    .clk, .rst_n, .my_obj, .my_in_itf,
    .src_valid, .src_data, .src_last, .src_ready,
    .port_valid, .bus_data(ibus_data), .bus_last(ibus_last), .port_ready,
    .loc_valid, .loc_ready,
    .reg_we, .reg_addr, .reg_wdata, .rdata(rt_rdata),
    .route_ev, .drop_ev
  );

  daisy_itf #(.DEPTH(ITF_DEPTH)) u_l_itf (
    .clk, .rst_n,
    .link_rx_valid(l_rx_valid), .link_rx_data(l_rx_data),
    .link_tx_valid(l_tx_valid), .link_tx_data(l_tx_data), .link_tx_ready(l_tx_ready),
    .rx_valid(src_valid[SRC_LEFT]), .rx_data(src_data[SRC_LEFT]),
    .rx_last(src_last[SRC_LEFT]), .rx_ready(src_ready[SRC_LEFT]),
    .tx_valid(port_valid[PORT_LEFT]), .tx_data(ibus_data), .tx_ready(port_ready[PORT_LEFT]),
    .overrun(l_ovr)
  );

  daisy_itf #(.DEPTH(ITF_DEPTH)) u_r_itf (
    .clk, .rst_n,
    .link_rx_valid(r_rx_valid), .link_rx_data(r_rx_data),
    .link_tx_valid(r_tx_valid), .link_tx_data(r_tx_data), .link_tx_ready(r_tx_ready),
    .rx_valid(src_valid[SRC_RIGHT]), .rx_data(src_data[SRC_RIGHT]),
    .rx_last(src_last[SRC_RIGHT]), .rx_ready(src_ready[SRC_RIGHT]),
    .tx_valid(port_valid[PORT_RIGHT]), .tx_data(ibus_data), .tx_ready(port_ready[PORT_RIGHT]),
    .overrun(r_ovr)
  );

  ibus_itf #(.DEPTH(ITF_DEPTH)) u_ibus (
    .clk, .rst_n,
    .bus_cs, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .rx_valid(src_valid[SRC_IBUS]), .rx_data(src_data[SRC_IBUS]),
    .rx_last(src_last[SRC_IBUS]), .rx_ready(src_ready[SRC_IBUS]),
    .tx_valid(port_valid[PORT_IBUS]), .tx_data(ibus_data), .tx_ready(port_ready[PORT_IBUS]),
    .overrun(b_ovr)
  );

  // ---------------- RAM adaptation ----------------
  ram_adapter #(.ADDR_W(SRAM_ADDR_W), .DATA_W(16), .WAIT_STATES(SRAM_WAIT)) u_ram (
    .clk, .rst_n,
    .obj_en(ram_en), .obj_we(ram_we), .obj_addr(ram_addr), .obj_wdata(ram_wdata),
    .obj_rdata(ram_rdata), .obj_rvalid(ram_rvalid), .obj_wait(ram_wait),
    .sram_ce_n, .sram_we_n, .sram_oe_n, .sram_addr, .sram_dq_out, .sram_dq_oe, .sram_dq_in
  );

  // ---------------- register read mux ----------------
  always_comb begin
    if (coef_sel)                              reg_rdata = coef_rdata;
    else if (reg_addr == REG_OBJ)              reg_rdata = {8'b0, my_obj, my_in_itf};
    else if (reg_addr == REG_DEST)             reg_rdata = {8'b0, dst_obj, dst_itf};
    else if (reg_addr[6:4] == REG_ROUTE0[6:4]) reg_rdata = rt_rdata;
    else                                       reg_rdata = ts_rdata;
  end

endmodule
