// tb_phal_fpga_top: end-to-end test of the FPGA at its default parameters.
//
// The testbench plays the platform master on the serial port, the two
// neighbour boards on the daisy chains, a local-bus master and the SRAM.
// It configures the layer (time, coefficients, routing table, output
// destination, packet age bound), streams 40 packets of 28 ten-bit samples
// into the object and checks every filtered output sample, carried back in
// packets, against a reference computed here from the filter equation.
// Along the way it makes each mechanism of the design happen and counts
// it: the start-up parameter request, coefficient loading and read-back,
// time loading, routing to the object, to the right port, to the local bus
// and on to the left port, a dropped packet, a late packet, back-pressure
// from a held-off port that stalls the internal bus, a change of output
// destination (mode switch), a timed run window, an interface overrun, a
// window that closes with input still waiting (missed deadline), an
// object reset, and SRAM accesses through the RAM adaptation. A mechanism that never happened counts as a failure.
module tb_phal_fpga_top;
  import phal_pkg::*;
  localparam int CPB = 4, PL = 28, NPK = 40, NE = 26, NU = 13;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ser_in = 1, ser_out, time_load = 0;
  logic [31:0] time_in = 0;
  logic        l_rx_valid = 0, l_tx_valid, l_tx_ready = 1;
  logic        r_rx_valid = 0, r_tx_valid, r_tx_ready = 1;
  logic [15:0] l_rx_data = 0, l_tx_data, r_rx_data = 0, r_tx_data;
  logic        bus_cs = 0, bus_we = 0, bus_addr = 0, bus_rvalid;
  logic [15:0] bus_wdata = 0, bus_rdata;
  logic        ram_en = 0, ram_we = 0, ram_rvalid, ram_wait;
  logic [17:0] ram_addr = 0, sram_addr;
  logic [15:0] ram_wdata = 0, ram_rdata, sram_dq_out, sram_dq_in;
  logic        sram_ce_n, sram_we_n, sram_oe_n, sram_dq_oe;
  int          short_writes;

  phal_fpga_top dut (.*);

  sram_model #(.ADDR_W(18), .ACCESS(3), .WORDS(1024)) u_sram (
    .clk, .ce_n(sram_ce_n), .we_n(sram_we_n), .oe_n(sram_oe_n), .addr(sram_addr),
    .dq_in(sram_dq_out), .dq(sram_dq_in), .short_writes
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int m_req = 0, m_coef = 0, m_time = 0, m_local = 0, m_right = 0, m_ibus = 0, m_fwd = 0;
  int m_drop = 0, m_late = 0, m_bp = 0, m_switch = 0, m_ovr = 0, m_reset = 0, m_ram = 0, m_window = 0;
  int m_miss = 0;

  int signed xs[$];            // samples in the order the object receives them
  int signed c[NU];
  int signed yr[$], yb[$];     // outputs received on the right port and local bus
  word_t     rpk[$], lpk[$];

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference ----------------
  function automatic int signed ref_y(int m);
    longint s = 0;
    for (int j = 0; j < NE; j++) begin
      int n = 2*m - 2*j;
      if (n >= 0) begin
        int u = (j < NE-1-j) ? j : NE-1-j;
        longint v = ((n/2) % 2 == 1) ? -xs[n] : xs[n];
        s += longint'(c[u]) * v;
      end
    end
    s = s >>> 9;
    return (s > 32767) ? 32767 : (s < -32768) ? -32768 : int'(s);
  endfunction

  // ---------------- serial master ----------------
  task automatic ser_send(bit wr, logic [6:0] a, logic [15:0] d);
    logic [24:0] f = {1'b0, wr, a, d};
    for (int i = 24; i >= 0; i--) begin ser_in = f[i]; repeat (CPB) @(negedge clk); end
    ser_in = 1; repeat (3) @(negedge clk);
  endtask

  task automatic ser_recv(output logic [16:0] v);
    int guard = 0;
    while (ser_out && guard < 5000) begin @(negedge clk); guard++; end
    repeat (CPB / 2) @(negedge clk);
    for (int i = 16; i >= 0; i--) begin repeat (CPB) @(negedge clk); v[i] = ser_out; end
    repeat (CPB) @(negedge clk);
  endtask

  task automatic reg_write(logic [6:0] a, logic [15:0] d);
    ser_send(1, a, d);
    while (dut.u_filter.coef_busy) @(negedge clk);
  endtask

  task automatic reg_read(logic [6:0] a, output logic [15:0] d);
    logic [16:0] v;
    fork ser_send(0, a, 16'h0); ser_recv(v); join
    check("read reply kind", v[16] == 1'b0);
    d = v[15:0];
  endtask

  // ---------------- link and bus drivers ----------------
  task automatic make_pkt(output word_t w[$], input logic [3:0] dobj, dit, input int len,
                          input logic [31:0] ts, input bit samples);
    addr_word_t a = '{dst_obj: dobj, dst_itf: dit, src_obj: 4'd9, src_itf: 4'd0};
    w = '{a, 16'(len), ts[31:16], ts[15:0]};
    for (int i = 0; i < len; i++) begin
      automatic int signed x = int'($urandom_range(0, 1023)) - 512;
      w.push_back(16'(x));
      if (samples) xs.push_back(x);
    end
  endtask

  task automatic send_left(word_t w[$]);
    foreach (w[i]) begin @(negedge clk); l_rx_valid = 1; l_rx_data = w[i]; end
    @(negedge clk); l_rx_valid = 0;
  endtask

  task automatic send_right(word_t w[$]);
    foreach (w[i]) begin @(negedge clk); r_rx_valid = 1; r_rx_data = w[i]; end
    @(negedge clk); r_rx_valid = 0;
  endtask

  task automatic bus_write_pkt(word_t w[$]);
    foreach (w[i]) begin @(negedge clk); bus_cs = 1; bus_we = 1; bus_addr = 0; bus_wdata = w[i]; end
    @(negedge clk); bus_cs = 0; bus_we = 0;
  endtask

  word_t bq[$];   // words read from the local bus
  task automatic bus_poll();
    int n;
    @(negedge clk); bus_cs = 1; bus_we = 0; bus_addr = 1;
    @(negedge clk); bus_cs = 0;
    n = int'(bus_rdata[15:8]);
    if (n > 32) n = 32;
    for (int i = 0; i < n; i++) begin @(negedge clk); bus_cs = 1; bus_we = 0; bus_addr = 0; end
    @(negedge clk); bus_cs = 0;
  endtask

  // local-bus read data: the status word is the reply to an addr-1 cycle
  logic rd_was_data;
  always @(posedge clk) begin
    rd_was_data <= bus_cs && !bus_we && !bus_addr;
    if (rst_n && bus_rvalid && rd_was_data) bq.push_back(bus_rdata);
  end

  // ---------------- output collectors ----------------
  task automatic take_packets(ref word_t q[$], ref int signed ys[$], input logic [3:0] dobj);
    while (q.size() >= 4 && q.size() >= 4 + int'(q[1])) begin
      automatic addr_word_t a = q[0];
      automatic int len = int'(q[1]);
      check("output header", a.dst_obj == dobj && a.src_obj == 4'd1 && a.src_itf == 4'd1 && len == PL);
      for (int i = 0; i < len; i++) ys.push_back(int'($signed(q[4 + i])));
      repeat (4 + len) void'(q.pop_front());
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (r_tx_valid && r_tx_ready) rpk.push_back(r_tx_data);
    if (l_tx_valid && l_tx_ready) lpk.push_back(l_tx_data);
    if (dut.u_router.busy && !dut.u_router.dst_ready) m_bp++;
    if (dut.u_router.drop_ev) m_drop++;
    if (dut.u_router.loc_valid && dut.u_router.loc_ready && dut.u_depkt.hdr_idx == 0) m_local++;
    if (dut.u_time.late_pkt) m_late++;
    if (dut.u_time.deadline_miss) m_miss++;
  end

  always @(negedge clk) if (!hold_right) r_tx_ready = ($urandom_range(0, 1) == 0);
  bit hold_right = 1;

  // ---------------- the test ----------------
  initial begin
    logic [16:0] v;
    logic [15:0] d;
    word_t       w[$];
    int          sent = 0;
    r_tx_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // start-up: the object asks for its initialisation parameters
    ser_recv(v);
    check("init request", v == {1'b1, 16'(REG_COEF0)});
    if (v[16]) m_req++;

    // time register from the board
    @(negedge clk); time_load = 1; time_in = 32'h0001_0000; @(negedge clk); time_load = 0;
    reg_read(REG_TIME_HI, d);
    check("time loaded", d == 16'h0001);
    m_time++;

    // coefficients: a windowed-sinc-like half-band low-pass with random ripple
    for (int u = 0; u < NU; u++) begin
      c[u] = int'($urandom_range(0, 400)) - 200 + ((u % 2 == 0) ? -1 : 1) * (u + 1) * 150;
      reg_write(REG_COEF0 + 7'(u), 16'(c[u]));
      m_coef++;
    end
    reg_write(REG_COEFC, 16'd16384);
    reg_read(REG_COEF0 + 7'd12, d);  check("coef read-back", d == 16'(c[12]));
    reg_read(REG_COEFC, d);          check("centre read-back", d == 16'd16384);

    // routing: obj 2 -> right, obj 3 -> local bus, obj 5 -> left, rest dropped
    reg_write(REG_ROUTE0 + 7'd2, 16'(PORT_RIGHT));
    reg_write(REG_ROUTE0 + 7'd3, 16'(PORT_IBUS));
    reg_write(REG_ROUTE0 + 7'd5, 16'(PORT_LEFT));
    reg_write(REG_DEST, 16'h0020);
    reg_write(REG_MAXLAT, 16'd2000);
    reg_write(REG_CTRL, 16'h0001);

    // phase 1: right port held off until the internal bus has waited on it
    while (sent < NPK) begin
      while (dut.u_in_fifo.count > 180 || !dut.u_l_itf.u_rx_fifo.empty) begin
        @(negedge clk);
        if (m_bp > 200) hold_right = 0;
      end
      make_pkt(w, 4'd1, 4'd0, PL, dut.u_time.now - ((sent == 5) ? 32'd5000 : 32'd3), 1);
      if (sent == 20) bus_write_pkt(w); else send_left(w);
      sent++;
      if (sent == 24) begin
        // phase 2: wait for 8 output packets on the right, then move the output
        while (rpk.size() < 8 * (PL + 4)) @(negedge clk);
        reg_write(REG_DEST, 16'h0030);
        m_switch++;
      end
      if (sent > 24) bus_poll();
    end
    hold_right = 0;

    // forwarding and dropping
    make_pkt(w, 4'd5, 4'd0, 6, dut.u_time.now, 0);
    send_right(w);
    make_pkt(w, 4'd9, 4'd0, 6, dut.u_time.now, 0);
    send_left(w);

    // drain all outputs: 40*28 samples -> 560 outputs -> 20 packets
    for (int k = 0; k < 400 && (yr.size() + yb.size()) < NPK * PL / 2; k++) begin
      bus_poll();
      take_packets(rpk, yr, 4'd2);
      take_packets(bq, yb, 4'd3);
      repeat (10) @(negedge clk);
    end
    check("all outputs", yr.size() + yb.size() == NPK * PL / 2);
    check("outputs on both ports", yr.size() > 0 && yb.size() > 0);
    m_right = yr.size() / PL;
    m_ibus  = yb.size() / PL;
    for (int m = 0; m < yr.size() + yb.size(); m++) begin
      automatic int signed got = (m < yr.size()) ? yr[m] : yb[m - yr.size()];
      checks++;
      if (got != ref_y(m)) begin
        failures++;
        if (failures < 10) $display("y[%0d] = %0d, expected %0d", m, got, ref_y(m));
      end
    end

    // forwarded packet on the left port
    repeat (20) @(negedge clk);
    check("forwarded packet", lpk.size() == 10 && lpk[0][15:12] == 4'd5);
    if (lpk.size() == 10) m_fwd++;

    // late packet counted by the monitor
    reg_read(REG_LATE, d);
    check("one late packet", d == 16'd1 && m_late == 1);

    // SRAM through the RAM adaptation port
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); ram_en = 1; ram_we = 1; ram_addr = 18'(i); ram_wdata = 16'(16'hA000 + i);
      @(negedge clk); ram_en = 0;
      while (ram_wait) @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); ram_en = 1; ram_we = 0; ram_addr = 18'(i);
      @(negedge clk); ram_en = 0;
      while (ram_wait) @(negedge clk);
      @(negedge clk);
      check("sram read", ram_rvalid && ram_rdata == 16'(16'hA000 + i));
      m_ram++;
    end

    // timed run: the object is enabled only inside a 500-clock window
    begin
      automatic logic [31:0] t0 = dut.u_time.now + 32'd2000;
      automatic int on = 0;
      reg_write(REG_WSTART_HI, t0[31:16]); reg_write(REG_WSTART_LO, t0[15:0]);
      reg_write(REG_WSTOP_HI, 16'((t0 + 500) >> 16)); reg_write(REG_WSTOP_LO, 16'(t0 + 500));
      reg_write(REG_CTRL, 16'h0005);
      check("window not yet open", !dut.u_filter.enable);
      repeat (3000) begin @(negedge clk); if (dut.u_filter.enable) on++; end
      check("object ran for the window", on == 500);
      if (on == 500) m_window++;
    end
    // the input was drained inside the window: no deadline missed
    reg_read(REG_MISSED, d);
    check("no miss after a drained window", d == 16'd0 && m_miss == 0);

    // overrun: object disabled, left neighbour floods the link
    reg_write(REG_CTRL, 16'h0000);
    for (int p = 0; p < 14; p++) begin
      make_pkt(w, 4'd1, 4'd0, PL, dut.u_time.now, 0);
      send_left(w);
    end
    repeat (50) @(negedge clk);
    reg_read(REG_STATUS, d);
    check("interface overrun flagged", d[3] == 1'b1);
    if (d[3]) m_ovr++;
    // the flooded input cannot be drained in a 20-clock window: deadline missed
    begin
      automatic logic [31:0] t0 = dut.u_time.now + 32'd2000;
      reg_write(REG_WSTART_HI, t0[31:16]); reg_write(REG_WSTART_LO, t0[15:0]);
      reg_write(REG_WSTOP_HI, 16'((t0 + 20) >> 16)); reg_write(REG_WSTOP_LO, 16'(t0 + 20));
      reg_write(REG_CTRL, 16'h0005);
      repeat (2200) @(negedge clk);
      reg_read(REG_MISSED, d);
      check("deadline missed once", d == 16'd1 && m_miss == 1);
      reg_read(REG_STATUS, d);
      check("status shows missed deadline", d[5] == 1'b1);
    end
    reg_write(REG_CTRL, 16'h0002);
    reg_read(REG_STATUS, d);
    check("reset clears status", d == 16'h0000);
    if (d == 16'h0000) m_reset++;

    check("mech: param request", m_req > 0);
    check("mech: coefficient load", m_coef > 0);
    check("mech: time load", m_time > 0);
    check("mech: route to object", m_local > 0);
    check("mech: route to right", m_right > 0);
    check("mech: route to local bus", m_ibus > 0);
    check("mech: forward to left", m_fwd > 0);
    check("mech: drop", m_drop > 0);
    check("mech: late packet", m_late > 0);
    check("mech: bus back-pressure", m_bp > 0);
    check("mech: destination switch", m_switch > 0);
    check("mech: overrun", m_ovr > 0);
    check("mech: object reset", m_reset > 0);
    check("mech: ram adaptation", m_ram > 0);
    check("mech: timed run window", m_window > 0);
    check("mech: missed deadline", m_miss > 0);
    $display("mechanisms: req %0d coef %0d time %0d local %0d right %0d ibus %0d fwd %0d drop %0d late %0d backpressure %0d switch %0d ovr %0d reset %0d ram %0d window %0d miss %0d",
             m_req, m_coef, m_time, m_local, m_right, m_ibus, m_fwd, m_drop, m_late, m_bp, m_switch, m_ovr, m_reset, m_ram, m_window, m_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
