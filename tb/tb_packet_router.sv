// tb_packet_router: self-checking test of the internal-bus arbiter and the
// routing table. Programs a random table (checked by read-back), then lets
// all four sources send packets to random destinations while the sinks
// apply random back-pressure. Every packet must arrive whole, unmixed with
// others, at exactly the sink the table (or the own-object rule) selects;
// packets routed to "drop" or to an unknown own interface must vanish.
module tb_packet_router;
  import phal_pkg::*;
  localparam int NPKT = 12;   // packets per source
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]        my_obj = 4'd1, my_in_itf = 4'd0;
  logic [3:0]        src_valid = 0, src_last = 0, src_ready;
  logic [3:0][15:0]  src_data = '0;
  logic [2:0]        port_valid, port_ready = 0;
  word_t             bus_data;
  logic              bus_last, loc_valid, loc_ready = 0;
  logic              reg_we = 0, route_ev, drop_ev;
  logic [6:0]        reg_addr = 0;
  logic [15:0]       reg_wdata = 0, rdata;

  packet_router dut (.*);

  int checks = 0, failures = 0, n_drop_ev = 0, n_route_ev = 0;
  int expected [4];        // packets expected per sink (0..2 ports, 3 local)
  int delivered [4];
  int dropped_expected = 0;
  port_e tbl [16];
  word_t cur [4][$];       // words of the packet in progress per sink

  function automatic int sink_of(logic [15:0] w0);
    addr_word_t a = w0;
    if (a.dst_obj == my_obj) return (a.dst_itf == my_in_itf) ? 3 : -1;
    return (tbl[a.dst_obj] == PORT_DROP) ? -1 : int'(tbl[a.dst_obj]);
  endfunction

  function automatic word_t pay(int s, int q, int i);
    return 16'(s * 4096 + q * 128 + i);
  endfunction

  // sinks
  always @(posedge clk) if (rst_n) begin
    if (route_ev) n_route_ev++;
    if (drop_ev) n_drop_ev++;
    for (int k = 0; k < 4; k++) begin
      automatic bit v = (k == 3) ? loc_valid : port_valid[k];
      automatic bit r = (k == 3) ? loc_ready : port_ready[k];
      if (v && r) begin
        cur[k].push_back(bus_data);
        if (bus_last) begin
          // check the whole packet
          automatic addr_word_t a = cur[k][0];
          automatic int s = int'(cur[k][2]);
          automatic int q = int'(cur[k][3]);
          automatic int len = int'(cur[k][1]);
          automatic bit ok = (sink_of(cur[k][0]) == k) && (cur[k].size() == len + 4);
          for (int i = 0; i < len && ok; i++) ok = (cur[k][4 + i] == pay(s, q, i));
          checks++;
          if (!ok) begin failures++; $display("sink %0d: bad packet src %0d seq %0d size %0d", k, s, q, cur[k].size()); end
          delivered[k]++;
          cur[k].delete();
          if (a.src_obj != 4'(s)) ; // origin fields carry the sequence only
        end
      end
    end
  end

  always @(negedge clk) begin
    port_ready = 3'($urandom);
    loc_ready  = 1'($urandom);
  end

  task automatic source(int s);
    for (int q = 0; q < NPKT; q++) begin
      automatic int len = $urandom_range(1, 12);
      automatic addr_word_t a;
      automatic word_t w[$];
      automatic int k;
      a.dst_obj = 4'($urandom_range(0, 15));
      a.dst_itf = 4'($urandom_range(0, 1));
      a.src_obj = 4'(s);
      a.src_itf = 4'(q);
      w = '{a, 16'(len), 16'(s), 16'(q)};
      for (int i = 0; i < len; i++) w.push_back(pay(s, q, i));
      k = sink_of(a);
      if (k < 0) dropped_expected++; else expected[k]++;
      foreach (w[i]) begin
        src_valid[s] = 1; src_data[s] = w[i]; src_last[s] = (i == w.size() - 1);
        @(posedge clk iff src_ready[s]);
        @(negedge clk);
      end
      src_valid[s] = 0; src_last[s] = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      tbl[i] = port_e'($urandom_range(0, 3));
      @(negedge clk); reg_we = 1; reg_addr = REG_ROUTE0 + 7'(i); reg_wdata = 16'(tbl[i]);
    end
    @(negedge clk); reg_we = 0;
    for (int i = 0; i < 16; i++) begin
      reg_addr = REG_ROUTE0 + 7'(i); #1;
      checks++;
      if (rdata !== 16'(tbl[i])) begin failures++; $display("table %0d read %0d", i, rdata); end
    end
    @(negedge clk);
    fork
      source(0); source(1); source(2); source(3);
    join
    repeat (30) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (delivered[k] != expected[k]) begin
        failures++; $display("sink %0d: %0d delivered, %0d expected", k, delivered[k], expected[k]);
      end
    end
    checks++;
    if (n_route_ev != 4 * NPKT || n_drop_ev != dropped_expected || dropped_expected == 0) begin
      failures++; $display("routes %0d drops %0d (expected %0d)", n_route_ev, n_drop_ev, dropped_expected);
    end
    $display("delivered %0d %0d %0d %0d dropped %0d", delivered[0], delivered[1], delivered[2], delivered[3], n_drop_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
