// tb_ibus_itf: self-checking test of the local-bus interface.
// A bus master writes packets as bursts of up to 32 words to address 0;
// they must reach the internal side unchanged with last on each packet's
// final word. Words sent from the internal side are read back by the master
// in a burst after reading the status word, which must report how many
// words wait. A write burst into a full receive buffer raises overrun.
module tb_ibus_itf;
  import phal_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  bus_cs = 0, bus_we = 0, bus_addr = 0, bus_rvalid;
  word_t bus_wdata = 0, bus_rdata, rx_data, tx_data = 0;
  logic  rx_valid, rx_last, rx_ready = 1, tx_valid = 0, tx_ready, overrun;

  ibus_itf dut (.*);

  int checks = 0, failures = 0, n_ovr = 0, lasts = 0;
  word_t rxq[$], rdq[$];
  bit    lastq[$];

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_ovr++;
    if (rx_valid && rx_ready) begin
      checks++;
      if (rxq.size() == 0 || rx_data !== rxq[0] || rx_last !== lastq[0]) begin
        failures++; $display("rx %h last %b", rx_data, rx_last);
      end
      if (rx_last) lasts++;
      if (rxq.size() != 0) begin void'(rxq.pop_front()); void'(lastq.pop_front()); end
    end
    if (bus_rvalid) rdq.push_back(bus_rdata);
  end

  task automatic write_packet(int len);   // header + len words in one burst
    word_t w[$] = '{16'h1022, 16'(len), 16'h0001, 16'h0002};
    for (int i = 0; i < len; i++) w.push_back(16'($urandom));
    foreach (w[i]) begin
      @(negedge clk); bus_cs = 1; bus_we = 1; bus_addr = 0; bus_wdata = w[i];
      rxq.push_back(w[i]); lastq.push_back(i == w.size() - 1);
    end
    @(negedge clk); bus_cs = 0; bus_we = 0;
  endtask

  initial begin
    word_t sent[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 6; p++) write_packet($urandom_range(0, 28));
    repeat (40) @(negedge clk);
    checks++;
    if (rxq.size() != 0 || lasts != 6) begin failures++; $display("rx left %0d lasts %0d", rxq.size(), lasts); end
    // transmit: 20 words from the internal bus
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); tx_valid = 1; tx_data = 16'($urandom); sent.push_back(tx_data);
    end
    @(negedge clk); tx_valid = 0;
    // status read then a 20-word read burst
    @(negedge clk); bus_cs = 1; bus_we = 0; bus_addr = 1;
    for (int i = 0; i < 20; i++) begin @(negedge clk); bus_addr = 0; end
    @(negedge clk); bus_cs = 0;
    @(negedge clk);
    checks++;
    if (rdq.size() != 21 || rdq[0] !== {8'd20, 8'd64}) begin
      failures++; $display("status %h, %0d words read", rdq.size() ? rdq[0] : 16'hx, rdq.size());
    end
    for (int i = 0; i < 20 && i + 1 < rdq.size(); i++) begin
      checks++;
      if (rdq[i + 1] !== sent[i]) begin failures++; $display("read %0d: %h want %h", i, rdq[i + 1], sent[i]); end
    end
    // overrun: internal side stalled, 2 full bursts plus 3 words
    rx_ready = 0;
    for (int b = 0; b < 3; b++) begin
      for (int i = 0; i < ((b == 2) ? 3 : 32); i++) begin
        @(negedge clk); bus_cs = 1; bus_we = 1; bus_addr = 0; bus_wdata = 16'(i);
      end
      @(negedge clk); bus_cs = 0; bus_we = 0;
    end
    @(negedge clk);
    checks++;
    if (n_ovr != 3) begin failures++; $display("overruns %0d, expected 3", n_ovr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
