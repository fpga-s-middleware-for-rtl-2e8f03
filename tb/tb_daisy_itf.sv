// tb_daisy_itf: self-checking test of a daisy-chain interface.
// Receive side: packets arrive on the link word by word without flow
// control; the internal side must deliver the same words with last on the
// final word of each packet (found from the header length). A burst longer
// than the buffer while the internal side is stalled must raise overrun.
// Transmit side: words from the internal bus must leave on the link in
// order under random link back-pressure.
module tb_daisy_itf;
  import phal_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  link_rx_valid = 0, link_tx_valid, link_tx_ready = 0;
  word_t link_rx_data = 0, link_tx_data, rx_data, tx_data = 0;
  logic  rx_valid, rx_last, rx_ready = 0, tx_valid = 0, tx_ready, overrun;

  daisy_itf dut (.*);

  int checks = 0, failures = 0, n_ovr = 0, lasts = 0;
  word_t rxq[$], txq[$];
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
    if (link_tx_valid && link_tx_ready) begin
      checks++;
      if (txq.size() == 0 || link_tx_data !== txq[0]) begin failures++; $display("tx %h want %h n=%0d t=%0t", link_tx_data, txq.size() ? txq[0] : 16'h0, txq.size(), $time); end
      if (txq.size() != 0) void'(txq.pop_front());
    end
  end

  task automatic link_send(int len);
    word_t w[$] = '{16'h2311, 16'(len), 16'h0000, 16'h0042};
    for (int i = 0; i < len; i++) w.push_back(16'($urandom));
    foreach (w[i]) begin
      @(negedge clk); link_rx_valid = 1; link_rx_data = w[i];
      rxq.push_back(w[i]); lastq.push_back(i == w.size() - 1);
      @(negedge clk); link_rx_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      for (int p = 0; p < 10; p++) link_send($urandom_range(0, 10));
      repeat (400) begin @(negedge clk); rx_ready = 1'($urandom); link_tx_ready = 1'($urandom); end
      for (int i = 0; i <= 100; i++) begin
        if (i == 100) begin @(negedge clk); tx_valid = 0; break; end
        @(negedge clk); tx_valid = 1; tx_data = 16'($urandom);
        @(posedge clk iff tx_ready); txq.push_back(tx_data);
      end
    join
    @(negedge clk); tx_valid = 0; rx_ready = 1; link_tx_ready = 1;
    repeat (100) @(negedge clk);
    checks++;
    if (rxq.size() != 0 || txq.size() != 0 || lasts != 10 || n_ovr != 0) begin
      failures++; $display("left rx %0d tx %0d lasts %0d ovr %0d", rxq.size(), txq.size(), lasts, n_ovr);
    end
    // overrun: 68 words into a 64-word buffer with the internal side stalled
    rx_ready = 0;
    for (int i = 0; i < 68; i++) begin
      @(negedge clk); link_rx_valid = 1; link_rx_data = 16'(i);
    end
    @(negedge clk); link_rx_valid = 0;
    @(negedge clk);
    checks++;
    if (n_ovr != 4) begin failures++; $display("overruns %0d, expected 4", n_ovr); end
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
