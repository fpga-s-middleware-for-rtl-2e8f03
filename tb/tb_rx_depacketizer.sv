// tb_rx_depacketizer: self-checking test of packet delivery to the object.
// Sends packets of random length and content, holds the FIFO full at
// random times, and checks that exactly the payload words reach the FIFO in
// order, that the time stamp and origin of each header are reported, and
// that nothing is pushed into a full FIFO.
module tb_rx_depacketizer;
  import phal_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pkt_valid = 0, pkt_last = 0, pkt_ready, fifo_push, fifo_full = 0, ts_valid;
  word_t       pkt_data = 0, fifo_wdata;
  logic [31:0] ts;
  addr_word_t  src;

  rx_depacketizer dut (.*);

  int checks = 0, failures = 0, full_cycles = 0;
  word_t       exp_q[$];
  logic [31:0] ts_q[$];
  logic [15:0] src_q[$];

  always @(posedge clk) if (rst_n) begin
    if (fifo_full) full_cycles++;
    if (fifo_push) begin
      checks++;
      if (fifo_full || exp_q.size() == 0 || fifo_wdata !== exp_q[0]) begin
        failures++; $display("push %h unexpected (full %b)", fifo_wdata, fifo_full);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (ts_valid) begin
      checks++;
      if (ts !== ts_q[0] || src !== src_q[0]) begin
        failures++; $display("ts %h src %h want %h %h (%0d left) t=%0t", ts, src, ts_q[0], src_q[0], ts_q.size(), $time);
      end
      void'(ts_q.pop_front()); void'(src_q.pop_front());
    end
  end

  always @(negedge clk) fifo_full = ($urandom_range(0, 3) == 0);

  task automatic send(int len);
    word_t w[$];
    logic [31:0] t = $urandom;
    logic [15:0] a = 16'($urandom);
    w = '{a, 16'(len), t[31:16], t[15:0]};
    for (int i = 0; i < len; i++) begin
      w.push_back(16'($urandom));
      exp_q.push_back(w[$]);
    end
    ts_q.push_back(t); src_q.push_back(a);
    foreach (w[i]) begin
      pkt_valid = 1; pkt_data = w[i]; pkt_last = (i == w.size() - 1);
      @(posedge clk iff pkt_ready);
      @(negedge clk);
    end
    pkt_valid = 0; pkt_last = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 20; p++) send($urandom_range(1, 40));
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || ts_q.size() != 0 || full_cycles == 0) begin
      failures++; $display("left over: %0d words %0d stamps", exp_q.size(), ts_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
