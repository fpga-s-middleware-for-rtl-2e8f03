// tb_tx_packetizer: self-checking test of packet construction.
// A FIFO model feeds numbered words; the test checks that no packet starts
// before 28 words wait, that each packet has the expected address word,
// length, time stamp (the time when it started) and payload in order, that
// last marks word 32, and that back-pressure on pkt_ready loses nothing.
module tb_tx_packetizer;
  import phal_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [8:0]  fifo_count;
  word_t       fifo_rdata, pkt_data;
  logic        fifo_pop, pkt_valid, pkt_last, pkt_ready;
  logic [31:0] now = 0;
  logic [3:0]  src_obj = 4'd1, src_itf = 4'd1, dst_obj = 4'd7, dst_itf = 4'd2;

  tx_packetizer dut (.*);

  int checks = 0, failures = 0, pkts = 0, idx = 0, stalls = 0;
  int wr_n = 0, rd_n = 0;
  logic [31:0] start_time;

  assign fifo_count = 9'(wr_n - rd_n);
  assign fifo_rdata = 16'(rd_n * 3 + 1);

  always @(posedge clk) begin
    now <= now + 1;
    if (fifo_pop) rd_n <= rd_n + 1;
    if (pkt_valid && !pkt_ready) stalls++;
    if (pkt_valid && pkt_ready) begin
      automatic logic [15:0] want;
      case (idx)
        0: want = 16'h7211;
        1: want = 16'd28;
        2: want = start_time[31:16];
        3: want = start_time[15:0];
        default: want = 16'((pkts * 28 + idx - 4) * 3 + 1);
      endcase
      checks++;
      if (pkt_data !== want || pkt_last !== (idx == 31)) begin
        failures++; $display("pkt %0d word %0d: %h last %b, want %h", pkts, idx, pkt_data, pkt_last, want);
      end
      idx = (idx == 31) ? 0 : idx + 1;
      if (idx == 0) pkts++;
    end
  end

  // record the time at which each packet starts
  always @(posedge clk) if (dut.state == dut.S_IDLE && fifo_count >= 28) start_time <= now;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    pkt_ready = 1;
    // 27 words: no packet yet
    repeat (27) begin @(negedge clk); wr_n++; end
    repeat (20) @(negedge clk);
    checks++;
    if (pkt_valid) begin failures++; $display("packet started with 27 words"); end
    // 4 packets' worth with random back-pressure
    fork
      repeat (28 * 4 - 27) begin @(negedge clk); wr_n++; end
      repeat (600) begin @(negedge clk); pkt_ready = ($urandom_range(0, 2) != 0); end
    join
    pkt_ready = 1;
    repeat (50) @(negedge clk);
    checks++;
    if (pkts != 4 || stalls == 0) begin failures++; $display("packets %0d stalls %0d", pkts, stalls); end
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
