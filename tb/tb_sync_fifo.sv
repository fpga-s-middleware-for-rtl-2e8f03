// tb_sync_fifo: self-checking test of the FIFO at its default 256 x 16.
// Random pushes and pops against a queue model; checks data order, count,
// empty/full flags, and that a push while full is refused with overrun.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        push = 0, pop = 0, empty, full, overrun;
  logic [15:0] wdata = 0, rdata;
  logic [8:0]  count;

  sync_fifo dut (.*);

  int checks = 0, failures = 0, fulls = 0, ovrs = 0;
  logic [15:0] q[$];

  bit did_pop, was_full;
  always @(posedge clk) if (rst_n) begin
    did_pop  = pop && q.size() > 0;
    was_full = (q.size() == 256);
    checks++;
    if (count !== 9'(q.size()) || empty !== (q.size() == 0) || full !== (q.size() == 256)) begin
      failures++; $display("count %0d model %0d", count, q.size());
    end
    if (did_pop) begin
      checks++;
      if (rdata !== q[0]) begin failures++; $display("rdata %h want %h", rdata, q[0]); end
    end
    if (full) fulls++;
    if (overrun) ovrs++;
    if (did_pop) void'(q.pop_front());
    if (push && !was_full) q.push_back(wdata);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill past full, then drain, then random traffic
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); push = 1; pop = 0; wdata = 16'($urandom);
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); push = 0; pop = 1;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk); push = 1'($urandom_range(0, 1)); pop = ($urandom_range(0, 2) == 0); wdata = 16'($urandom);
    end
    @(negedge clk); push = 0; pop = 0;
    @(negedge clk);
    checks++;
    if (fulls == 0 || ovrs == 0) begin failures++; $display("full/overrun never seen"); end
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
