// tb_time_status: self-checking test of the time register and monitor.
// Checks that time advances one per clock and loads from the board time
// interface, that the control word drives enable/reset, that overrun events
// set sticky flags cleared by reset, that packets older than the
// configured bound are counted late while younger ones are not, and that
// in timed mode the object is enabled for exactly the run window, and that
// a window closing with input still waiting is counted as a missed deadline
// once, while one closing with nothing waiting is not.
module tb_time_status;
  import phal_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        time_load = 0, reg_we = 0, reg_re = 0;
  logic [31:0] time_in = 0, now, pkt_ts = 0;
  logic [6:0]  reg_addr = 0;
  logic [15:0] reg_wdata = 0, rdata;
  logic        obj_enable, obj_reset, late_pkt, deadline_miss;
  logic        obj_running = 0, in_overrun = 0, out_overrun = 0, itf_overrun = 0, pkt_ts_valid = 0, obj_pending = 0;

  time_status dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("%s: %0h, expected %0h", what, got, want); end
  endtask

  task automatic wr(logic [6:0] a, logic [15:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic rd(logic [6:0] a, output logic [15:0] d);
    @(negedge clk); reg_re = 1; reg_addr = a; #1 d = rdata;
    @(negedge clk); reg_re = 0;
  endtask

  initial begin
    logic [31:0] t0;
    logic [15:0] v, hi, lo;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); t0 = now;
    repeat (10) @(negedge clk);
    check("time advance", now, t0 + 10);
    time_load = 1; time_in = 32'h1234_FFF0; @(negedge clk); time_load = 0;
    check("time load", now, 32'h1234_FFF0);
    repeat (20) @(negedge clk);
    rd(REG_TIME_HI, hi); rd(REG_TIME_LO, lo);
    check("time read", {hi, lo}, 32'h1235_0005);
    check("enable off", obj_enable, 0);
    wr(REG_CTRL, 16'h0001);
    @(negedge clk);
    check("enable on", obj_enable, 1);
    rd(REG_CTRL, v); check("ctrl value", v, 16'h0001);
    // overrun flags
    @(negedge clk); in_overrun = 1; itf_overrun = 1; @(negedge clk); in_overrun = 0; itf_overrun = 0;
    obj_running = 1;
    rd(REG_STATUS, v); check("status", v, 16'b0_1011);
    // late packet check: bound of 100 clocks
    wr(REG_MAXLAT, 16'd100);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); pkt_ts_valid = 1; pkt_ts = now - ((i % 2 == 1) ? 150 : 50);
      #1 check("late flag", late_pkt, (i % 2 == 1));
    end
    @(negedge clk); pkt_ts_valid = 0;
    rd(REG_LATE, v); check("late count", v, 4);
    rd(REG_STATUS, v); check("status late", v, 16'b1_1011);
    wr(REG_CTRL, 16'h0002);
    @(negedge clk);
    check("reset out", obj_reset, 1);
    check("enable dropped", obj_enable, 0);
    rd(REG_STATUS, v); check("status cleared", v, 16'b0_0001);
    rd(REG_LATE, v); check("late cleared", v, 0);
    // run window: enabled only for now in [start, stop), across a wrap of the
    // low half of the time register
    t0 = now + 40;
    wr(REG_WSTART_HI, t0[31:16]); wr(REG_WSTART_LO, t0[15:0]);
    wr(REG_WSTOP_HI, 16'((t0 + 25) >> 16)); wr(REG_WSTOP_LO, 16'(t0 + 25));
    wr(REG_CTRL, 16'h0005);
    rd(REG_CTRL, v); check("ctrl timed", v, 16'h0005);
    obj_pending = 1;
    begin
      int on = 0, miss = 0;
      for (int i = 0; i < 80; i++) begin
        @(negedge clk);
        // obj_enable follows the window one clock late
        check("window", obj_enable, ((now - 1 - t0) < 25));
        if (obj_enable) on++;
        // the miss is seen in the first clock after the window
        if (deadline_miss) begin
          miss++;
          check("miss at window close", now - t0, 25);
        end
      end
      check("window length", on, 25);
      check("one deadline missed", miss, 1);
    end
    rd(REG_MISSED, v); check("missed count", v, 1);
    rd(REG_STATUS, v); check("status missed", v[5], 1);
    // a second window that ends with nothing waiting
    obj_pending = 0;
    t0 = now + 20;
    wr(REG_WSTART_HI, t0[31:16]); wr(REG_WSTART_LO, t0[15:0]);
    wr(REG_WSTOP_HI, 16'((t0 + 10) >> 16)); wr(REG_WSTOP_LO, 16'(t0 + 10));
    begin
      int miss = 0;
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        if (deadline_miss) miss++;
      end
      check("no miss when idle", miss, 0);
    end
    rd(REG_MISSED, v); check("missed count kept", v, 1);
    wr(REG_CTRL, 16'h0002);
    rd(REG_MISSED, v); check("missed cleared", v, 0);
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
