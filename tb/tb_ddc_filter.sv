// tb_ddc_filter: self-checking test of the down-converter filter.
//
// Loads random coefficients through the coefficient port, streams random
// 10-bit samples and compares every output with a reference computed here
// directly from y[m] = sum_j h[2j] * v[2m-2j], v[2i] = x[2i]*(-1)^i,
// shifted right by 9 and saturated to 16 bits. A first phase runs with the
// output always accepted and checks the steady-state rate of one output
// every 4 clocks; a second phase throttles out_ready to force stalls and
// also checks coefficient read-back and the centre tap register.
module tb_ddc_filter;
  localparam int NE = 26, NU = 13, NS = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        soft_rst = 0, enable = 0;
  logic        in_valid, in_pop;
  logic [15:0] in_data;
  logic        out_valid, out_ready;
  logic [15:0] out_data;
  logic        coef_we = 0, coef_busy, stall;
  logic [3:0]  coef_addr = 0, coef_raddr = 0;
  logic signed [15:0] coef_wdata = 0, coef_rdata;

  ddc_filter dut (.*);

  int checks = 0, failures = 0;
  int signed xs [NS];
  int signed c  [NU];
  int in_idx = 0, out_idx = 0, stalls = 0;
  bit throttle = 0;
  longint last_out_cycle = -1, cycle = 0;
  int rate_checked = 0;

  assign in_valid = in_idx < NS;
  assign in_data  = 16'(xs[in_idx < NS ? in_idx : 0]);

  function automatic int signed ref_y(int m);
    longint s = 0;
    int signed y;
    for (int j = 0; j < NE; j++) begin
      int n = 2*m - 2*j;
      if (n >= 0) begin
        int u = (j < NE-1-j) ? j : NE-1-j;
        longint v = ((n/2) % 2 == 1) ? -xs[n] : xs[n];
        s += longint'(c[u]) * v;
      end
    end
    s = s >>> 9;
    if (s > 32767) y = 32767; else if (s < -32768) y = -32768; else y = int'(s);
    return y;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (stall) stalls++;
    if (in_pop) in_idx <= in_idx + 1;
    if (out_valid && out_ready) begin
      checks++;
      if ($signed(out_data) !== 16'(ref_y(out_idx))) begin
        failures++;
        $display("y[%0d] = %0d, expected %0d", out_idx, $signed(out_data), ref_y(out_idx));
      end
      if (!throttle && out_idx >= 30 && out_idx < 100) begin
        checks++; rate_checked++;
        if (cycle - last_out_cycle != 4) begin
          failures++;
          $display("output interval %0d, expected 4", cycle - last_out_cycle);
        end
      end
      last_out_cycle <= cycle;
      out_idx <= out_idx + 1;
    end
  end

  always @(negedge clk) out_ready = throttle ? ($urandom_range(0, 3) == 0) : 1'b1;

  task automatic write_coef(int a, int signed v);
    @(negedge clk);
    coef_we = 1; coef_addr = 4'(a); coef_wdata = 16'(v);
    @(negedge clk);
    coef_we = 0;
    while (coef_busy) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < NS; i++) xs[i] = $urandom_range(0, 1023) - 512;
    for (int u = 0; u < NU; u++) c[u] = int'($urandom_range(0, 16000)) - 8000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int u = 0; u < NU; u++) write_coef(u, c[u]);
    write_coef(NU, 12345);
    // read-back of every coefficient and of the centre tap
    for (int u = 0; u <= NU; u++) begin
      coef_raddr = 4'(u); #1;
      checks++;
      if (coef_rdata !== 16'(u == NU ? 12345 : c[u])) begin
        failures++; $display("coef %0d read %0d", u, coef_rdata);
      end
    end
    enable = 1;
    wait (out_idx == 120);
    throttle = 1;
    wait (out_idx == NS/2);
    repeat (10) @(negedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    checks++;
    if (rate_checked == 0) begin failures++; $display("rate never checked"); end
    $display("outputs %0d stalls %0d", out_idx, stalls);
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
