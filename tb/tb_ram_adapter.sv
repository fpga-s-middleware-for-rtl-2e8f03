// tb_ram_adapter: self-checking test of the RAM adaptation.
// An object-side driver issues random reads and writes, holding each
// request while obj_wait is high, against a behavioural SRAM whose access
// takes 3 clocks. Every read must return the last value written (or the
// SRAM's initial contents), no write may be cut short, and each access must
// take exactly WAIT_STATES + 1 = 3 clocks.
module tb_ram_adapter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        obj_en = 0, obj_we = 0, obj_rvalid, obj_wait;
  logic [17:0] obj_addr = 0, sram_addr;
  logic [15:0] obj_wdata = 0, obj_rdata, sram_dq_out, sram_dq_in;
  logic        sram_ce_n, sram_we_n, sram_oe_n, sram_dq_oe;
  int          short_writes;

  ram_adapter dut (.*);

  sram_model #(.ADDR_W(18), .ACCESS(3), .WORDS(1024)) u_sram (
    .clk, .ce_n(sram_ce_n), .we_n(sram_we_n), .oe_n(sram_oe_n), .addr(sram_addr),
    .dq_in(sram_dq_out), .dq(sram_dq_in), .short_writes
  );

  int checks = 0, failures = 0, reads = 0;
  logic [15:0] model [64];

  initial begin
    for (int i = 0; i < 64; i++) model[i] = 16'(i * 7);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int a = $urandom_range(0, 63);
      automatic bit w = 1'($urandom);
      automatic int cyc = 0;
      @(negedge clk);
      obj_en = 1; obj_we = w; obj_addr = 18'(a); obj_wdata = 16'($urandom);
      @(negedge clk);
      obj_en = 0;
      while (obj_wait) begin @(negedge clk); cyc++; end
      if (w) model[a] = obj_wdata;
      else begin
        // read data arrives the clock after the SRAM cycle ends
        @(negedge clk);
        checks++;
        if (!obj_rvalid || obj_rdata !== model[a]) begin
          failures++; $display("read %0d: %h (valid %b), want %h", a, obj_rdata, obj_rvalid, model[a]);
        end
        reads++;
      end
      checks++;
      if (cyc != 2) begin failures++; $display("access held %0d wait clocks", cyc); end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (short_writes != 0 || reads == 0) begin failures++; $display("short writes %0d", short_writes); end
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
