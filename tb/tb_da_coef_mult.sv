// tb_da_coef_mult: self-checking test of one coefficient multiplier.
// Fills the table with c*k for a random coefficient, then multiplies random
// 10-bit samples, with and without negation, and compares the product
// after 4 phases with c*x computed here. Also checks the read-back of c
// and that the product holds between computations.
module tb_da_coef_mult;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               tbl_we = 0, step = 0, neg = 0;
  logic [2:0]         tbl_addr = 0;
  logic signed [18:0] tbl_wdata = 0;
  logic signed [15:0] coef;
  logic [1:0]         phase = 0;
  logic signed [9:0]  x = 0;
  logic signed [25:0] prod;

  da_coef_mult dut (.*);

  int checks = 0, failures = 0;

  task automatic load(int signed c);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); tbl_we = 1; tbl_addr = 3'(k); tbl_wdata = 19'(c * k);
    end
    @(negedge clk); tbl_we = 0;
  endtask

  task automatic mul(int signed xv, bit n);
    for (int p = 0; p < 4; p++) begin
      @(negedge clk); step = 1; phase = 2'(p); x = 10'(xv); neg = n;
    end
    @(negedge clk); step = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      automatic int signed c = int'($urandom_range(0, 65535)) - 32768;
      load(c);
      checks++;
      if (coef !== 16'(c)) begin failures++; $display("coef read %0d want %0d", coef, c); end
      for (int i = 0; i < 25; i++) begin
        automatic int signed xv = (i == 0) ? -512 : (i == 1) ? 511 : int'($urandom_range(0, 1023)) - 512;
        automatic bit n = 1'($urandom_range(0, 1));
        automatic longint want = longint'(c) * xv * (n ? -1 : 1);
        mul(xv, n);
        repeat (2) @(negedge clk);
        checks++;
        if (longint'(prod) != want) begin
          failures++; $display("c=%0d x=%0d neg=%0d prod=%0d want=%0d", c, xv, n, prod, want);
        end
      end
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
