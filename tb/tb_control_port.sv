// tb_control_port: self-checking test of the serial control port.
// Sends write and read frames bit by bit (4 clocks per bit), checks the
// register-bus pulses, decodes the reply frames on ser_out and compares
// them with the register values served here, and checks that a parameter
// request from the object goes out as a kind-1 frame. A glitch shorter
// than half a bit on the idle line must not start a frame.
module tb_control_port;
  localparam int CPB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ser_in = 1, ser_out, reg_we, reg_re, req_valid = 0, req_ready;
  logic [6:0]  reg_addr, req_addr = 0;
  logic [15:0] reg_wdata, reg_rdata;

  control_port dut (.*);

  int checks = 0, failures = 0, n_we = 0, n_re = 0;
  logic [6:0]  last_addr;
  logic [15:0] last_data;

  assign reg_rdata = {reg_addr, 9'h0A5} ^ 16'h1234;

  always @(posedge clk) begin
    if (reg_we) begin n_we++; last_addr = reg_addr; last_data = reg_wdata; end
    if (reg_re) begin n_re++; last_addr = reg_addr; end
  end

  task automatic send_frame(bit wr, logic [6:0] a, logic [15:0] d);
    logic [24:0] f = {1'b0, wr, a, d};
    for (int i = 24; i >= 0; i--) begin
      ser_in = f[i];
      repeat (CPB) @(negedge clk);
    end
    ser_in = 1;
    repeat (3) @(negedge clk);
  endtask

  // receive one outbound frame: returns {kind, payload}
  task automatic recv_frame(output logic [16:0] v);
    int guard = 0;
    while (ser_out && guard < 2000) begin @(negedge clk); guard++; end
    repeat (CPB / 2) @(negedge clk);                // middle of start bit
    for (int i = 16; i >= 0; i--) begin
      repeat (CPB) @(negedge clk);
      v[i] = ser_out;
    end
    repeat (CPB) @(negedge clk);
    checks++;
    if (ser_out !== 1'b1) begin failures++; $display("missing stop bit"); end
  endtask

  initial begin
    logic [16:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // glitch of one clock must be ignored
    ser_in = 0; @(negedge clk); ser_in = 1;
    repeat (4 * CPB) @(negedge clk);
    for (int t = 0; t < 10; t++) begin
      automatic logic [6:0]  a = 7'($urandom);
      automatic logic [15:0] d = 16'($urandom);
      automatic int n_prev = n_we;
      send_frame(1, a, d);
      checks++;
      if (n_we != n_prev + 1 || last_addr !== a || last_data !== d) begin
        failures++; $display("write %h=%h seen as %h=%h (%0d)", a, d, last_addr, last_data, n_we - n_prev);
      end
    end
    checks++;
    if (n_re != 0) begin failures++; $display("spurious read"); end
    for (int t = 0; t < 6; t++) begin
      automatic logic [6:0] a = 7'($urandom);
      fork
        send_frame(0, a, 16'hFFFF);
        recv_frame(r);
      join
      checks++;
      if (r !== {1'b0, {a, 9'h0A5} ^ 16'h1234}) begin
        failures++; $display("read %h returned %h", a, r);
      end
    end
    // parameter request from the object
    req_addr = 7'h15; req_valid = 1;
    fork
      begin @(posedge clk iff req_ready); @(negedge clk); req_valid = 0; end
      recv_frame(r);
    join
    checks++;
    if (r !== {1'b1, 9'b0, 7'h15}) begin failures++; $display("request frame %h", r); end
    checks++;
    if (n_we != 10 || n_re != 6) begin failures++; $display("we %0d re %0d", n_we, n_re); end
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
