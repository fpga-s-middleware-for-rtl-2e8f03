// sram_model: behavioural model of an asynchronous SRAM, for testbenches.
//
// Not synthesizable logic: a stand-in for the board's memory chip. It has
// the usual active-low chip enable, write enable and output enable, with
// the data bus split into dq_in (to the chip) and dq (from the chip). To
// make wait states matter, the model measures its access time in clocks of
// clk: read data appears only once address and strobes have been stable
// for ACCESS clocks (before that it drives 16'hDEAD), and a write is stored
// only if write enable was held low for ACCESS clocks.
module sram_model #(
  parameter int ADDR_W = 18,
  parameter int ACCESS = 3,
  parameter int WORDS  = 1024
) (
  input  logic              clk,
  input  logic              ce_n,
  input  logic              we_n,
  input  logic              oe_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       dq_in,
  output logic [15:0]       dq,
  output int                short_writes
);
  logic [15:0]       mem [WORDS];
  int                stable = 0;
  logic [ADDR_W-1:0] addr_q;
  logic              we_q = 1, oe_q = 1;
  logic [15:0]       data_q;

  initial begin
    short_writes = 0;
    for (int i = 0; i < WORDS; i++) mem[i] = 16'(i * 7);
  end

  always @(posedge clk) begin
    if (!ce_n && addr == addr_q && we_n == we_q && oe_n == oe_q) stable <= stable + 1;
    else stable <= 2;   // new values: present for one full clock plus the current one
    addr_q <= addr;
    data_q <= dq_in;
    // end of a write pulse: store if it was long enough
    if (!we_q && (we_n || ce_n)) begin
      if (stable >= ACCESS) mem[addr_q % WORDS] <= data_q;
      else short_writes <= short_writes + 1;
    end
    we_q <= we_n || ce_n;
    oe_q <= oe_n;
  end

  assign dq = (!ce_n && !oe_n && stable >= ACCESS) ? mem[addr % WORDS] : 16'hDEAD;
endmodule
