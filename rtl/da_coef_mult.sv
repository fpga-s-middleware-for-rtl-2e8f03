// da_coef_mult: one filter coefficient multiplier of the down-converter.
//
// Multiplies a signed X_W-bit sample by a programmable coefficient, three
// bits at a time, using a small RAM of coefficient multiples instead of a
// hardware multiplier (a distributed-arithmetic partial product). The RAM
// holds c*k for k = 0..7. A sample is split, as drawn for the 10-bit input,
// into its sign bit X[9] and the groups X[8:6], X[5:3], X[2:0]. A first
// multiplexer picks the group for the current phase, a second multiplexer
// gives the RAM address either to that group or to the table loader, and an
// add/subtract accumulator with feedback builds the product most
// significant group first:
//   phase 0          acc = -/+ c*X[9]           (sign bit has weight -2^9)
//   phase 1..ND-1    acc = 8*acc +/- c*group
// neg flips every add/subtract, which multiplies the product by -1; the
// down-converter uses it for the -1 samples of the fs/4 carrier.
//
// Timing: step is high for ND consecutive cycles, phase counting 0..ND-1;
// prod is valid the cycle after the last step and holds until the next
// phase-0 step. Table writes (tbl_we) take the RAM address and must not
// overlap a step. The split into a sign bit plus 3-bit groups, the RAM and
// the +/- accumulator follow the document's figure; MSB-first order and the
// table contents c*k are this design's reading of it.
module da_coef_mult #(
  parameter int unsigned COEF_W = 16,
  parameter int unsigned X_W    = 10,
  localparam int unsigned ND    = 1 + (X_W - 1) / 3,   // phases per product
  localparam int unsigned TBL_W = COEF_W + 3,
  localparam int unsigned ACC_W = COEF_W + X_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // table loader
  input  logic                        tbl_we,
  input  logic [2:0]                  tbl_addr,
  input  logic signed [TBL_W-1:0]     tbl_wdata,
  output logic signed [COEF_W-1:0]    coef,       // entry 1, i.e. c itself
  // operation
  input  logic                        step,
  input  logic [$clog2(ND)-1:0]       phase,
  input  logic                        neg,
  input  logic signed [X_W-1:0]       x,
  output logic signed [ACC_W-1:0]     prod
);
  logic signed [TBL_W-1:0] tbl [8];
  logic [2:0]              digit, ram_addr;
  logic [X_W-2:0]          mag;
  logic signed [ACC_W-1:0] part, base;
  logic                    sub;

  // first multiplexer: sign bit in phase 0, then 3-bit groups MSB first
  assign mag = x[X_W-2:0];
  always_comb begin
    if (phase == 0) digit = {2'b00, x[X_W-1]};
    else            digit = 3'(mag >> (3 * (ND - 1 - int'(phase))));
  end

  // second multiplexer: loader or datapath addresses the table RAM
  assign ram_addr = tbl_we ? tbl_addr : digit;
  assign part     = ACC_W'(tbl[ram_addr]);
  assign coef     = COEF_W'(tbl[1]);

  assign sub  = (phase == 0) ^ neg;
  assign base = (phase == 0) ? '0 : (prod <<< 3);

  always_ff @(posedge clk) begin
    if (tbl_we) tbl[tbl_addr] <= tbl_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    prod <= '0;
    else if (step) prod <= sub ? base - part : base + part;
  end

endmodule
