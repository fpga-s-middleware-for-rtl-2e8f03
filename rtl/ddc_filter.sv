// ddc_filter: in-phase digital down converter with half-band decimating FIR.
//
// The input stream x[n] (signed X_W-bit samples) is mixed with a carrier at
// a quarter of the sample rate. The in-phase carrier cos(pi*n/2) is
// 1, 0, -1, 0, ..., so the mixed signal v[n] is x[n] with alternating sign
// on even n and zero on odd n. It is filtered by a symmetric N_TAPS-tap FIR
// h[0..N_TAPS-1] whose odd-index taps are zero except the centre one, and
// decimated by two:
//     y[m] = sum_{j=0}^{NE-1} h[2j] * v[2m-2j],   NE = (N_TAPS+1)/2
// Because v is zero at odd n, only the NE even-index taps ever meet a
// non-zero sample; the centre tap h[(N_TAPS-1)/2] (odd index for 51 taps)
// always meets a zero and needs no multiplier. It is still stored and can
// be read back. Symmetry h[k] = h[N_TAPS-1-k] leaves NU = NE/2 independent
// programmable values.
//
// Structure (input stage, coefficient multipliers, sum, operation control):
//  * Input stage: every even-index sample is kept with its carrier sign in
//    a pending register, odd-index samples are read and dropped. When a
//    computation starts, the pending sample enters an NE-deep delay line.
//  * NE da_coef_mult units, one per delay-line position, each form
//    h[2j]*v in ND = 4 clock phases from a RAM of coefficient multiples.
//  * A sum of the NE products, arithmetic shift right by OUT_SHIFT and
//    saturation to OUT_W bits gives y[m].
//  * Operation control runs the phases, overlaps the sum of one output with
//    phase 0 of the next, so one output leaves every 4 clocks in steady
//    state, and stalls in phase 0 while the previous result cannot leave.
//  * A coefficient write (coef_we, coef_addr = u in 0..NU-1 for h[2u] and
//    h[N_TAPS-1-2u], NU for the centre tap) starts an 8-cycle loader that
//    fills both symmetric units' tables with c*0..c*7; coef_busy is high
//    meanwhile and the datapath waits.
//
// Interface: in_valid/in_data/in_pop read a first-word fall-through FIFO
// (sample in the low X_W bits of a 16-bit word); out_valid/out_data with
// out_ready form a valid/ready output. enable gates the reading of new
// samples; soft_rst clears the datapath state but not the coefficients.
// Latency: an output appears 5 clocks after its even sample is taken.
// 51 taps, 10-bit input, 16-bit coefficients and output, decimation by 2,
// fs/4 carrier, 4 clocks per output and the multiplier structure follow the
// document. The Q1.15 coefficient scaling, OUT_SHIFT = 9, saturation and
// the handshakes are this design's choices.
module ddc_filter #(
  parameter int unsigned N_TAPS    = 51,
  parameter int unsigned X_W       = 10,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned OUT_W     = 16,
  parameter int unsigned OUT_SHIFT = 9,
  localparam int unsigned NE    = (N_TAPS + 1) / 2,
  localparam int unsigned NU    = NE / 2,
  localparam int unsigned ND    = 1 + (X_W - 1) / 3,
  localparam int unsigned ACC_W = COEF_W + X_W,
  localparam int unsigned SUM_W = ACC_W + $clog2(NE) + 1,
  localparam int unsigned CA_W  = $clog2(NU + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     soft_rst,
  input  logic                     enable,
  // input FIFO side
  input  logic                     in_valid,
  input  logic [15:0]              in_data,
  output logic                     in_pop,
  // output FIFO side
  output logic                     out_valid,
  output logic [OUT_W-1:0]         out_data,
  input  logic                     out_ready,
  // coefficient port
  input  logic                     coef_we,
  input  logic [CA_W-1:0]          coef_addr,
  input  logic signed [COEF_W-1:0] coef_wdata,
  output logic                     coef_busy,
  input  logic [CA_W-1:0]          coef_raddr,
  output logic signed [COEF_W-1:0] coef_rdata,
  // observation
  output logic                     stall
);
  localparam int unsigned TBL_W = COEF_W + 3;

  initial begin
    assert (N_TAPS % 4 == 3) else $error("N_TAPS must be 4k+3 (centre tap at odd index)");
  end

  // ---------------- input stage ----------------
  logic                    odd_next;   // next sample read has odd index
  logic                    car_neg;    // carrier sign of next even sample
  logic                    pend_valid, pend_neg;
  logic signed [X_W-1:0]   pend_x;
  logic signed [X_W-1:0]   line_x   [NE];
  logic                    line_neg [NE];

  // ---------------- operation control ----------------
  logic                    run, sum_pending, step_en, launch, last_step;
  logic [$clog2(ND)-1:0]   phase;
  logic                    out_free;

  // ---------------- coefficient loader ----------------
  logic                    ld_busy;
  logic [2:0]              ld_k;
  logic [CA_W-1:0]         ld_u;
  logic signed [TBL_W-1:0] ld_val, ld_coef;
  logic signed [COEF_W-1:0] centre;

  logic signed [ACC_W-1:0]  prod [NE];
  logic signed [COEF_W-1:0] coef_q [NE];

  assign coef_busy = ld_busy;
  assign out_free  = !out_valid || out_ready;
  assign step_en   = run && !ld_busy && (phase != 0 || !sum_pending || out_free);
  assign last_step = step_en && (phase == $bits(phase)'(ND - 1));
  assign launch    = enable && pend_valid && !ld_busy && (!run || last_step);
  assign in_pop    = enable && in_valid && (odd_next || !pend_valid || launch);
  assign stall     = run && !ld_busy && !step_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_next   <= 1'b0;
      car_neg    <= 1'b0;
      pend_valid <= 1'b0;
      pend_neg   <= 1'b0;
      pend_x     <= '0;
      run        <= 1'b0;
      phase      <= '0;
      for (int j = 0; j < NE; j++) begin
        line_x[j]   <= '0;
        line_neg[j] <= 1'b0;
      end
    end else if (soft_rst) begin
      odd_next   <= 1'b0;
      car_neg    <= 1'b0;
      pend_valid <= 1'b0;
      run        <= 1'b0;
      phase      <= '0;
      for (int j = 0; j < NE; j++) begin
        line_x[j]   <= '0;
        line_neg[j] <= 1'b0;
      end
    end else begin
      // phases of the running computation
      if (step_en) phase <= last_step ? '0 : phase + 1'b1;
      if (last_step && !launch) run <= 1'b0;
      // a new computation shifts the pending sample into the delay line
      if (launch) begin
        run        <= 1'b1;
        phase      <= '0;
        pend_valid <= 1'b0;
        line_x[0]   <= pend_x;
        line_neg[0] <= pend_neg;
        for (int j = 1; j < NE; j++) begin
          line_x[j]   <= line_x[j-1];
          line_neg[j] <= line_neg[j-1];
        end
      end
      // input sample: even index kept with its carrier sign, odd dropped
      if (in_pop) begin
        odd_next <= !odd_next;
        if (!odd_next) begin
          pend_valid <= 1'b1;
          pend_x     <= in_data[X_W-1:0];
          pend_neg   <= car_neg;
          car_neg    <= !car_neg;
        end
      end
    end
  end

  // ---------------- coefficient multipliers ----------------
  for (genvar j = 0; j < NE; j++) begin : g_mult
    localparam int unsigned U = (j < NE - 1 - j) ? j : NE - 1 - j;
    logic tbl_we;
    assign tbl_we = ld_busy && (ld_u == CA_W'(U));
    da_coef_mult #(.COEF_W(COEF_W), .X_W(X_W)) u_mult (
      .clk       (clk),
      .rst_n     (rst_n),
      .tbl_we    (tbl_we),
      .tbl_addr  (ld_k),
      .tbl_wdata (ld_val),
      .coef      (coef_q[j]),
      .step      (step_en),
      .phase     (phase),
      .neg       (line_neg[j]),
      .x         (line_x[j]),
      .prod      (prod[j])
    );
  end

  // ---------------- coefficient loader ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_busy <= 1'b0;
      ld_k    <= '0;
      ld_u    <= '0;
      ld_val  <= '0;
      ld_coef <= '0;
      centre  <= '0;
    end else if (ld_busy) begin
      ld_k   <= ld_k + 1'b1;
      ld_val <= ld_val + ld_coef;
      if (ld_k == 3'd7) ld_busy <= 1'b0;
    end else if (coef_we) begin
      if (coef_addr < CA_W'(NU)) begin
        ld_busy <= 1'b1;
        ld_k    <= '0;
        ld_u    <= coef_addr;
        ld_val  <= '0;
        ld_coef <= TBL_W'(coef_wdata);
      end else if (coef_addr == CA_W'(NU)) begin
        centre <= coef_wdata;
      end
    end
  end

  always_comb begin
    coef_rdata = centre;
    for (int u = 0; u < NU; u++)
      if (coef_raddr == CA_W'(u)) coef_rdata = coef_q[u];
  end

  // ---------------- sum, scaling, output register ----------------
  logic signed [SUM_W-1:0] sum, shifted;
  localparam logic signed [SUM_W-1:0] YMAX = SUM_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [SUM_W-1:0] YMIN = -SUM_W'(1 << (OUT_W - 1));

  always_comb begin
    sum = '0;
    for (int j = 0; j < NE; j++) sum += SUM_W'(prod[j]);
    shifted = sum >>> OUT_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_pending <= 1'b0;
      out_valid   <= 1'b0;
      out_data    <= '0;
    end else if (soft_rst) begin
      sum_pending <= 1'b0;
      out_valid   <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (sum_pending && out_free) begin
        sum_pending <= 1'b0;
        out_valid   <= 1'b1;
        if (shifted > YMAX)      out_data <= YMAX[OUT_W-1:0];
        else if (shifted < YMIN) out_data <= YMIN[OUT_W-1:0];
        else                     out_data <= shifted[OUT_W-1:0];
      end
      if (last_step) sum_pending <= 1'b1;
    end
  end

  // the datapath never steps while the tables are being written
  assert property (@(posedge clk) disable iff (!rst_n) !(step_en && ld_busy));

endmodule
