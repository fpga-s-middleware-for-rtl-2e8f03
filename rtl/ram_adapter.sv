// ram_adapter: P-HAL RAM adaptation between an object and external SRAM.
//
// An object is written as if it had a RAM with single-cycle synchronous
// access: it presents obj_en (with obj_we, obj_addr, obj_wdata) and, for a
// read, expects obj_rdata in the next clock. The memory actually on the
// board is slower. This adapter turns each access into an asynchronous
// SRAM cycle that holds address, data and strobes (active-low ce, we, oe)
// for WAIT_STATES + 1 clocks, samples read data at the end of the cycle,
// and meanwhile raises obj_wait so the object holds its request and
// stalls. With WAIT_STATES = 0 the adapter adds no stall and the object
// sees the single-cycle RAM it was designed for.
// Timing: an access accepted in clock t (obj_en high, obj_wait low)
// drives the SRAM in clocks t+1 .. t+1+WAIT_STATES; obj_wait is high in
// those clocks except the last; read data is on obj_rdata with obj_rvalid
// in the clock after. The SRAM data bus is split into dq_out/dq_oe/dq_in
// instead of a bidirectional pin.
// The single-cycle object interface and the conversion to the available
// RAM with wait states follow the document; the SRAM signals, widths and
// the default of two wait states are this design's choices.
module ram_adapter #(
  parameter int unsigned ADDR_W      = 18,
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned WAIT_STATES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // object side: single-cycle synchronous RAM
  input  logic              obj_en,
  input  logic              obj_we,
  input  logic [ADDR_W-1:0] obj_addr,
  input  logic [DATA_W-1:0] obj_wdata,
  output logic [DATA_W-1:0] obj_rdata,
  output logic              obj_rvalid,
  output logic              obj_wait,
  // external asynchronous SRAM
  output logic              sram_ce_n,
  output logic              sram_we_n,
  output logic              sram_oe_n,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [DATA_W-1:0] sram_dq_out,
  output logic              sram_dq_oe,
  input  logic [DATA_W-1:0] sram_dq_in
);
  localparam int unsigned CW = $clog2(WAIT_STATES + 2);
  logic          active, is_read;
  logic [CW-1:0] cnt;
  logic          done;

  assign done     = active && (cnt == '0);
  assign obj_wait = active && !done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      is_read     <= 1'b0;
      cnt         <= '0;
      sram_ce_n   <= 1'b1;
      sram_we_n   <= 1'b1;
      sram_oe_n   <= 1'b1;
      sram_addr   <= '0;
      sram_dq_out <= '0;
      sram_dq_oe  <= 1'b0;
      obj_rdata   <= '0;
      obj_rvalid  <= 1'b0;
    end else begin
      obj_rvalid <= 1'b0;
      if (active && !done) cnt <= cnt - 1'b1;
      if (done) begin
        if (is_read) begin
          obj_rdata  <= sram_dq_in;
          obj_rvalid <= 1'b1;
        end
        active     <= 1'b0;
        sram_ce_n  <= 1'b1;
        sram_we_n  <= 1'b1;
        sram_oe_n  <= 1'b1;
        sram_dq_oe <= 1'b0;
      end
      if (obj_en && !obj_wait) begin
        active      <= 1'b1;
        is_read     <= !obj_we;
        cnt         <= CW'(WAIT_STATES);
        sram_ce_n   <= 1'b0;
        sram_we_n   <= !obj_we;
        sram_oe_n   <= obj_we;
        sram_addr   <= obj_addr;
        sram_dq_out <= obj_wdata;
        sram_dq_oe  <= obj_we;
      end
    end
  end

endmodule
