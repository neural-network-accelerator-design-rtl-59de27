// global_buffer: the accelerator's on-chip SRAM (256 KB), organised as two
// ping-pong banks of 32-bit words.
//
// Port A serves the DMA (external memory side), port B the compute side
// (weights and activations to the systolic array, results back). Port A
// always works on bank `bank_sel`, port B on the other bank, so both can run
// every cycle without ever colliding; a `swap` pulse exchanges the banks, for
// instance to hand a freshly loaded input block to the compute side. Size
// (256 KB), ping-pong operation and the 2-cycle read latency are from the
// document; the two-port split with one bank per port is this design's.
//
// Timing: a write (en & we) takes effect at the clock edge. A read (en & !we)
// returns its word on rdata READ_LAT (2) cycles later, with rvalid. Reads
// in flight complete from the bank they were issued to, even across a swap.
// The banks are plain arrays; a silicon implementation would put SRAM macros
// in their place.
module global_buffer #(
  parameter int unsigned DEPTH = 32768,   // words per bank (2 x 128 KB)
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  output logic          bank_sel,
  // port A (DMA)
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  output logic          a_rvalid,
  // port B (compute)
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata,
  output logic          b_rvalid
);
  logic [31:0] bank0 [DEPTH];
  logic [31:0] bank1 [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bank_sel <= 1'b0;
    else if (swap) bank_sel <= ~bank_sel;
  end

  // Per bank: which port drives it this cycle.
  logic          en0, we0, en1, we1;
  logic [AW-1:0] ad0, ad1;
  logic [31:0]   wd0, wd1;
  always_comb begin
    if (!bank_sel) begin
      {en0, we0, ad0, wd0} = {a_en, a_we, a_addr, a_wdata};
      {en1, we1, ad1, wd1} = {b_en, b_we, b_addr, b_wdata};
    end else begin
      {en0, we0, ad0, wd0} = {b_en, b_we, b_addr, b_wdata};
      {en1, we1, ad1, wd1} = {a_en, a_we, a_addr, a_wdata};
    end
  end

  // Single-port banks, registered read, then one output register.
  logic [31:0] r0_q, r1_q;
  always_ff @(posedge clk) begin
    if (en0 && we0) bank0[ad0] <= wd0;
    if (en0 && !we0) r0_q <= bank0[ad0];
    if (en1 && we1) bank1[ad1] <= wd1;
    if (en1 && !we1) r1_q <= bank1[ad1];
  end

  // Read pipeline: remember the bank each port read from.
  logic a_rd_q, b_rd_q, a_bk_q, b_bk_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rd_q <= 1'b0; b_rd_q <= 1'b0; a_bk_q <= 1'b0; b_bk_q <= 1'b0;
      a_rvalid <= 1'b0; b_rvalid <= 1'b0;
      a_rdata <= '0; b_rdata <= '0;
    end else begin
      a_rd_q   <= a_en && !a_we;
      b_rd_q   <= b_en && !b_we;
      a_bk_q   <= bank_sel;
      b_bk_q   <= ~bank_sel;
      a_rvalid <= a_rd_q;
      b_rvalid <= b_rd_q;
      if (a_rd_q) a_rdata <= a_bk_q ? r1_q : r0_q;
      if (b_rd_q) b_rdata <= b_bk_q ? r1_q : r0_q;
    end
  end
endmodule : global_buffer
