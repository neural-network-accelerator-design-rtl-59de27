// dla_top: deep learning accelerator subsystem for an SoC.
//
// A host CPU configures a layer over the configuration bus and starts it; the
// accelerator fetches the layer's input block (weights and activations)
// from external memory over its AXI4 master, computes with 256 precision-
// flexible MAC units (four arrays of 64), post-processes the results
// (accumulation, ReLU, truncation to 8 bits, pooling) and writes them back to
// external memory, then raises `irq`.
//
// Blocks and connections, after the document's top-level and data-movement
// figures: control_unit (top controller, configuration registers) drives the
// dma (AXI4 <-> global buffer port A), the global_buffer (256 KB ping-pong
// SRAM), the systolic_array (CNN core, 4 x 64 MACs) and the
// aggregation_core (pooling and activation). Data from the buffer reaches the
// systolic array and results come back through the controller's
// distribution path (port B of the buffer). The pre-processing unit and the
// RNN-LSTM core that the document's figure names are not included.
//
// Timing: see the blocks. perf_skips counts the zero activations skipped by
// the MAC units, perf_vectors the input vectors issued to the systolic array;
// bank_sel shows which ping-pong bank is on the DMA side.
// rst_n also disables the DMA's handshake assertions, which lint reports as
// a signal used both synchronously and asynchronously; the logic itself uses
// it only as an asynchronous reset.
module dla_top
  import dla_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 32768,   // words per ping-pong bank: 2 x 128 KB = 256 KB
  parameter int unsigned N_ARR     = 4,       // MAC arrays
  parameter int unsigned ROWS      = 8,       // MAC array rows    (8 x 8 = 64 MACs)
  parameter int unsigned COLS      = 8,       // MAC array columns
  parameter int unsigned MAX_BURST = 16       // AXI burst length in beats
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration bus
  input  logic        cfg_valid,
  input  logic        cfg_we,
  input  logic [2:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  output logic        irq,
  output logic        busy,
  // AXI4 master to external memory
  output logic [31:0] m_awaddr,
  output logic [7:0]  m_awlen,
  output logic [2:0]  m_awsize,
  output logic [1:0]  m_awburst,
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [31:0] m_wdata,
  output logic [3:0]  m_wstrb,
  output logic        m_wlast,
  output logic        m_wvalid,
  input  logic        m_wready,
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready,
  output logic [31:0] m_araddr,
  output logic [7:0]  m_arlen,
  output logic [2:0]  m_arsize,
  output logic [1:0]  m_arburst,
  output logic        m_arvalid,
  input  logic        m_arready,
  input  logic [31:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rlast,
  input  logic        m_rvalid,
  output logic        m_rready,
  // status and counters
  output logic        dma_error,
  output logic [31:0] perf_skips,
  output logic [31:0] perf_vectors,
  output logic        bank_sel       // buffer bank on the DMA side (toggles on each swap)
);
  localparam int unsigned AW    = $clog2(BUF_DEPTH);
  localparam int unsigned LANES = N_ARR * COLS;

  // DMA <-> controller
  logic     dma_cmd_valid, dma_cmd_ready, dma_done;
  dma_cmd_t dma_cmd;
  // buffer ports
  logic          swap;
  logic          a_en, a_we, a_rvalid, b_en, b_we, b_rvalid;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_wdata, a_rdata, b_wdata, b_rdata;
  // systolic array
  logic [1:0] prec;
  logic       conv_mode, w_we, x_valid, y_valid;
  logic [$clog2(N_ARR*ROWS*COLS/4)-1:0] w_addr;
  logic [31:0] w_data;
  logic [N_ARR-1:0][ROWS-1:0][7:0] x;
  logic [LANES-1:0][15:0] y;
  logic [$clog2(N_ARR*ROWS*COLS+1)-1:0] skip_count;
  // aggregation
  logic       agg_clear, relu, agg_valid;
  logic [3:0] acc_n, shift, pool_n;
  logic [1:0] pool_op;
  logic [LANES-1:0][7:0] agg_data;

  control_unit #(.AW(AW), .N_ARR(N_ARR), .ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk, .rst_n,
    .cfg_valid, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .irq,
    .dma_cmd_valid, .dma_cmd_ready, .dma_cmd, .dma_done,
    .buf_swap(swap), .b_en, .b_we, .b_addr, .b_wdata, .b_rdata, .b_rvalid,
    .prec, .conv_mode, .w_we, .w_addr, .w_data, .x_valid, .x, .y_valid,
    .agg_clear, .acc_n, .relu, .shift, .pool_op, .pool_n, .agg_valid, .agg_data,
    .busy
  );

  dma #(.MAX_BURST(MAX_BURST), .AW(AW)) u_dma (
    .clk, .rst_n,
    .cmd_valid(dma_cmd_valid), .cmd_ready(dma_cmd_ready), .cmd(dma_cmd),
    .done(dma_done), .error(dma_error),
    .buf_en(a_en), .buf_we(a_we), .buf_addr(a_addr), .buf_wdata(a_wdata),
    .buf_rdata(a_rdata), .buf_rvalid(a_rvalid),
    .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready,
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready
  );

  global_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .swap, .bank_sel,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .a_rvalid,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata, .b_rvalid
  );

  systolic_array #(.N_ARR(N_ARR), .ROWS(ROWS), .COLS(COLS)) u_core (
    .clk, .rst_n, .prec, .conv_mode,
    .w_we, .w_addr, .w_data,
    .x_valid, .x, .psum_top('0),
    .y_valid, .y, .skip_count
  );

  aggregation_core #(.LANES(LANES)) u_agg (
    .clk, .rst_n, .clear(agg_clear),
    .acc_n, .relu, .shift, .pool_op, .pool_n,
    .in_valid(y_valid), .in_data(y),
    .out_valid(agg_valid), .out_data(agg_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf_skips   <= '0;
      perf_vectors <= '0;
    end else begin
      perf_skips <= perf_skips + 32'(skip_count);
      if (x_valid) perf_vectors <= perf_vectors + 32'd1;
    end
  end
endmodule : dla_top
