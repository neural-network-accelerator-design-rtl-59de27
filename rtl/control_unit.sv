// control_unit: the accelerator's top controller. It holds the configuration
// registers, written over a dedicated configuration bus, and runs one layer
// through the five steps of the document's layer timeline:
//   1. load the input block (weights and activations) from external memory
//      into the global buffer with the DMA, then swap the ping-pong banks so
//      the compute side sees it;
//   2. activate the blocks: clear the aggregation core, select precision,
//      convolution mode, activation and pooling;
//   3. distribute data: write the 256 weights (64 words) into the MAC units,
//      then, per input vector, read its activation words from the buffer;
//      when acc_n > 1 results sum acc_n vectors, and each of those steps
//      has its own weight set (k = vector index mod acc_n, 64 words at
//      wbase + 64k), reloaded before every vector, so that a kernel longer
//      than 8 terms (e.g. 3x3xC) can be split over several vectors;
//   4. compute: issue the vector to the systolic array, wait for its result
//      and for the aggregation core;
//   5. write back: store each aggregated 32-byte result in the buffer, and at
//      the end swap the banks again and let the DMA copy the results to
//      external memory. `irq` is raised and STATUS.done set.
// The step order, the configuration registers reached over their own bus
// and the interrupt are from the document; the register map (dla_pkg), the
// one-vector-at-a-time issue and the buffer layout are this design's.
//
// Buffer layout (word addresses in the bank): weights at wbase, 64 words
// (acc_n sets of 64 one after another when acc_n > 1), byte k of word i is
// unit 4i+k; activation vector v at abase + v*VW, where
// VW = 2 words in normal mode (8 activations, rows 0..7) and 8 words in
// depthwise mode (8 activations for each of the 4 arrays); result r at
// obase + 8r (32 bytes, lane l in byte l).
//
// Configuration bus: cfg_valid with cfg_we writes cfg_wdata to register
// cfg_addr; cfg_rdata always shows the addressed register. Registers: see
// dla_pkg (REG_*). Writing CTRL bit 0 starts a layer, bit 1 clears irq.
// Only the low AW bits of the buffer base addresses are used (a bank has 2^AW
// words), and LAYER bits [31:24] and [7:2] are reserved, so lint reports
// those register bits as unused.
module control_unit
  import dla_pkg::*;
#(
  parameter int unsigned AW    = 15,   // buffer word address width
  parameter int unsigned N_ARR = 4,
  parameter int unsigned ROWS  = 8,
  parameter int unsigned COLS  = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration bus
  input  logic          cfg_valid,
  input  logic          cfg_we,
  input  logic [2:0]    cfg_addr,
  input  logic [31:0]   cfg_wdata,
  output logic [31:0]   cfg_rdata,
  output logic          irq,
  // DMA
  output logic          dma_cmd_valid,
  input  logic          dma_cmd_ready,
  output dma_cmd_t      dma_cmd,
  input  logic          dma_done,
  // global buffer: bank swap and port B
  output logic          buf_swap,
  output logic          b_en,
  output logic          b_we,
  output logic [AW-1:0] b_addr,
  output logic [31:0]   b_wdata,
  input  logic [31:0]   b_rdata,
  input  logic          b_rvalid,
  // systolic array
  output logic [1:0]    prec,
  output logic          conv_mode,
  output logic          w_we,
  output logic [$clog2(N_ARR*ROWS*COLS/4)-1:0] w_addr,
  output logic [31:0]   w_data,
  output logic          x_valid,
  output logic [N_ARR-1:0][ROWS-1:0][7:0] x,
  input  logic          y_valid,
  // aggregation core
  output logic          agg_clear,
  output logic [3:0]    acc_n,
  output logic          relu,
  output logic [3:0]    shift,
  output logic [1:0]    pool_op,
  output logic [3:0]    pool_n,
  input  logic          agg_valid,
  input  logic [N_ARR*COLS-1:0][7:0] agg_data,
  // status
  output logic          busy
);
  localparam int unsigned WWORDS = N_ARR * ROWS * COLS / 4;  // weight words
  localparam int unsigned XW     = ROWS / 4;                 // words per array vector
  localparam int unsigned OW     = N_ARR * COLS / 4;         // words per result

  typedef enum logic [3:0] {
    C_IDLE, C_LOAD, C_LOAD_WAIT, C_ACTIVATE, C_WLOAD, C_XFETCH, C_ISSUE,
    C_WAIT_Y, C_WAIT_AGG, C_WRITE, C_STORE, C_STORE_WAIT, C_DONE
  } cstate_e;

  cstate_e    st_q;
  logic [31:0] regs_q [CFG_REGS];
  layer_cfg_t layer;
  logic       done_q;

  // Counters
  logic [15:0] vec_q;          // input vectors issued
  logic [15:0] res_q;          // results written
  logic [7:0]  rd_issued_q, rd_got_q;
  logic [3:0]  wr_q;
  logic [3:0]  wset_q;         // weight set of the next vector (0 .. acc_n-1)
  logic [N_ARR*COLS-1:0][7:0] res_buf_q;

  assign layer     = layer_cfg_t'(regs_q[REG_LAYER]);
  assign prec      = layer.prec;
  assign conv_mode = layer.conv_mode;
  assign relu      = layer.relu;
  assign shift     = layer.shift;
  assign pool_op   = layer.pool_op;
  assign pool_n    = layer.pool_n;
  assign acc_n     = layer.acc_n;
  assign busy      = (st_q != C_IDLE);

  logic [15:0] wbase, abase, obase, nvec;
  assign wbase = regs_q[REG_WACT_BASE][15:0];
  assign abase = regs_q[REG_WACT_BASE][31:16];
  assign obase = regs_q[REG_OUT_BASE][15:0];
  assign nvec  = regs_q[REG_OUT_BASE][31:16];

  // Words per input vector for the selected convolution mode.
  logic [7:0] vwords;
  assign vwords = (layer.conv_mode == CONV_DEPTHWISE) ? 8'(N_ARR * XW) : 8'(XW);

  // With acc_n > 1 every accumulation step has its own weight set, loaded
  // before each vector from wbase + WWORDS * step.
  logic multi_set;
  assign multi_set = (layer.acc_n > 4'd1);

  // Number of buffer reads of the current read phase.
  logic [7:0] rd_total;
  assign rd_total = (st_q == C_WLOAD) ? 8'(WWORDS) : vwords;

  // Configuration registers
  always_comb begin
    cfg_rdata = regs_q[cfg_addr];
    if (cfg_addr == REG_STATUS) cfg_rdata = {30'd0, done_q, busy};
  end

  logic start;
  assign start = cfg_valid && cfg_we && cfg_addr == REG_CTRL && cfg_wdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CFG_REGS; i++) regs_q[i] <= '0;
    end else if (cfg_valid && cfg_we && cfg_addr != REG_CTRL && cfg_addr != REG_STATUS) begin
      regs_q[cfg_addr] <= cfg_wdata;
    end
  end

  // Buffer port B and array interface (combinational from state/counters)
  always_comb begin
    b_en    = 1'b0;
    b_we    = 1'b0;
    b_addr  = '0;
    b_wdata = '0;
    unique case (st_q)
      C_WLOAD:  if (rd_issued_q != rd_total) begin
                  b_en   = 1'b1;
                  b_addr = AW'(wbase) + AW'(wset_q) * AW'(WWORDS) + AW'(rd_issued_q);
                end
      C_XFETCH: if (rd_issued_q != rd_total) begin
                  b_en   = 1'b1;
                  b_addr = AW'(abase) + AW'(vec_q) * AW'(vwords) + AW'(rd_issued_q);
                end
      C_WRITE:  begin
                  b_en    = 1'b1;
                  b_we    = 1'b1;
                  b_addr  = AW'(obase) + AW'(res_q) * AW'(OW) + AW'(wr_q);
                  b_wdata = res_buf_q[4*wr_q +: 4];
                end
      default: ;
    endcase
  end

  assign w_we   = (st_q == C_WLOAD) && b_rvalid;
  assign w_addr = ($clog2(WWORDS))'(rd_got_q);
  assign w_data = b_rdata;

  // Activation assembly: word i of the vector holds activations 4i..4i+3.
  logic [N_ARR*XW-1:0][31:0] xwords_q;
  always_comb begin
    for (int a = 0; a < N_ARR; a++)
      for (int r = 0; r < ROWS; r++)
        x[a][r] = xwords_q[a*XW + r/4][8*(r%4) +: 8];
  end
  assign x_valid = (st_q == C_ISSUE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= C_IDLE;
      done_q        <= 1'b0;
      irq           <= 1'b0;
      dma_cmd_valid <= 1'b0;
      dma_cmd       <= '0;
      buf_swap      <= 1'b0;
      agg_clear     <= 1'b0;
      vec_q         <= '0;
      res_q         <= '0;
      rd_issued_q   <= '0;
      rd_got_q      <= '0;
      wr_q          <= '0;
      wset_q        <= '0;
      res_buf_q     <= '0;
      xwords_q      <= '0;
    end else begin
      buf_swap  <= 1'b0;
      agg_clear <= 1'b0;
      if (cfg_valid && cfg_we && cfg_addr == REG_CTRL && cfg_wdata[1]) irq <= 1'b0;
      if (dma_cmd_valid && dma_cmd_ready) dma_cmd_valid <= 1'b0;
      unique case (st_q)
        C_IDLE: if (start) begin
          done_q <= 1'b0;
          st_q   <= C_LOAD;
        end
        // step 1: load the input block
        C_LOAD: begin
          dma_cmd_valid <= 1'b1;
          dma_cmd       <= '{to_ext: 1'b0, ext_addr: regs_q[REG_EXT_SRC],
                             buf_addr: 16'd0, len: regs_q[REG_LOAD_LEN][15:0]};
          st_q          <= C_LOAD_WAIT;
        end
        C_LOAD_WAIT: if (dma_done) begin
          buf_swap <= 1'b1;            // hand the loaded bank to port B
          st_q     <= C_ACTIVATE;
        end
        // step 2: activate the blocks
        C_ACTIVATE: begin
          agg_clear   <= 1'b1;
          vec_q       <= '0;
          res_q       <= '0;
          rd_issued_q <= '0;
          rd_got_q    <= '0;
          wset_q      <= '0;
          st_q        <= C_WLOAD;
        end
        // step 3: distribute weights, then activations
        C_WLOAD: begin
          if (b_en) rd_issued_q <= rd_issued_q + 8'd1;
          if (b_rvalid) begin
            rd_got_q <= rd_got_q + 8'd1;
            if (rd_got_q == 8'(WWORDS - 1)) begin
              rd_issued_q <= '0;
              rd_got_q    <= '0;
              st_q        <= (vec_q == nvec) ? C_STORE : C_XFETCH;
            end
          end
        end
        C_XFETCH: begin
          if (b_en) rd_issued_q <= rd_issued_q + 8'd1;
          if (b_rvalid) begin
            if (layer.conv_mode == CONV_DEPTHWISE)
              xwords_q[rd_got_q[$clog2(N_ARR*XW)-1:0]] <= b_rdata;
            else
              for (int a = 0; a < N_ARR; a++)   // broadcast copies (array 0 used)
                xwords_q[a*XW + int'(rd_got_q) % XW] <= b_rdata;
            rd_got_q <= rd_got_q + 8'd1;
            if (rd_got_q == vwords - 8'd1) st_q <= C_ISSUE;
          end
        end
        // step 4: compute
        C_ISSUE: begin
          vec_q  <= vec_q + 16'd1;
          wset_q <= (wset_q + 4'd1 >= layer.acc_n) ? 4'd0 : wset_q + 4'd1;
          st_q   <= C_WAIT_Y;
        end
        C_WAIT_Y: if (y_valid) st_q <= C_WAIT_AGG;
        C_WAIT_AGG: begin
          rd_issued_q <= '0;
          rd_got_q    <= '0;
          if (agg_valid) begin
            res_buf_q <= agg_data;
            wr_q      <= '0;
            st_q      <= C_WRITE;
          end else st_q <= (vec_q == nvec) ? C_STORE : multi_set ? C_WLOAD : C_XFETCH;
        end
        // step 5: write back
        C_WRITE: begin
          wr_q <= wr_q + 4'd1;
          if (wr_q == 4'(OW - 1)) begin
            res_q <= res_q + 16'd1;
            st_q  <= (vec_q == nvec) ? C_STORE : multi_set ? C_WLOAD : C_XFETCH;
          end
        end
        C_STORE: begin
          buf_swap      <= 1'b1;       // results back to the DMA side
          dma_cmd_valid <= 1'b1;
          dma_cmd       <= '{to_ext: 1'b1, ext_addr: regs_q[REG_EXT_DST],
                             buf_addr: obase, len: 16'(res_q * 16'(OW))};
          st_q          <= C_STORE_WAIT;
        end
        C_STORE_WAIT: if (dma_done) st_q <= C_DONE;
        C_DONE: begin
          done_q <= 1'b1;
          irq    <= 1'b1;
          st_q   <= C_IDLE;
        end
        default: st_q <= C_IDLE;
      endcase
    end
  end
endmodule : control_unit
