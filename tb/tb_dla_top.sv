// tb_dla_top: end-to-end test of the accelerator at its default size
// (256 KB buffer, 4 x 64 MACs). For each of several layers the testbench
// writes weights and activation vectors into the behavioural external memory,
// programs the configuration registers, starts the layer and waits for the
// interrupt. The results the accelerator wrote back to external memory are
// compared with a model computed here (dot products of the weight-stationary
// arrays, accumulation with one weight set per step, ReLU, shift and
// saturation, pooling).
// The layers together exercise: 8/4/2-bit precision, normal and depthwise
// convolution, max/min/average pooling and none, ReLU, saturation, zero
// skipping, the ping-pong bank swap, multi-burst DMA transfers split at 4 KB
// boundaries, and the interrupt; each is counted and must occur.
// Runs at the default parameters. The layer settings, data and memory model are
// this testbench's choices; what is checked follows the design's register map.
module tb_dla_top;
  import dla_pkg::*;
  localparam int NA = 4, ROWS = 8, COLS = 8, L = NA * COLS;
  localparam int EXT_WORDS = 65536;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic cfg_valid, cfg_we, irq, busy, dma_error;
  logic [2:0] cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata, perf_skips, perf_vectors;
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [7:0] m_awlen, m_arlen;
  logic [2:0] m_awsize, m_arsize;
  logic [1:0] m_awburst, m_arburst, m_bresp, m_rresp;
  logic [3:0] m_wstrb;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;

  dla_top dut (.*);

  axi_mem_model #(.WORDS(EXT_WORDS), .READ_LAT(8), .STALL(1)) u_mem (
    .clk, .rst_n,
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready)
  );

  // mechanism counters
  int n_prec[4], n_conv[2], n_pool[4], n_relu_zero, n_sat, n_swaps, n_irq;
  logic bank_sel, bank_q;
  always @(posedge clk) begin
    bank_q <= bank_sel;
    if (rst_n && bank_sel !== bank_q) n_swaps++;
  end
  always @(posedge clk) if (rst_n && irq && !$past(irq)) n_irq++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_valid = 0; cfg_we = 0;
  endtask

  function automatic int lsum(logic [7:0] xv, logic [7:0] wv, logic [1:0] s);
    int wd, r, xa, wb;
    wd = (s == 2'd0) ? 2 : (s == 2'd3) ? 4 : 8;
    r = 0;
    for (int k = 0; k < 8 / wd; k++) begin
      xa = int'(xv >> (wd * k)) & ((1 << wd) - 1);
      wb = int'(wv >> (wd * k)) & ((1 << wd) - 1);
      if (xa >= (1 << (wd - 1))) xa -= (1 << wd);
      if (wb >= (1 << (wd - 1))) wb -= (1 << wd);
      r += xa * wb;
    end
    return r;
  endfunction

  function automatic logic [7:0] ext_byte(int word_addr, int b);
    return u_mem.mem[word_addr][8*b +: 8];
  endfunction

  // Runs one layer and checks its results.
  task automatic run_layer(input int prec, input int dw, input int relu, input int shift,
                           input int pool_op, input int pool_n, input int acc_n, input int nvec,
                           input int src_word, input int dst_word, input int zero_pct);
    int vw, load_len, wbase, abase, obase, nres, cycles;
    int acc[L], pool[L], cnt_a, cnt_p, r_idx;
    layer_cfg_t lc;
    vw = dw ? NA * ROWS / 4 : ROWS / 4;
    wbase = 0; abase = 64 * (acc_n > 1 ? acc_n : 1); obase = 16384;
    load_len = abase + nvec * vw;
    // input block in external memory
    for (int i = 0; i < load_len; i++) begin
      logic [31:0] w;
      for (int b = 0; b < 4; b++)
        w[8*b +: 8] = (i >= abase && ($urandom % 100) < zero_pct) ? 8'd0 : 8'($urandom);
      u_mem.mem[src_word + i] = w;
    end
    for (int i = 0; i < 4096; i++) u_mem.mem[dst_word + i] = 32'hDEADBEEF;
    lc = '0;
    lc.prec = 2'(prec); lc.conv_mode = dw[0]; lc.relu = relu[0]; lc.shift = 4'(shift);
    lc.pool_op = 2'(pool_op); lc.pool_n = 4'(pool_n); lc.acc_n = 4'(acc_n);
    cfg_write(REG_EXT_SRC, 32'(4 * src_word));
    cfg_write(REG_EXT_DST, 32'(4 * dst_word));
    cfg_write(REG_LOAD_LEN, 32'(load_len));
    cfg_write(REG_LAYER, 32'(lc));
    cfg_write(REG_WACT_BASE, {16'(abase), 16'(wbase)});
    cfg_write(REG_OUT_BASE, {16'(nvec), 16'(obase)});
    cfg_write(REG_CTRL, 32'd1);
    cycles = 0;
    while (!irq) begin @(negedge clk); cycles++; end
    n_prec[prec]++; n_conv[dw]++;
    // status register
    @(negedge clk);
    cfg_addr = REG_STATUS;
    #1;
    checks++;
    if (cfg_rdata[1:0] !== 2'b10) begin failures++; $display("FAIL status %b", cfg_rdata[1:0]); end
    cfg_write(REG_CTRL, 32'd2);   // clear irq
    checks++;
    if (irq !== 1'b0) failures++;
    checks++;
    if (dma_error) failures++;
    // model
    cnt_a = 0; cnt_p = 0; r_idx = 0;
    for (int v = 0; v < nvec; v++) begin
      for (int a = 0; a < NA; a++)
        for (int c = 0; c < COLS; c++) begin
          int y, l;
          l = a * COLS + c;
          y = 0;
          for (int r = 0; r < ROWS; r++) begin
            int u, xw, xb;
            logic [7:0] wv, xv;
            u  = a * 64 + r * COLS + c;
            wv = ext_byte(src_word + wbase + (acc_n > 1 ? 64 * (v % acc_n) : 0) + u / 4, u % 4);
            xw = src_word + abase + v * vw + (dw ? a * (ROWS / 4) : 0) + r / 4;
            xv = ext_byte(xw, r % 4);
            y += lsum(xv, wv, 2'(prec));
          end
          y = int'(signed'(16'(y)));     // 16-bit partial sums wrap
          acc[l] = (cnt_a == 0 ? 0 : acc[l]) + y;
        end
      cnt_a++;
      if (cnt_a == acc_n) begin
        cnt_a = 0;
        for (int l = 0; l < L; l++) begin
          int q;
          q = acc[l];
          if (relu && q < 0) begin q = 0; n_relu_zero++; end
          q = q >>> shift;
          if (q > 127) begin q = 127; n_sat++; end
          if (q < -128) begin q = -128; n_sat++; end
          if (cnt_p == 0 || pool_op == POOL_NONE) pool[l] = q;
          else if (pool_op == POOL_MAX) pool[l] = (q > pool[l]) ? q : pool[l];
          else if (pool_op == POOL_MIN) pool[l] = (q < pool[l]) ? q : pool[l];
          else pool[l] += q;
        end
        cnt_p++;
        if (pool_op == POOL_NONE || cnt_p == pool_n) begin
          cnt_p = 0;
          for (int l = 0; l < L; l++) begin
            logic [7:0] e, g;
            e = (pool_op == POOL_AVG && pool_n > 1) ? 8'(pool[l] / pool_n) : 8'(pool[l]);
            g = ext_byte(dst_word + r_idx * (L / 4) + l / 4, l % 4);
            checks++;
            if (g !== e) begin
              failures++;
              if (failures < 10) $display("FAIL layer prec=%0d dw=%0d res=%0d lane=%0d got=%0d exp=%0d",
                                          prec, dw, r_idx, l, signed'(g), signed'(e));
            end
          end
          r_idx++;
        end
      end
    end
    n_pool[pool_op] += r_idx;
    // nothing written past the last result
    checks++;
    if (u_mem.mem[dst_word + r_idx * (L / 4)] !== 32'hDEADBEEF) failures++;
    checks++;
    if (r_idx == 0) failures++;
    $display("layer prec=%0d dw=%0d pool=%0d/%0d acc=%0d: %0d vectors, %0d results, %0d cycles",
             prec, dw, pool_op, pool_n, acc_n, nvec, r_idx, cycles);
  endtask

  initial begin
    rst_n = 0; cfg_valid = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    //        prec     dw relu sh pool      n acc nvec src    dst    zero%
    run_layer(PREC_8B, 0, 1,   6, POOL_NONE, 1, 1, 24,  1000,  20000, 30);
    run_layer(PREC_4B, 1, 0,   3, POOL_MAX,  4, 2, 32,  5000,  24000, 20);
    run_layer(PREC_2B, 0, 0,   0, POOL_AVG,  9, 1, 27,  9000,  28000, 10);
    run_layer(PREC_8B, 1, 1,   4, POOL_MIN,  2, 3, 24,  13000, 32000, 50);
    run_layer(PREC_4B, 0, 1,   2, POOL_AVG,  4, 1, 16,  17000, 36000, 0);
    // every mechanism must have happened
    checks++;
    if (n_prec[PREC_8B] == 0 || n_prec[PREC_4B] == 0 || n_prec[PREC_2B] == 0) failures++;
    checks++;
    if (n_conv[0] == 0 || n_conv[1] == 0) failures++;
    checks++;
    if (n_pool[POOL_NONE] == 0 || n_pool[POOL_MAX] == 0 || n_pool[POOL_MIN] == 0 || n_pool[POOL_AVG] == 0) failures++;
    checks++;
    if (n_relu_zero == 0 || n_sat == 0) failures++;
    checks++;
    if (perf_skips == 0) failures++;
    checks++;
    if (n_swaps != 10) failures++;              // two per layer
    checks++;
    if (n_irq != 5) failures++;
    checks++;
    if (u_mem.crossings != 0 || u_mem.rd_bursts <= 5) failures++;
    checks++;
    if (perf_vectors != 24 + 32 + 27 + 24 + 16) failures++;
    $display("mechanisms: prec 8b=%0d 4b=%0d 2b=%0d, normal=%0d depthwise=%0d, pool none/max/min/avg=%0d/%0d/%0d/%0d",
             n_prec[PREC_8B], n_prec[PREC_4B], n_prec[PREC_2B], n_conv[0], n_conv[1],
             n_pool[0], n_pool[1], n_pool[2], n_pool[3]);
    $display("relu zeroed=%0d saturated=%0d zero skips=%0d bank swaps=%0d irqs=%0d read bursts=%0d write bursts=%0d",
             n_relu_zero, n_sat, perf_skips, n_swaps, n_irq, u_mem.rd_bursts, u_mem.wr_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
