// tb_mobilenet_c1: runs a tile of the first layer of MobileNet on the full
// accelerator at its default size: a 3 x 3 convolution, stride 2, of a
// 224 x 224 x 3 int8 image into 32 output channels, with ReLU. The tile is
// 16 output pixels of the last output row (x = 96..111, y = 111), so the
// zero padding at the image's right and bottom edges is included.
//
// Mapping: each output pixel needs 27 products per channel (3 x 3 taps x 3
// input channels), taken in the order tap t = (ky*3 + kx)*3 + c. They are
// split into four vectors of 8 (the last padded with zeros), accumulated by
// the aggregation core (acc_n = 4), with one weight set per vector: set k
// holds the weights of taps 8k..8k+7 for all 32 output channels (array a,
// column j computes channel 8a + j). The image and weights are made up by
// a hash here, so no data file is needed; the expected outputs come from a
// direct convolution over the image, not from the vector layout.
// The layer's shape is MobileNet's (as the document uses it); the value
// ranges, shift and tile are this testbench's choices. The ranges keep each
// 8-term partial sum inside 16 bits.
module tb_mobilenet_c1;
  import dla_pkg::*;
  localparam int IMG = 224, OUT = 112, CIN = 3, COUT = 32, TAPS = 27;
  localparam int NPIX = 16, OY = 111, OX0 = 96, SHIFT = 4;
  localparam int SRC = 2048, DST = 40000;   // word addresses in external memory
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
  logic bank_sel;

  dla_top dut (.*);

  axi_mem_model #(.WORDS(65536), .READ_LAT(8), .STALL(1)) u_mem (
    .clk, .rst_n,
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready)
  );

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hash(int a, int b, int c, int salt);
    int unsigned h;
    h = 32'(a) * 32'd73856093 ^ 32'(b) * 32'd19349663 ^ 32'(c) * 32'd83492791 ^ 32'(salt) * 32'd2654435761;
    h ^= h >> 13;
    h *= 32'd1274126177;
    h ^= h >> 16;
    return int'(h & 32'h7fffffff);
  endfunction

  // image pixel in -64..63, zero outside the image (padding)
  function automatic int img(int y, int x, int c);
    if (y < 0 || y >= IMG || x < 0 || x >= IMG) return 0;
    return (hash(y, x, c, 1) % 128) - 64;
  endfunction

  // weight of output channel oc at tap t, in -16..15
  function automatic int wgt(int oc, int t);
    return (hash(oc, t, 7, 2) % 32) - 16;
  endfunction

  function automatic int tap_pixel(int p, int t);   // image value of tap t for pixel p
    int ky, kx, c;
    if (t >= TAPS) return 0;
    c  = t % CIN;
    kx = (t / CIN) % 3;
    ky = t / (3 * CIN);
    return img(2 * OY + ky, 2 * (OX0 + p) + kx, c);
  endfunction

  task automatic cfg_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_valid = 0; cfg_we = 0;
  endtask

  initial begin
    int wbase, abase, nvec, load_len, cycles, pads, sat;
    layer_cfg_t lc;
    rst_n = 0; cfg_valid = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wbase = 0; abase = 4 * 64; nvec = NPIX * 4; load_len = abase + nvec * 2;
    // weight sets: set k, unit u = a*64 + r*8 + j  ->  channel 8a+j, tap 8k+r
    for (int k = 0; k < 4; k++)
      for (int u = 0; u < 256; u++) begin
        int a, r, j, t;
        a = u / 64; r = (u % 64) / 8; j = u % 8; t = 8 * k + r;
        u_mem.mem[SRC + wbase + 64 * k + u / 4][8 * (u % 4) +: 8] = 8'(t < TAPS ? wgt(8 * a + j, t) : 0);
      end
    // vectors: pixel p, chunk k at abase + 2*(4p + k), row r = tap 8k + r
    for (int p = 0; p < NPIX; p++)
      for (int k = 0; k < 4; k++)
        for (int r = 0; r < 8; r++)
          u_mem.mem[SRC + abase + 2 * (4 * p + k) + r / 4][8 * (r % 4) +: 8] = 8'(tap_pixel(p, 8 * k + r));
    for (int i = 0; i < NPIX * 8 + 8; i++) u_mem.mem[DST + i] = 32'hDEADBEEF;

    lc = '0;
    lc.prec = PREC_8B; lc.conv_mode = CONV_NORMAL; lc.relu = 1'b1; lc.shift = 4'(SHIFT);
    lc.pool_op = POOL_NONE; lc.pool_n = 4'd1; lc.acc_n = 4'd4;
    cfg_write(REG_EXT_SRC, 32'(4 * SRC));
    cfg_write(REG_EXT_DST, 32'(4 * DST));
    cfg_write(REG_LOAD_LEN, 32'(load_len));
    cfg_write(REG_LAYER, 32'(lc));
    cfg_write(REG_WACT_BASE, {16'(abase), 16'(wbase)});
    cfg_write(REG_OUT_BASE, {16'(nvec), 16'd8192});
    cfg_write(REG_CTRL, 32'd1);
    cycles = 0;
    while (!irq) begin @(negedge clk); cycles++; end
    checks++;
    if (dma_error) failures++;

    // direct convolution reference
    pads = 0; sat = 0;
    for (int p = 0; p < NPIX; p++)
      for (int oc = 0; oc < COUT; oc++) begin
        int s;
        logic [7:0] e, g;
        s = 0;
        for (int ky = 0; ky < 3; ky++)
          for (int kx = 0; kx < 3; kx++)
            for (int c = 0; c < CIN; c++) begin
              int iy, ix;
              iy = 2 * OY + ky; ix = 2 * (OX0 + p) + kx;
              if (iy >= IMG || ix >= IMG) pads++;
              s += img(iy, ix, c) * wgt(oc, (ky * 3 + kx) * 3 + c);
            end
        if (s < 0) s = 0;
        s = s >>> SHIFT;
        if (s > 127) begin s = 127; sat++; end
        e = 8'(s);
        g = u_mem.mem[DST + p * 8 + oc / 4][8 * (oc % 4) +: 8];
        checks++;
        if (g !== e) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d channel %0d: got %0d expected %0d", p, oc, signed'(g), signed'(e));
        end
      end
    checks++;
    if (u_mem.mem[DST + NPIX * 8] !== 32'hDEADBEEF) failures++;
    // the padding at the image edge must have been exercised
    checks++;
    if (pads == 0) failures++;
    checks++;
    if (perf_vectors != 32'(nvec)) failures++;
    $display("C1 tile: %0d output pixels x %0d channels, %0d vectors, %0d cycles (%0d per pixel), %0d padded taps, %0d saturated",
             NPIX, COUT, nvec, cycles, cycles / NPIX, pads, sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
