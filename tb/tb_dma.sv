// tb_dma: moves blocks between the behavioural AXI memory and a global
// buffer through the DMA, with random stalls on the AXI side. Each command
// uses a random length and start address so that transfers split into
// several bursts and cross 4 KB boundaries; the buffer and memory contents
// are then compared word by word with the source data.
// The 32-bit AXI data width is the document's; burst sizes, the 4 KB split and
// the memory model's stalls are this design's and this testbench's choices.
module tb_dma;
  import dla_pkg::*;
  localparam int AW = 12, D = 4096;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic cmd_valid, cmd_ready, done, error;
  dma_cmd_t cmd;
  logic buf_en, buf_we, buf_rvalid;
  logic [AW-1:0] buf_addr;
  logic [31:0] buf_wdata, buf_rdata;
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [7:0] m_awlen, m_arlen;
  logic [2:0] m_awsize, m_arsize;
  logic [1:0] m_awburst, m_arburst, m_bresp, m_rresp;
  logic [3:0] m_wstrb;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;

  dma #(.MAX_BURST(16), .AW(AW)) dut (.*);

  // buffer: port A used by the DMA, port B by the testbench (backdoor)
  logic swap, bank_sel;
  global_buffer #(.DEPTH(D)) u_buf (
    .clk, .rst_n, .swap, .bank_sel,
    .a_en(buf_en), .a_we(buf_we), .a_addr(buf_addr), .a_wdata(buf_wdata),
    .a_rdata(buf_rdata), .a_rvalid(buf_rvalid),
    .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_rdata(), .b_rvalid()
  );

  axi_mem_model #(.WORDS(16384), .READ_LAT(5), .STALL(1)) u_mem (
    .clk, .rst_n,
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready)
  );

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic to_ext, input int ext_word, input int bw, input int len);
    int cycles;
    @(negedge clk);
    cmd = '{to_ext: to_ext, ext_addr: 32'(4 * ext_word), buf_addr: 16'(bw), len: 16'(len)};
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (error) failures++;
    // a transfer cannot beat one word per cycle
    checks++;
    if (cycles < len) failures++;
  endtask

  initial begin
    rst_n = 0; cmd_valid = 0; cmd = '0; swap = 0;
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int src, dst, bw, len;
      len = 1 + $urandom % 300;
      src = (t == 0) ? 1020 : $urandom % 8000;   // first transfer crosses 4 KB at once
      bw  = $urandom % (D - len);
      dst = 8192 + $urandom % 8000;
      // external -> buffer
      run(0, src, bw, len);
      for (int i = 0; i < len; i++) begin
        checks++;
        if (u_buf.bank0[bw + i] !== u_mem.mem[src + i]) begin
          failures++;
          if (failures < 10) $display("FAIL load t=%0d i=%0d", t, i);
        end
      end
      // buffer -> external
      run(1, dst, bw, len);
      for (int i = 0; i < len; i++) begin
        checks++;
        if (u_mem.mem[dst + i] !== u_mem.mem[src + i]) begin
          failures++;
          if (failures < 10) $display("FAIL store t=%0d i=%0d", t, i);
        end
      end
    end
    checks++;
    if (u_mem.crossings != 0 || u_mem.wlast_errors != 0) failures++;
    checks++;
    if (u_mem.rd_bursts <= 12 || u_mem.wr_bursts <= 12) failures++;   // multi-burst transfers happened
    $display("bursts rd=%0d wr=%0d", u_mem.rd_bursts, u_mem.wr_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
