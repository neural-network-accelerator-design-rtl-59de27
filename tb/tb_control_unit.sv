// tb_control_unit: runs the controller alone against small models written
// here: a DMA model that accepts a command and reports done some cycles
// later, a buffer model (port B, 2-cycle read latency), a systolic array
// model that answers each vector after ROWS + 2 cycles, and an aggregation
// model that delivers one result every K vectors. For layers in normal and
// depthwise mode it checks the register file and STATUS, the two DMA
// commands (load into the buffer, store of exactly the results written),
// the two bank swaps, that the 64 weight words reach the array in order
// (with acc_n > 1: the weight set of each accumulation step before each vector),
// that each issued activation vector matches the buffer contents for the
// mode, that each aggregated result is written at obase + 8r, that vectors
// are issued one at a time, and the interrupt with its clear.
// The models and the layer settings are this testbench's choices.
module tb_control_unit;
  import dla_pkg::*;
  localparam int NA = 4, ROWS = 8, COLS = 8, AW = 15, LAT = ROWS + 2;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic cfg_valid, cfg_we, irq, busy;
  logic [2:0] cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic dma_cmd_valid, dma_cmd_ready, dma_done;
  dma_cmd_t dma_cmd;
  logic buf_swap, b_en, b_we, b_rvalid;
  logic [AW-1:0] b_addr;
  logic [31:0] b_wdata, b_rdata;
  logic [1:0] prec, pool_op;
  logic conv_mode, w_we, x_valid, y_valid, agg_clear, relu, agg_valid;
  logic [5:0] w_addr;
  logic [31:0] w_data;
  logic [NA-1:0][ROWS-1:0][7:0] x;
  logic [3:0] acc_n, shift, pool_n;
  logic [NA*COLS-1:0][7:0] agg_data;

  control_unit dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- models ----
  logic [31:0] bufm [1 << AW];
  logic [31:0] rd_p1, rd_p2;
  logic v_p1, v_p2;
  always @(posedge clk) begin
    v_p1 <= b_en && !b_we;
    rd_p1 <= bufm[b_addr];
    v_p2 <= v_p1;
    rd_p2 <= rd_p1;
    if (b_en && b_we) bufm[b_addr] <= b_wdata;
  end
  assign b_rvalid = v_p2;
  assign b_rdata  = rd_p2;

  dma_cmd_t cmds[$];
  int dma_cnt = -1;
  assign dma_cmd_ready = 1'b1;
  always @(posedge clk) begin
    dma_done <= 1'b0;
    if (dma_cmd_valid) begin cmds.push_back(dma_cmd); dma_cnt <= 25; end
    else if (dma_cnt > 0) dma_cnt <= dma_cnt - 1;
    else if (dma_cnt == 0) begin dma_done <= 1'b1; dma_cnt <= -1; end
  end

  logic [LAT-1:0] ypipe;
  always @(posedge clk) ypipe <= rst_n ? {ypipe[LAT-2:0], x_valid} : '0;
  assign y_valid = ypipe[LAT-1];

  int K = 1, yseen = 0, nres_model = 0;
  always @(posedge clk) begin
    agg_valid <= 1'b0;
    if (y_valid) begin
      yseen++;
      if (yseen % K == 0) begin
        agg_valid <= 1'b1;
        for (int l = 0; l < NA * COLS; l++) agg_data[l] <= 8'(nres_model * 37 + l * 5 + 1);
        nres_model++;
      end
    end
  end

  int swaps = 0, clears = 0, wcount = 0, xcount = 0, last_x = -1000, cyc = 0;
  int wbase, abase, obase, vw, acc;
  logic dw_mode;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n) begin
    if (buf_swap) swaps++;
    if (agg_clear) clears++;
    if (w_we) begin
      checks++;
      if (w_addr !== 6'(wcount % 64) ||
          w_data !== bufm[wbase + 64 * (acc > 1 ? xcount % acc : 0) + wcount % 64]) begin
        failures++; $display("FAIL weight word %0d addr %0d", wcount, w_addr);
      end
      wcount++;
    end
    if (x_valid) begin
      checks++;
      if (cyc - last_x < LAT) begin failures++; $display("FAIL vectors overlap"); end
      last_x = cyc;
      for (int a = 0; a < NA; a++)
        for (int r = 0; r < ROWS; r++) begin
          int wa;
          logic [7:0] e;
          wa = abase + xcount * vw + (dw_mode ? a * (ROWS / 4) : 0) + r / 4;
          e = bufm[wa][8 * (r % 4) +: 8];
          checks++;
          if (x[a][r] !== e && (dw_mode || a == 0)) begin
            failures++;
            if (failures < 10) $display("FAIL x vec %0d a %0d r %0d", xcount, a, r);
          end
        end
      xcount++;
    end
  end

  task automatic cfg_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_valid = 0; cfg_we = 0;
  endtask

  task automatic check_reg(input logic [2:0] a, input logic [31:0] e);
    @(negedge clk);
    cfg_addr = a;
    #1;
    checks++;
    if (cfg_rdata !== e) begin failures++; $display("FAIL reg %0d = %h exp %h", a, cfg_rdata, e); end
  endtask

  task automatic run(input int dw, input int nvec, input int k, input int wb, input int ab, input int ob,
                    input int acc_steps);
    layer_cfg_t lc;
    int t0;
    dw_mode = dw[0]; vw = dw ? 8 : 2; wbase = wb; abase = ab; obase = ob;
    K = k; yseen = 0; nres_model = 0; wcount = 0; xcount = 0; swaps = 0; clears = 0;
    cmds.delete();
    for (int i = 0; i < (1 << AW); i++) bufm[i] = $urandom;
    lc = '0; lc.conv_mode = dw[0]; lc.prec = PREC_4B; lc.relu = 1; lc.shift = 4'd5;
    lc.pool_op = POOL_MAX; lc.pool_n = 4'd2; lc.acc_n = 4'(acc_steps);
    acc = acc_steps;
    cfg_write(REG_EXT_SRC, 32'h0001_2340);
    cfg_write(REG_EXT_DST, 32'h0008_0000);
    cfg_write(REG_LOAD_LEN, 32'd777);
    cfg_write(REG_LAYER, 32'(lc));
    cfg_write(REG_WACT_BASE, {16'(ab), 16'(wb)});
    cfg_write(REG_OUT_BASE, {16'(nvec), 16'(ob)});
    check_reg(REG_LOAD_LEN, 32'd777);
    check_reg(REG_LAYER, 32'(lc));
    checks++;
    if (prec !== PREC_4B || conv_mode !== dw[0] || relu !== 1'b1 || shift !== 4'd5 ||
        pool_op !== POOL_MAX || pool_n !== 4'd2 || acc_n !== 4'(acc_steps)) failures++;
    cfg_write(REG_CTRL, 32'd1);
    check_reg(REG_STATUS, 32'd1);     // busy, not done
    t0 = cyc;
    while (!irq) @(negedge clk);
    check_reg(REG_STATUS, 32'd2);     // done
    cfg_write(REG_CTRL, 32'd2);
    checks++;
    if (irq !== 1'b0) failures++;
    checks++;
    if (wcount != (acc_steps > 1 ? 64 * nvec : 64)) begin failures++; $display("FAIL %0d weight words", wcount); end
    checks++;
    if (xcount != nvec) begin failures++; $display("FAIL %0d vectors", xcount); end
    checks++;
    if (swaps != 2 || clears != 1) begin failures++; $display("FAIL swaps %0d clears %0d", swaps, clears); end
    checks++;
    if (cmds.size() != 2) failures++;
    else begin
      checks += 2;
      if (cmds[0].to_ext !== 1'b0 || cmds[0].ext_addr !== 32'h0001_2340 ||
          cmds[0].buf_addr !== 16'd0 || cmds[0].len !== 16'd777) begin
        failures++; $display("FAIL load command");
      end
      if (cmds[1].to_ext !== 1'b1 || cmds[1].ext_addr !== 32'h0008_0000 ||
          cmds[1].buf_addr !== 16'(ob) || cmds[1].len !== 16'(nres_model * 8)) begin
        failures++; $display("FAIL store command len %0d", cmds[1].len);
      end
    end
    for (int r = 0; r < nres_model; r++)
      for (int l = 0; l < NA * COLS; l++) begin
        checks++;
        if (bufm[ob + 8 * r + l / 4][8 * (l % 4) +: 8] !== 8'(r * 37 + l * 5 + 1)) begin
          failures++;
          if (failures < 10) $display("FAIL result %0d lane %0d", r, l);
        end
      end
    $display("layer dw=%0d: %0d vectors, %0d results, %0d cycles", dw, nvec, nres_model, cyc - t0);
  endtask

  initial begin
    rst_n = 0; cfg_valid = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    check_reg(REG_STATUS, 32'd0);
    run(0, 12, 1, 100, 300, 2000, 1);
    run(1, 9, 3, 5000, 6000, 9000, 3);
    run(0, 7, 2, 0, 64, 1024, 0);
    run(0, 8, 4, 0, 512, 3000, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
