// tb_global_buffer: writes distinct data through both ports, swaps the
// ping-pong banks and reads back, checking bank separation, the swap, the
// 2-cycle read latency and simultaneous traffic on both ports.
// Runs at a reduced depth (1024 words per bank) for speed; the 2-cycle read
// latency checked is the document's figure.
module tb_global_buffer;
  localparam int D = 1024, AW = 10;
  int checks = 0, failures = 0, swaps = 0;
  logic sel = 1'b0;              // the bank port A should be on
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, swap, bank_sel;
  logic a_en, a_we, a_rvalid, b_en, b_we, b_rvalid;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0] a_wdata, a_rdata, b_wdata, b_rdata;

  global_buffer #(.DEPTH(D)) dut (.*);

  logic [31:0] model [2][D];   // model[bank][addr]

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Read check pipelines: expected data two cycles after the request.
  logic [31:0] ea [3]; logic va [3];
  logic [31:0] eb [3]; logic vb [3];

  initial begin
    rst_n = 0; swap = 0; a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < 3; i++) begin va[i] = 0; vb[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 6000; cyc++) begin
      checks++;
      if (bank_sel !== sel) failures++;
      // random traffic on both ports
      a_en = $urandom % 3 != 0; a_we = (cyc < 1500) ? 1'b1 : 1'($urandom % 2);
      b_en = $urandom % 3 != 0; b_we = (cyc < 1500) ? 1'b1 : 1'($urandom % 2);
      a_addr = AW'($urandom); b_addr = AW'($urandom);
      // first D cycles: both ports write every address, so every word of both
      // banks is defined before anything is read
      if (cyc < D) begin
        a_en = 1'b1; b_en = 1'b1; a_addr = AW'(cyc); b_addr = AW'(cyc);
      end
      a_wdata = $urandom; b_wdata = $urandom;
      swap = (cyc % 500 == 499);
      // model: A on bank sel, B on the other
      va[0] = a_en && !a_we; ea[0] = model[sel][a_addr];
      vb[0] = b_en && !b_we; eb[0] = model[!sel][b_addr];
      if (a_en && a_we) model[sel][a_addr] = a_wdata;
      if (b_en && b_we) model[!sel][b_addr] = b_wdata;
      if (swap) begin swaps++; end
      @(posedge clk);
      if (swap) sel = !sel;
      #1;
      // the read issued two cycles ago is visible now
      checks++;
      if (a_rvalid !== va[1]) failures++;
      if (va[1]) begin
        checks++;
        if (a_rdata !== ea[1]) begin failures++; if (failures < 10) $display("FAIL A cyc=%0d", cyc); end
      end
      checks++;
      if (b_rvalid !== vb[1]) failures++;
      if (vb[1]) begin
        checks++;
        if (b_rdata !== eb[1]) begin failures++; if (failures < 10) $display("FAIL B cyc=%0d", cyc); end
      end
      va[1] = va[0]; ea[1] = ea[0]; vb[1] = vb[0]; eb[1] = eb[0];
      @(negedge clk);
    end
    checks++;
    if (swaps == 0 || bank_sel !== 1'(swaps % 2)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
