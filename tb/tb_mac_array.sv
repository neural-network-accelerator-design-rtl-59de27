// tb_mac_array: loads random weights into an 8 x 8 MAC array and streams
// random activation vectors (one per cycle, some slots empty, many zero
// activations) in every precision. Each column result must equal
// psum_top + sum over rows of the lane products, computed here, and must
// appear exactly ROWS + 2 cycles after its vector, flagged by y_valid.
// The 64 units per array are the document's; the 8 x 8 shape and the ROWS + 2
// latency checked are this design's.
module tb_mac_array;
  import dla_pkg::*;
  localparam int ROWS = 8, COLS = 8, LAT = ROWS + 2, NV = 300;
  int checks = 0, failures = 0, skips = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [1:0] prec;
  logic w_we;
  logic [$clog2(ROWS*COLS/4)-1:0] w_addr;
  logic [31:0] w_data;
  logic x_valid, y_valid;
  logic [ROWS-1:0][7:0] x;
  logic [COLS-1:0][15:0] psum_top, y;
  logic [$clog2(ROWS*COLS+1)-1:0] skip_count;

  mac_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

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

  logic [7:0]  wt [ROWS][COLS];
  logic [7:0]  xs [NV][ROWS];
  logic        vs [NV];
  logic [15:0] pts[NV][COLS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_skips;
    rst_n = 0; prec = PREC_8B; w_we = 0; w_addr = 0; w_data = 0; x_valid = 0; x = '0; psum_top = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      prec = 2'(s);
      for (int i = 0; i < ROWS * COLS / 4; i++) begin
        for (int k = 0; k < 4; k++) begin
          wt[(4*i+k)/COLS][(4*i+k)%COLS] = 8'($urandom);
          w_data[8*k +: 8] = wt[(4*i+k)/COLS][(4*i+k)%COLS];
        end
        w_we = 1; w_addr = 4'(i);
        @(negedge clk);
      end
      w_we = 0;
      for (int v = 0; v < NV; v++) begin
        vs[v] = ($urandom % 6) != 0;
        for (int r = 0; r < ROWS; r++) xs[v][r] = ($urandom % 3 == 0) ? 8'd0 : 8'($urandom);
        for (int c = 0; c < COLS; c++) pts[v][c] = 16'($urandom % 4000) - 16'd2000;
      end
      for (int cyc = 0; cyc < NV + LAT + 2; cyc++) begin
        x_valid = (cyc < NV) ? vs[cyc] : 1'b0;
        for (int r = 0; r < ROWS; r++) x[r] = (cyc < NV) ? xs[cyc][r] : 8'd0;
        for (int c = 0; c < COLS; c++) psum_top[c] = (cyc < NV) ? pts[cyc][c] : 16'd0;
        @(posedge clk);
        #1;
        skips += int'(skip_count);
        // vector presented in cycle v is visible after edge v + LAT - 1
        if (cyc >= LAT - 1) begin
          int v;
          v = cyc - (LAT - 1);
          checks++;
          if (y_valid !== ((v < NV) ? vs[v] : 1'b0)) begin
            failures++;
            $display("FAIL y_valid cyc=%0d", cyc);
          end
          if (v < NV && vs[v]) begin
            for (int c = 0; c < COLS; c++) begin
              int e;
              e = int'(signed'(pts[v][c]));
              for (int r = 0; r < ROWS; r++) e += lsum(xs[v][r], wt[r][c], 2'(s));
              checks++;
              if (y[c] !== 16'(e)) begin
                failures++;
                if (failures < 10) $display("FAIL prec=%0d v=%0d c=%0d got=%0d exp=%0d", s, v, c, signed'(y[c]), e);
              end
            end
          end
        end
        @(negedge clk);
      end
      exp_skips = 0;
      for (int v = 0; v < NV; v++)
        for (int r = 0; r < ROWS; r++)
          if (vs[v] && xs[v][r] == 0) exp_skips += COLS;
      checks++;
      if (skips != exp_skips) begin
        failures++;
        $display("FAIL skips %0d exp %0d", skips, exp_skips);
      end
      skips = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
