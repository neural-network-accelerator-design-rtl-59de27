// tb_systolic_array: checks the four-array core in both convolution modes
// and all precisions. In normal mode one activation vector is broadcast to
// all arrays; in depthwise mode each array gets its own vector. Results are
// compared with dot products computed here, at latency ROWS + 2, and the
// skipped zero activations are counted.
// Four arrays of 64 MACs and the two convolution kinds are the document's; the
// routing checked is this design's.
module tb_systolic_array;
  import dla_pkg::*;
  localparam int NA = 4, ROWS = 8, COLS = 8, LAT = ROWS + 2, NV = 120;
  int checks = 0, failures = 0, skips = 0, mode_runs[2];
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [1:0] prec;
  logic conv_mode, w_we, x_valid, y_valid;
  logic [$clog2(NA*ROWS*COLS/4)-1:0] w_addr;
  logic [31:0] w_data;
  logic [NA-1:0][ROWS-1:0][7:0] x;
  logic [NA*COLS-1:0][15:0] psum_top, y;
  logic [$clog2(NA*ROWS*COLS+1)-1:0] skip_count;

  systolic_array #(.N_ARR(NA), .ROWS(ROWS), .COLS(COLS)) dut (.*);

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

  logic [7:0] wt [NA][ROWS][COLS];
  logic [7:0] xs [NV][NA][ROWS];
  logic       vs [NV];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_skips;
    rst_n = 0; prec = PREC_8B; conv_mode = CONV_NORMAL; w_we = 0; w_addr = 0; w_data = 0;
    x_valid = 0; x = '0; psum_top = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++) for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      prec = 2'(s); conv_mode = m[0];
      for (int i = 0; i < NA * ROWS * COLS / 4; i++) begin
        for (int k = 0; k < 4; k++) begin
          int u;
          u = 4 * i + k;
          wt[u / 64][(u % 64) / COLS][u % COLS] = 8'($urandom);
          w_data[8*k +: 8] = wt[u / 64][(u % 64) / COLS][u % COLS];
        end
        w_we = 1; w_addr = 6'(i);
        @(negedge clk);
      end
      w_we = 0;
      for (int v = 0; v < NV; v++) begin
        vs[v] = ($urandom % 5) != 0;
        for (int a = 0; a < NA; a++)
          for (int r = 0; r < ROWS; r++) xs[v][a][r] = ($urandom % 3 == 0) ? 8'd0 : 8'($urandom);
      end
      for (int cyc = 0; cyc < NV + LAT + 2; cyc++) begin
        x_valid = (cyc < NV) ? vs[cyc] : 1'b0;
        for (int a = 0; a < NA; a++)
          for (int r = 0; r < ROWS; r++) x[a][r] = (cyc < NV) ? xs[cyc][a][r] : 8'd0;
        @(posedge clk);
        #1;
        skips += int'(skip_count);
        if (cyc >= LAT - 1) begin
          int v;
          v = cyc - (LAT - 1);
          checks++;
          if (y_valid !== ((v < NV) ? vs[v] : 1'b0)) failures++;
          if (v < NV && vs[v]) begin
            mode_runs[m]++;
            for (int a = 0; a < NA; a++)
              for (int c = 0; c < COLS; c++) begin
                int e, src;
                src = (m == 1) ? a : 0;
                e = 0;
                for (int r = 0; r < ROWS; r++) e += lsum(xs[v][src][r], wt[a][r][c], 2'(s));
                checks++;
                if (y[a*COLS + c] !== 16'(e)) begin
                  failures++;
                  if (failures < 10) $display("FAIL m=%0d prec=%0d v=%0d a=%0d c=%0d got=%0d exp=%0d",
                                              m, s, v, a, c, signed'(y[a*COLS+c]), e);
                end
              end
          end
        end
        @(negedge clk);
      end
      exp_skips = 0;
      for (int v = 0; v < NV; v++)
        for (int a = 0; a < NA; a++)
          for (int r = 0; r < ROWS; r++)
            if (vs[v] && xs[v][(m == 1) ? a : 0][r] == 0) exp_skips += COLS;
      checks++;
      if (skips != exp_skips) begin
        failures++;
        $display("FAIL skips %0d exp %0d", skips, exp_skips);
      end
      skips = 0;
    end
    checks++;
    if (mode_runs[0] == 0 || mode_runs[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
