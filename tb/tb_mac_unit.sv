// tb_mac_unit: drives a stream of activations and partial sums into one MAC
// unit in each precision and checks psum_out = psum_in + lane sum of w * x
// exactly three cycles after the activation (one after psum_in), plus the
// zero-skip pulse and a weight reload.
// The three-cycle MAC timing and the zero skip are the document's; the stimulus
// and the lane-sum reference are this testbench's.
module tb_mac_unit;
  import dla_pkg::*;
  int checks = 0, failures = 0, skips_seen = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [1:0] prec;
  logic w_we, x_valid, skip_o;
  logic [7:0] w_in, x_in;
  logic signed [15:0] psum_in, psum_out;

  mac_unit dut (.*);

  function automatic int lsum(logic [7:0] x, logic [7:0] w, logic [1:0] s);
    int wd, r, xa, wb;
    wd = (s == 2'd0) ? 2 : (s == 2'd3) ? 4 : 8;
    r = 0;
    for (int k = 0; k < 8 / wd; k++) begin
      xa = int'(x >> (wd * k)) & ((1 << wd) - 1);
      wb = int'(w >> (wd * k)) & ((1 << wd) - 1);
      if (xa >= (1 << (wd - 1))) xa -= (1 << wd);
      if (wb >= (1 << (wd - 1))) wb -= (1 << wd);
      r += xa * wb;
    end
    return r;
  endfunction

  // Expected results, indexed by the cycle they must appear in.
  int   exp_q[$];
  logic expv_q[$];
  logic exps_q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] w;
    int cyc;
    rst_n = 0; prec = PREC_8B; w_we = 0; w_in = 0; x_valid = 0; x_in = 0; psum_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      for (int blk = 0; blk < 4; blk++) begin
        // load a weight
        @(negedge clk);
        w = 8'($urandom);
        w_we = 1; w_in = w; prec = 2'(s);
        @(negedge clk);
        w_we = 0;
        // stream 200 activations; psum_in is presented 2 cycles after x
        exp_q.delete(); expv_q.delete(); exps_q.delete();
        begin
          logic [7:0] xs[200];
          logic       vs[200];
          int         ps[202];
          for (int i = 0; i < 200; i++) begin
            vs[i] = ($urandom % 5) != 0;
            xs[i] = ($urandom % 4 == 0) ? 8'd0 : 8'($urandom);
          end
          for (int i = 0; i < 202; i++) ps[i] = int'($urandom % 20000) - 10000;
          for (cyc = 0; cyc < 205; cyc++) begin
            x_valid = (cyc < 200) ? vs[cyc] : 1'b0;
            x_in    = (cyc < 200) ? xs[cyc] : 8'd0;
            psum_in = (cyc >= 2 && cyc < 202) ? 16'(ps[cyc]) : 16'sd0;
            @(posedge clk);
            #1;
            // after this edge: skip of x[cyc] visible, psum_out of x[cyc-2]
            if (cyc < 200) begin
              checks++;
              if (skip_o !== (vs[cyc] && xs[cyc] == 0)) failures++;
              if (skip_o) skips_seen++;
            end
            if (cyc >= 2 && cyc < 202) begin
              int e;
              e = ps[cyc] + ((vs[cyc-2] && xs[cyc-2] != 0) ? lsum(xs[cyc-2], w, 2'(s)) : 0);
              checks++;
              if (psum_out !== 16'(e)) begin
                failures++;
                if (failures < 10) $display("FAIL prec=%0d cyc=%0d got=%0d exp=%0d", s, cyc, psum_out, e);
              end
            end
            @(negedge clk);
          end
        end
      end
    end
    checks++;
    if (skips_seen == 0) failures++;
    $display("zero skips seen: %0d", skips_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
