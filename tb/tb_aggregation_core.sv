// tb_aggregation_core: feeds random result vectors through the aggregation
// core under many settings (accumulation depth, ReLU, shift, max/min/average
// pooling and none) and compares each output vector with a model computed
// here; also checks that each output appears one cycle after the vector that
// completes its window, and that saturation happened at least once.
// ReLU, truncation to 8 bits and max/min/average pooling are the document's; the
// settings and the model's rounding follow this design's choices.
module tb_aggregation_core;
  import dla_pkg::*;
  localparam int L = 32;
  int checks = 0, failures = 0, outs = 0, sats = 0, relu_zero = 0;
  int pool_seen[4];
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, clear, relu, in_valid, out_valid;
  logic [3:0] acc_n, shift, pool_n;
  logic [1:0] pool_op;
  logic [L-1:0][15:0] in_data;
  logic [L-1:0][7:0]  out_data;

  aggregation_core #(.LANES(L)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; relu = 0; in_valid = 0; acc_n = 1; shift = 0; pool_n = 1; pool_op = POOL_NONE; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 40; cfg++) begin
      int an, pn, sh, po, rl, nres;
      int acc[L], pool[L], cnt_a, cnt_p;
      an = 1 + $urandom % 4; pn = 1 + $urandom % 9; sh = $urandom % 8; po = cfg % 4; rl = $urandom % 2;
      if (po == POOL_NONE) pn = 1 + $urandom % 3;   // pool_n ignored then
      @(negedge clk);
      acc_n = 4'(an); pool_n = 4'(pn); shift = 4'(sh); pool_op = 2'(po); relu = rl[0];
      clear = 1;
      @(negedge clk);
      clear = 0;
      cnt_a = 0; cnt_p = 0;
      for (int v = 0; v < 60; v++) begin
        logic expect_out;
        logic [7:0] exp_out [L];
        in_valid = ($urandom % 4) != 0;
        for (int l = 0; l < L; l++) in_data[l] = 16'($urandom % 8000) - 16'd4000;
        expect_out = 0;
        if (in_valid) begin
          for (int l = 0; l < L; l++) begin
            int s;
            acc[l] = (cnt_a == 0 ? 0 : acc[l]) + int'(signed'(in_data[l]));
          end
          cnt_a++;
          if (cnt_a == an) begin
            cnt_a = 0;
            for (int l = 0; l < L; l++) begin
              int q;
              q = acc[l];
              if (rl && q < 0) begin q = 0; relu_zero++; end
              q = q >>> sh;
              if (q > 127) begin q = 127; sats++; end
              if (q < -128) begin q = -128; sats++; end
              if (cnt_p == 0 || po == POOL_NONE) pool[l] = q;
              else if (po == POOL_MAX) pool[l] = (q > pool[l]) ? q : pool[l];
              else if (po == POOL_MIN) pool[l] = (q < pool[l]) ? q : pool[l];
              else pool[l] = pool[l] + q;
            end
            cnt_p++;
            if (po == POOL_NONE || cnt_p == pn) begin
              expect_out = 1;
              for (int l = 0; l < L; l++)
                exp_out[l] = (po == POOL_AVG && pn > 1) ? 8'(pool[l] / pn) : 8'(pool[l]);
              cnt_p = 0;
            end
          end
        end
        @(posedge clk);
        #1;
        checks++;
        if (out_valid !== expect_out) begin
          failures++;
          $display("FAIL out_valid cfg=%0d v=%0d", cfg, v);
        end
        if (expect_out) begin
          outs++;
          pool_seen[po]++;
          for (int l = 0; l < L; l++) begin
            checks++;
            if (out_data[l] !== exp_out[l]) begin
              failures++;
              if (failures < 10) $display("FAIL cfg=%0d po=%0d l=%0d got=%0d exp=%0d", cfg, po, l,
                                          signed'(out_data[l]), signed'(exp_out[l]));
            end
          end
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
    checks++;
    if (sats == 0 || relu_zero == 0 || pool_seen[0] == 0 || pool_seen[1] == 0 || pool_seen[2] == 0 || pool_seen[3] == 0) failures++;
    $display("outputs=%0d saturations=%0d relu_zero=%0d pools=%0d/%0d/%0d/%0d", outs, sats, relu_zero,
             pool_seen[0], pool_seen[1], pool_seen[2], pool_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
