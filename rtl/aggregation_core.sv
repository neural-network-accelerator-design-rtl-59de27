// aggregation_core: post-processing of the systolic array results
// (accumulation, activation, truncation to 8 bits, pooling).
//
// A result vector of LANES signed 16-bit partial sums passes, lane by lane:
//  1. accumulation: acc_n consecutive vectors are summed (32-bit), so a dot
//     product longer than one pass of the array (e.g. a 3x3 kernel over
//     several channels) is completed here;
//  2. activation: linear (bypass) or ReLU;
//  3. truncation: arithmetic right shift by `shift`, then saturation to a
//     signed 8-bit value, so results are stored in the same 8-bit format as
//     the inputs of the next layer;
//  4. pooling over pool_n consecutive results: maximum, minimum or average
//     (sum divided by pool_n, rounded toward zero), or none.
// ReLU, max/min/average pooling and truncation to 8 bits before write-back
// are from the document; accumulation across vectors, the shift-and-saturate
// rule and pooling over consecutive results (the controller orders the
// pixels of each window one after another) are this design's choices.
//
// Timing: one input vector per cycle; out_valid/out pulses one cycle after
// the input vector that completes a pooling window. pool_n = 0 and acc_n = 0
// are treated as 1. Changing the configuration mid-stream is not supported:
// pulse clear (or reset) between layers.
module aggregation_core
  import dla_pkg::*;
#(
  parameter int unsigned LANES = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,     // restart the window counters
  input  logic [3:0]                    acc_n,
  input  logic                          relu,
  input  logic [3:0]                    shift,
  input  logic [1:0]                    pool_op,   // dla_pkg::pool_op_e
  input  logic [3:0]                    pool_n,
  input  logic                          in_valid,
  input  logic [LANES-1:0][15:0]        in_data,
  output logic                          out_valid,
  output logic [LANES-1:0][7:0]         out_data
);
  logic [3:0] acc_cnt_q, pool_cnt_q;
  logic signed [31:0] acc_q  [LANES];
  logic signed [15:0] pool_q [LANES];

  logic [3:0] acc_lim, pool_lim;
  assign acc_lim  = (acc_n == 0) ? 4'd1 : acc_n;
  assign pool_lim = (pool_op == POOL_NONE || pool_n == 0) ? 4'd1 : pool_n;

  logic acc_last, pool_first, pool_last;
  assign acc_last   = (acc_cnt_q == acc_lim - 4'd1);
  assign pool_first = (pool_cnt_q == 0);
  assign pool_last  = (pool_cnt_q == pool_lim - 4'd1);

  // Per-lane combinational path for the vector that completes an accumulation.
  logic signed [31:0] sum   [LANES];
  logic signed [7:0]  q8    [LANES];
  logic signed [15:0] pnext [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [31:0] v;
      sum[l] = (acc_cnt_q == 0 ? 32'sd0 : acc_q[l]) + 32'(signed'(in_data[l]));
      v = sum[l];
      if (relu && v < 0) v = 0;
      v = v >>> shift;
      if (v > 127)       q8[l] = 8'sd127;
      else if (v < -128) q8[l] = -8'sd128;
      else               q8[l] = 8'(v);
      if (pool_first) pnext[l] = 16'(q8[l]);
      else begin
        unique case (pool_op)
          POOL_MAX: pnext[l] = (16'(q8[l]) > pool_q[l]) ? 16'(q8[l]) : pool_q[l];
          POOL_MIN: pnext[l] = (16'(q8[l]) < pool_q[l]) ? 16'(q8[l]) : pool_q[l];
          default:  pnext[l] = pool_q[l] + 16'(q8[l]);   // average: running sum
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_cnt_q  <= '0;
      pool_cnt_q <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      for (int l = 0; l < LANES; l++) begin
        acc_q[l]  <= '0;
        pool_q[l] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        acc_cnt_q  <= '0;
        pool_cnt_q <= '0;
      end else if (in_valid) begin
        for (int l = 0; l < LANES; l++) acc_q[l] <= sum[l];
        acc_cnt_q <= acc_last ? 4'd0 : acc_cnt_q + 4'd1;
        if (acc_last) begin
          for (int l = 0; l < LANES; l++) pool_q[l] <= pnext[l];
          pool_cnt_q <= pool_last ? 4'd0 : pool_cnt_q + 4'd1;
          if (pool_last) begin
            out_valid <= 1'b1;
            for (int l = 0; l < LANES; l++) begin
              if (pool_op == POOL_AVG && pool_lim > 1)
                out_data[l] <= 8'(pnext[l] / signed'({12'd0, pool_lim}));
              else
                out_data[l] <= 8'(pnext[l]);
            end
          end
        end
      end
    end
  end
endmodule : aggregation_core
