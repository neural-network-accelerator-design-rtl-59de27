// mac_unit: one multiply-accumulate unit of the MAC arrays.
//
// The unit holds one weight (weight-stationary dataflow), multiplies it with
// the incoming activation in the precision-flexible Booth multiplier and adds
// the product to the 16-bit partial sum coming from the neighbouring unit.
// Three register stages match the three steps the document counts per MAC
// operation: (1) an input flip-flop that also flags a zero activation,
// (2) the product register, (3) the sum register that is written out.
// A zero activation (or an empty slot) is skipped: the product register is
// cleared instead of loading a multiplier result, so the multiplier output is
// never used and the operand register keeps its old value (no toggling).
// In 4-bit and 2-bit modes the lane products of one unit are added together
// into the one 16-bit partial sum ("sum together"), which is this design's
// choice; the document gives 16-bit multiplier output and partial sums.
//
// Timing: x_in/x_valid are taken at clock edge 1, the product at edge 2 and
// psum_in is added at edge 3, so psum_out = psum_in + w*x three edges after x
// was presented and one edge after psum_in. skip_o pulses (aligned with the
// product stage) when a valid zero activation was skipped.
module mac_unit
  import dla_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         prec,      // dla_pkg::prec_e
  input  logic               w_we,      // load a new weight
  input  logic [7:0]         w_in,
  input  logic               x_valid,
  input  logic [7:0]         x_in,      // packed activation(s)
  input  logic signed [15:0] psum_in,
  output logic signed [15:0] psum_out,
  output logic               skip_o
);
  logic [7:0]  w_q;
  logic [7:0]  x_q;
  logic        run_q;                   // valid and non-zero activation
  logic        skip_q;
  logic [15:0] mul;
  logic [15:0] prod_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q      <= '0;
      x_q      <= '0;
      run_q    <= 1'b0;
      skip_q   <= 1'b0;
      prod_q   <= '0;
      psum_out <= '0;
    end else begin
      if (w_we) w_q <= w_in;
      // stage 1: input flip-flop with zero detection
      run_q  <= x_valid && (x_in != '0);
      skip_q <= x_valid && (x_in == '0);
      if (x_valid && x_in != '0) x_q <= x_in;
      // stage 2: multiply (skipped for zero activations)
      prod_q <= run_q ? mul : '0;
      // stage 3: add and write
      psum_out <= psum_in + lane_sum(prod_q, prec);
    end
  end

  flex_booth_multiplier u_mul (.a(x_q), .b(w_q), .sel(prec), .p(mul));

  assign skip_o = skip_q;
endmodule : mac_unit
