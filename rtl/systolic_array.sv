// systolic_array: the CNN/RNN core, four MAC arrays of 64 units (256 MACs).
//
// All four arrays share the precision select and work in lock step. The
// convolution mode selects how activations reach them:
//  - CONV_NORMAL: the vector x[0] is broadcast to all four arrays, each of
//    which holds the weights of different output channels, giving
//    N_ARR * COLS output channels per input vector (broadcast network);
//  - CONV_DEPTHWISE: array a receives its own vector x[a], so four input
//    channels are filtered independently at the same time.
// Four arrays of 64 MACs and support for both convolution kinds on one array
// come from the document; the routing of the two modes is this design's.
//
// Interface: one input vector per cycle at most; result vector y (array a,
// column c at y[a*COLS + c]) appears with y_valid ROWS + 2 cycles later.
// Weights are written 32 bits (four units) per cycle: w_addr is the word
// index over all arrays, unit index = 4 * w_addr + byte, and the array is
// unit / (ROWS*COLS). skip_count counts the zero activations skipped in the
// current cycle.
// The arrays work in lock step, so the y_valid of arrays 1..3 equals array
// 0's and is left unused.
module systolic_array
  import dla_pkg::*;
#(
  parameter int unsigned N_ARR = 4,
  parameter int unsigned ROWS  = 8,
  parameter int unsigned COLS  = 8
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [1:0]                           prec,
  input  logic                                 conv_mode,   // dla_pkg::conv_mode_e
  input  logic                                 w_we,
  input  logic [$clog2(N_ARR*ROWS*COLS/4)-1:0] w_addr,
  input  logic [31:0]                          w_data,
  input  logic                                 x_valid,
  input  logic [N_ARR-1:0][ROWS-1:0][7:0]      x,
  input  logic [N_ARR*COLS-1:0][15:0]          psum_top,
  output logic                                 y_valid,
  output logic [N_ARR*COLS-1:0][15:0]          y,
  output logic [$clog2(N_ARR*ROWS*COLS+1)-1:0] skip_count
);
  localparam int unsigned WPA = ROWS * COLS / 4;   // weight words per array
  localparam int unsigned SW  = $clog2(ROWS * COLS + 1);

  logic [N_ARR-1:0] yv;
  logic [SW-1:0]    sc [N_ARR];

  for (genvar a = 0; a < N_ARR; a++) begin : g_arr
    logic [ROWS-1:0][7:0] xa;
    assign xa = (conv_mode == CONV_DEPTHWISE) ? x[a] : x[0];

    mac_array #(.ROWS(ROWS), .COLS(COLS)) u_arr (
      .clk, .rst_n, .prec,
      .w_we      (w_we && (int'(w_addr) / WPA == a)),
      .w_addr    (($clog2(WPA))'(int'(w_addr) % WPA)),
      .w_data    (w_data),
      .x_valid,
      .x         (xa),
      .psum_top  (psum_top[a*COLS +: COLS]),
      .y_valid   (yv[a]),
      .y         (y[a*COLS +: COLS]),
      .skip_count(sc[a])
    );
  end

  always_comb begin
    skip_count = '0;
    for (int a = 0; a < N_ARR; a++) skip_count += ($clog2(N_ARR*ROWS*COLS+1))'(sc[a]);
  end

  // The arrays run in lock step, so array 0's valid stands for all.
  assign y_valid = yv[0];
endmodule : systolic_array
