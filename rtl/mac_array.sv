// mac_array: a ROWS x COLS grid of weight-stationary MAC units (64 units,
// 8 x 8, by default).
//
// Each unit keeps one weight. Activation x[r] is broadcast along row r to
// every column; partial sums flow down each column, so column c computes the
// dot product psum_top[c] + sum_r w[r][c] * x[r] (a matrix-vector product
// with the stationary weight matrix). Because a unit adds its partial sum one
// stage after its neighbour above, row r must see its activation r cycles
// after row 0: the array skews the input vector with a delay line, and also
// delays psum_top by two cycles so it meets row 0's product. The column
// results therefore leave the bottom row together, as one vector.
//
// The 64-unit array and its four-fold replication come from the document;
// the 8 x 8 shape, the column reduction and the skew are this design's
// choices (the document's figure only sketches a grid of units).
//
// Interface: one input vector (x_valid, x, psum_top) per cycle at most; the
// result vector appears with y_valid exactly LATENCY = ROWS + 2 cycles later.
// Weights are written four units per cycle: w_addr is a word index and byte
// k of w_data goes to unit 4 * w_addr + k (unit index = row * COLS + col). skip_count is the number of zero activations skipped in
// the current cycle.
module mac_array
  import dla_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [1:0]                    prec,
  input  logic                          w_we,
  input  logic [$clog2(ROWS*COLS/4)-1:0] w_addr,
  input  logic [31:0]                   w_data,
  input  logic                          x_valid,
  input  logic [ROWS-1:0][7:0]          x,
  input  logic [COLS-1:0][15:0]         psum_top,
  output logic                          y_valid,
  output logic [COLS-1:0][15:0]         y,
  output logic [$clog2(ROWS*COLS+1)-1:0] skip_count
);
  localparam int unsigned LATENCY = ROWS + 2;

  // Skewed activation inputs: row r sees x[r] delayed by r cycles.
  logic [7:0] xd [ROWS][ROWS];   // xd[r][k]: row r activation after k delays
  logic       vd [ROWS];         // valid delay line (shared by all rows)
  logic [ROWS-1:0]              row_valid;
  logic [ROWS-1:0][7:0]         row_x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        vd[r] <= 1'b0;
        for (int k = 0; k < ROWS; k++) xd[r][k] <= '0;
      end
    end else begin
      vd[0] <= x_valid;
      for (int k = 1; k < ROWS; k++) vd[k] <= vd[k-1];
      for (int r = 0; r < ROWS; r++) begin
        xd[r][0] <= x[r];
        for (int k = 1; k < ROWS; k++) xd[r][k] <= xd[r][k-1];
      end
    end
  end

  always_comb begin
    row_valid[0] = x_valid;
    row_x[0]     = x[0];
    for (int r = 1; r < ROWS; r++) begin
      row_valid[r] = vd[r-1];
      row_x[r]     = xd[r][r-1];
    end
  end

  // psum_top delayed two cycles, to meet row 0's product stage.
  logic [COLS-1:0][15:0] pt_q1, pt_q2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pt_q1 <= '0;
      pt_q2 <= '0;
    end else begin
      pt_q1 <= psum_top;
      pt_q2 <= pt_q1;
    end
  end

  logic [15:0] ps   [ROWS][COLS];
  logic        skip [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [15:0] pin;
      if (r == 0) begin : g_top
        assign pin = pt_q2[c];
      end else begin : g_chain
        assign pin = ps[r-1][c];
      end
      mac_unit u_mac (
        .clk     (clk),
        .rst_n   (rst_n),
        .prec    (prec),
        .w_we    (w_we && (int'(w_addr) == (r * COLS + c) / 4)),
        .w_in    (w_data[8*((r * COLS + c) % 4) +: 8]),
        .x_valid (row_valid[r]),
        .x_in    (row_x[r]),
        .psum_in (pin),
        .psum_out(ps[r][c]),
        .skip_o  (skip[r][c])
      );
    end
  end

  always_comb begin
    for (int c = 0; c < COLS; c++) y[c] = ps[ROWS-1][c];
    skip_count = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        skip_count += ($clog2(ROWS*COLS+1))'(skip[r][c]);
  end

  // Output valid: the input valid delayed by LATENCY cycles.
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], x_valid};
  end
  assign y_valid = vpipe[LATENCY-1];
endmodule : mac_array
