// dla_pkg: types and constants shared by the accelerator blocks.
//
// Precision modes follow the flexible multiplier: one 8x8, two 4x4 or four
// 2x2 signed products per 8-bit operand pair. The select encoding (0 = 2-bit,
// 1 or 2 = 8-bit, 3 = 4-bit) is the one the flexible Modified Booth multiplier
// uses for its output multiplexer. The remaining enumerations (convolution
// mode, activation, pooling operation) and the configuration register map are
// this design's own choices.
package dla_pkg;

  // Multiplier / MAC precision select.
  typedef enum logic [1:0] {
    PREC_2B  = 2'd0,   // four 2-bit x 2-bit products
    PREC_8B  = 2'd1,   // one 8-bit x 8-bit product
    PREC_8B2 = 2'd2,   // alias of PREC_8B
    PREC_4B  = 2'd3    // two 4-bit x 4-bit products
  } prec_e;

  // How activation vectors reach the four MAC arrays.
  typedef enum logic {
    CONV_NORMAL    = 1'b0, // one vector broadcast to all four arrays
    CONV_DEPTHWISE = 1'b1  // each array gets its own vector (its own channel)
  } conv_mode_e;

  typedef enum logic [1:0] {
    POOL_NONE = 2'd0,
    POOL_MAX  = 2'd1,
    POOL_MIN  = 2'd2,
    POOL_AVG  = 2'd3
  } pool_op_e;

  // Configuration register addresses (32-bit registers on the config bus).
  localparam int unsigned CFG_REGS     = 8;
  localparam logic [2:0] REG_CTRL      = 3'd0; // [0] start (self clearing), [1] irq clear
  localparam logic [2:0] REG_STATUS    = 3'd1; // [0] busy, [1] done (read only)
  localparam logic [2:0] REG_EXT_SRC   = 3'd2; // byte address of the input block in external memory
  localparam logic [2:0] REG_EXT_DST   = 3'd3; // byte address for the results in external memory
  localparam logic [2:0] REG_LOAD_LEN  = 3'd4; // 32-bit words to load into the global buffer
  localparam logic [2:0] REG_LAYER     = 3'd5; // layer mode fields, see layer_cfg_t
  localparam logic [2:0] REG_WACT_BASE = 3'd6; // [15:0] weight base, [31:16] activation base (word addresses)
  localparam logic [2:0] REG_OUT_BASE  = 3'd7; // [15:0] output base (word address), [31:16] vector count

  // REG_LAYER field layout, LSB first.
  typedef struct packed {
    logic [7:0]  reserved;   // [31:24]
    logic [3:0]  shift;      // [23:20] right shift before truncation to 8 bits
    logic [3:0]  pool_n;     // [19:16] pooling window, results per output (1..15)
    logic [3:0]  acc_n;      // [15:12] vectors summed per result (1..15)
    logic [1:0]  pool_op;    // [11:10]
    logic        relu;       // [9]
    logic        conv_mode;  // [8]
    logic [5:0]  reserved2;  // [7:2]
    logic [1:0]  prec;       // [1:0]
  } layer_cfg_t;

  // DMA command from the control unit.
  typedef struct packed {
    logic        to_ext;     // 1: global buffer -> external memory, 0: external -> buffer
    logic [31:0] ext_addr;   // byte address, word aligned
    logic [15:0] buf_addr;   // word address in the global buffer bank
    logic [15:0] len;        // number of 32-bit words
  } dma_cmd_t;

  // Sum of the lane products of one multiplier output, sign extended to 16 bits.
  function automatic logic signed [15:0] lane_sum(input logic [15:0] p, input logic [1:0] prec);
    logic signed [15:0] s;
    case (prec)
      PREC_2B: s = 16'(signed'(p[3:0]))  + 16'(signed'(p[7:4]))
                 + 16'(signed'(p[11:8])) + 16'(signed'(p[15:12]));
      PREC_4B: s = 16'(signed'(p[7:0]))  + 16'(signed'(p[15:8]));
      default: s = signed'(p);
    endcase
    return s;
  endfunction

endpackage : dla_pkg
