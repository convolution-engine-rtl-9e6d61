// Convolution Engine shared definitions.
//
// The engine evaluates convolution-like kernels as map(pixel, coefficient)
// followed by a reduce over a stencil. This package holds the sizes every
// block agrees on, the encodings of the map, reduce, data-flow and SIMD
// operations, and the instruction word the host processor issues.
//
// Sizes that follow the document: 10-bit pixels, a 16x16 coefficient
// register, a 16x32 shift register, 64 map lanes, an 18-entry register file
// of 16 pixels and a 16-lane SIMD unit. The map operations (abs-diff,
// multiply, average, subtract, compare) and reduce operations (add, logic
// AND, none) are those the document lists. The instruction encoding, the
// 32-bit accumulator and the SIMD operation set are this design's own.
package ce_pkg;

  localparam int unsigned PIX_W        = 10;  // pixel / coefficient width
  localparam int unsigned CROWS        = 16;  // coefficient register rows
  localparam int unsigned CCOLS        = 16;  // coefficient register columns
  localparam int unsigned SROWS        = 16;  // shift register rows
  localparam int unsigned SCOLS        = 32;  // shift register columns
  localparam int unsigned SEG          = 16;  // pixels per load
  localparam int unsigned LANES        = 64;  // map unit lanes
  localparam int unsigned GROUPS       = 4;   // 1D stencils evaluated at once
  localparam int unsigned GLANES       = LANES / GROUPS;
  localparam int unsigned OUT_ENTRIES  = 16;  // output register entries
  localparam int unsigned SIMD_LANES   = 16;
  localparam int unsigned SIMD_ENTRIES = 18;
  localparam int unsigned MAP_W        = 2 * PIX_W + 1;  // signed map result
  localparam int unsigned ACC_W        = 32;

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic signed [MAP_W-1:0] map_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef pix_t [SEG-1:0]          vec_t;   // one 16-pixel load / SIMD entry

  typedef enum logic [2:0] {
    MAP_ABSDIFF = 3'd0,  // |a - b|
    MAP_MUL     = 3'd1,  // a * signed(b)
    MAP_AVG     = 3'd2,  // (a + b + 1) >> 1
    MAP_SUB     = 3'd3,  // a - b
    MAP_CMP     = 3'd4,  // a > b
    MAP_PASS    = 3'd5   // a
  } map_op_e;

  typedef enum logic [1:0] {
    RED_ADD  = 2'd0,
    RED_AND  = 2'd1,
    RED_NONE = 2'd2
  } red_op_e;

  typedef enum logic [1:0] {
    MODE_2D  = 2'd0,  // 2D stencil, 4 rows x 16 columns per pass
    MODE_1DH = 2'd1,  // four horizontal 1D stencils, one per row
    MODE_1DV = 2'd2,  // four vertical 1D stencils, one per column
    MODE_MAT = 2'd3   // element-wise matrix operation on one row
  } mode_e;

  typedef enum logic [2:0] {
    SIMD_ADD     = 3'd0,  // saturating
    SIMD_SUB     = 3'd1,  // saturating at zero
    SIMD_ABSDIFF = 3'd2,
    SIMD_AVG     = 3'd3,
    SIMD_MIN     = 3'd4,
    SIMD_MAX     = 3'd5
  } simd_op_e;

  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_SET_OPS  = 4'd1,   // map_op, red_op
    OP_SET_SIZE = 4'd2,   // size
    OP_LD_COEFF = 4'd3,   // a = row, data
    OP_LD_2D    = 4'd4,   // seg, shift, data
    OP_CONV_2D  = 4'd5,   // a = output entry, rotate
    OP_CONV_1DH = 4'd6,   // a = output entry, b = first row, rotate
    OP_CONV_1DV = 4'd7,   // a = output entry, b = first column, rotate
    OP_CONV_MAT = 4'd8,   // a = SIMD entry, b = row, rotate
    OP_ST_OUT   = 4'd9,
    OP_LD_SIMD  = 4'd10,  // a = entry, data
    OP_ST_SIMD  = 4'd11,  // a = entry
    OP_SIMD     = 4'd12   // simd_op, a = dest, b = src A, c = src B
  } opcode_e;

  typedef struct packed {
    opcode_e    opcode;
    map_op_e    map_op;
    red_op_e    red_op;
    simd_op_e   simd_op;
    logic [4:0] size;     // stencil size 1..16
    logic [4:0] a;
    logic [4:0] b;
    logic [4:0] c;
    logic       seg;      // shift register half written by OP_LD_2D
    logic       shift;    // shift rows up before OP_LD_2D
    logic       rotate;   // rotate shift register left after a convolve
    vec_t       data;
  } ce_instr_t;

endpackage
