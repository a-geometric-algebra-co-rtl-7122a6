// ga_pkg: types and constants shared by the geometric-algebra co-processor.
//
// The co-processor works on multivectors of an N-dimensional geometric algebra.
// A multivector is stored as 2**N floating-point coefficients; coefficient k
// belongs to the basis blade whose bitmap is k (bit i set = basis vector
// e_(i+1) is a factor), so for N = 3: 0 scalar, 1 e1, 2 e2, 3 e12, 4 e3,
// 5 e13, 6 e23, 7 e123.
//
// The 16-bit control word (cfg_bits) is described only by its width and its
// role (it selects the operation); the field layout below is this design's own:
//   [2:0]  operation (op_e)
//   [4:3]  IEEE 754 rounding mode (rm_e)
//   [5]    precision: 0 = coefficients are binary64, 1 = binary32 (held in
//          the low 32 bits of each 64-bit coefficient slot)
//   [15:6] reserved, ignored
package ga_pkg;

  // Rounding modes of IEEE 754.
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,   // round to nearest, ties to even
    RM_RTZ = 2'd1,   // toward zero
    RM_RUP = 2'd2,   // toward +infinity
    RM_RDN = 2'd3    // toward -infinity
  } rm_e;

  // Operations of the GA core.
  typedef enum logic [2:0] {
    OP_GP    = 3'd0, // geometric product A B
    OP_OUTER = 3'd1, // outer product A ^ B
    OP_INNER = 3'd2, // inner product (left contraction) A . B
    OP_ADD   = 3'd3, // multivector sum A + B
    OP_SUB   = 3'd4  // multivector difference A - B
  } op_e;

  typedef struct packed {
    logic [9:0]  reserved;
    logic        single;
    rm_e         rm;
    op_e         op;
  } cfg_t;

  // IEEE 754 exception flags.
  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } fflags_t;

  // States of the controller (six, as in the architecture description).
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_CLEAR   = 3'd1,
    ST_LOAD    = 3'd2,
    ST_PROCESS = 3'd3,
    ST_WRITE   = 3'd4,
    ST_DUMP    = 3'd5
  } state_e;

  // Cycles the LOAD state lasts: read A, read B, capture B.
  localparam int unsigned LOAD_CYCLES = 3;

  // Pipeline depths of the floating-point units.
  localparam int unsigned MUL_STAGES = 5;
  localparam int unsigned ADD_STAGES = 6;

endpackage
