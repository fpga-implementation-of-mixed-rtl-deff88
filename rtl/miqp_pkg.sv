// miqp_pkg: word format, problem sizes and shared types of the MIQP solver.
//
// Every datum on the local buses and in the SRAMs is a 36-bit two's-complement
// fixed-point word; the 36-bit width and the 16-entry variable vector follow
// the published design, while the position of the binary point (FRAC) is this
// design's own choice. A child sub-problem of the branch-and-bound search is
// one 36-bit record: which binary variables are fixed and to which value.
package miqp_pkg;

  localparam int unsigned WORD_W = 36;          // fixed-point word width N
  localparam int unsigned FRAC   = 16;          // fractional bits (chosen here)
  localparam int unsigned NVAR   = 16;          // entries of the variable x
  localparam int unsigned NCORE  = 2;           // QP solver cores K

  typedef logic signed [WORD_W-1:0] word_t;

  localparam word_t FX_ONE = word_t'(1) <<< FRAC;
  localparam word_t FX_MAX = {1'b0, {(WORD_W-1){1'b1}}};

  // Child sub-problem record: bit i of fix_mask fixes variable i to fix_val[i].
  typedef struct packed {
    logic [3:0]      rsvd;
    logic [NVAR-1:0] fix_val;
    logic [NVAR-1:0] fix_mask;
  } prob_rec_t;

  // Result of one QP sub-problem as handed back by a core.
  typedef struct packed {
    logic                   feasible;
    word_t                  fval;
    logic [NVAR-1:0][WORD_W-1:0] x;
  } qp_sol_t;

  // SRAM1 memory map (words): original problem, first point, child queue.
  localparam int unsigned SRAM1_DEPTH = 4096;   // 4096 x 36 bit = 147,456 bit
  localparam int unsigned PROB_BASE   = 0;
  localparam int unsigned FP_BASE     = 2048;
  localparam int unsigned Q_BASE      = 3072;
  localparam int unsigned Q_DEPTH     = 1024;

  // SRAM2: NVAR solution words followed by the optimal value (17 x 36 = 612 bit).
  localparam int unsigned SRAM2_DEPTH = NVAR + 1;

  // QP solver core command port (driven by the dual active set sequencer).
  localparam int unsigned WS_DEPTH = 1024;      // core work-space words (chosen here)
  localparam int unsigned WS_AW    = 10;
  localparam int unsigned VLEN     = NVAR + 1;  // vector registers: x plus a constant slot

  typedef enum logic [1:0] {
    QC_WR_MEM = 2'd0,   // work space [addr] <= data
    QC_RD_MEM = 2'd1,   // respond with work space [addr]
    QC_WR_VEC = 2'd2,   // vector register [addr] <= data
    QC_MATVEC = 2'd3    // y_j = row_j . v for j < rows, stored at out_base + j
  } qc_op_t;

  typedef struct packed {
    qc_op_t           op;
    logic [WS_AW-1:0] addr;
    logic [WS_AW-1:0] out_base;
    logic [4:0]       len;
    logic [5:0]       rows;
    word_t            data;
  } qc_cmd_t;

  typedef struct packed {
    word_t      data;     // read word, or the smallest y_j of a MATVEC
    logic [5:0] idx;      // row index of that smallest y_j
  } qc_rsp_t;

endpackage
