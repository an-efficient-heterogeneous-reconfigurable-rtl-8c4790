// rfu_pkg: types and constants shared by the heterogeneous reconfigurable
// functional unit (RFU), its configuration memory, the scheduler and the
// profiler.
//
// The RFU works on 32-bit MIPS integer data. Every operation node of every FU
// runs one of the operations in op_e; an FU only implements the instruction
// types it is built for (type 1 logical, type 2 add/sub/compare, type 3 shift,
// with a fixed set per FU position), plus MOVE, which every FU has so data can be passed
// through an FU that sits between a producer and a consumer.
//
// Operand sources. Every FU operand port has a 5-bit source select into one
// flat space of 32 candidates:
//   0..7   RFU inputs IN0..IN7 (values read from the register file)
//   8..15  FU outputs FU0..FU7
//   16..27 immediates IMM0..IMM11 of the CI
//   28..31 unused (read as zero)
// Which candidates a port can really reach depends on the row of its FU (see
// rfu_array); a select of an unreachable candidate reads zero.
//
// Configuration. A CI's configuration is split in four parts that are stored
// and indexed separately, so CIs that differ only in some parts share the rest:
//   P1  functions of all FUs and all internal connections   (p1_t)
//   P2  register numbers read by the 8 RFU inputs           (p2_t)
//   P3  source FU and destination register of the 6 outputs (p3_t)
//   P4  the 12 immediate values                             (p4_t)
// The split follows the design; the field layout inside each part is this
// implementation's own, so the part widths differ from the design's figures.
package rfu_pkg;

  localparam int unsigned DATA_W   = 32;  // MIPS data width
  localparam int unsigned PC_W     = 32;
  localparam int unsigned REG_W    = 5;   // MIPS has 32 registers
  localparam int unsigned NUM_IN   = 8;   // RFU inputs
  localparam int unsigned NUM_OUT  = 6;   // RFU outputs
  localparam int unsigned NUM_FU   = 8;   // 3 uni + 2 bi + 3 tri
  localparam int unsigned NUM_IMM  = 12;  // immediates per CI
  localparam int unsigned IMM_W    = 16;  // MIPS immediate field
  localparam int unsigned NUM_WP   = 4;   // register-file write ports of the 4-issue core
  localparam int unsigned NUM_CAND = 32;  // size of the operand source space
  localparam int unsigned SRC_W    = 5;

  localparam int unsigned SRC_IN0  = 0;
  localparam int unsigned SRC_FU0  = 8;
  localparam int unsigned SRC_IMM0 = 16;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [SRC_W-1:0]  src_t;
  typedef logic [REG_W-1:0]  reg_t;

  typedef enum logic [3:0] {
    OP_MOVE = 4'd0,   // y = a
    OP_AND  = 4'd1,   // type 1
    OP_OR   = 4'd2,
    OP_XOR  = 4'd3,
    OP_NOR  = 4'd4,
    OP_ADD  = 4'd5,   // type 2
    OP_SUB  = 4'd6,   // y = a - b
    OP_SLT  = 4'd7,   // y = (signed a < signed b)
    OP_SLTU = 4'd8,   // y = (a < b)
    OP_SLL  = 4'd9,   // type 3: y = a shifted by b[4:0]
    OP_SRL  = 4'd10,
    OP_SRA  = 4'd11
  } op_e;

  // Instruction-type masks for rfu_alu's TYPES parameter.
  localparam logic [2:0] T_LOGIC = 3'b001;
  localparam logic [2:0] T_ARITH = 3'b010;
  localparam logic [2:0] T_SHIFT = 3'b100;

  // Uni-instruction FU: y = A(p0, p1)
  typedef struct packed {
    op_e           op_a;
    src_t [1:0]    src;
  } uni_cfg_t;

  // Bi-instruction FU: A = A(p0, p1); y = B(A, p2), or B(p2, A) when swap_b
  typedef struct packed {
    op_e           op_a;
    op_e           op_b;
    logic          swap_b;
    src_t [2:0]    src;
  } bi_cfg_t;

  // Tri-instruction FU, two regular 3-node shapes:
  //   chain (tree=0): A = A(p0,p1); B = B(A,p2); y = C(B,p3)
  //   tree  (tree=1): A = A(p0,p1); B = B(p2,p3); y = C(A,B)
  // swap_b / swap_c exchange the two operands of B / C.
  typedef struct packed {
    op_e           op_a;
    op_e           op_b;
    op_e           op_c;
    logic          tree;
    logic          swap_b;
    logic          swap_c;
    src_t [3:0]    src;
  } tri_cfg_t;

  // P1: functions and connections of the eight FUs, rows 1..3.
  typedef struct packed {
    tri_cfg_t fu7;  // row 3, tri,  types 1,2
    bi_cfg_t  fu6;  // row 3, bi,   types 1,2,3
    uni_cfg_t fu5;  // row 3, uni,  types 1,2
    tri_cfg_t fu4;  // row 2, tri,  types 1,2,3
    bi_cfg_t  fu3;  // row 2, bi,   type 2
    tri_cfg_t fu2;  // row 1, tri,  types 1,2,3
    uni_cfg_t fu1;  // row 1, uni,  type 3
    uni_cfg_t fu0;  // row 1, uni,  types 1,2
  } p1_t;

  // P2: register number read by each RFU input.
  typedef struct packed {
    reg_t [NUM_IN-1:0] in_reg;
  } p2_t;

  typedef struct packed {
    logic       en;    // output is written back
    logic [2:0] fu;    // FU whose result drives it
    reg_t       dest;  // destination register
  } out_cfg_t;

  // P3: the six outputs.
  typedef struct packed {
    out_cfg_t [NUM_OUT-1:0] out;
  } p3_t;

  typedef struct packed {
    logic             zext;  // 1: zero-extend, 0: sign-extend
    logic [IMM_W-1:0] val;
  } imm_t;

  // P4: the twelve immediates.
  typedef struct packed {
    imm_t [NUM_IMM-1:0] imm;
  } p4_t;

  typedef struct packed {
    p1_t p1;
    p2_t p2;
    p3_t p3;
    p4_t p4;
  } ci_cfg_t;

  function automatic word_t imm_extend(imm_t i);
    return i.zext ? word_t'({{(DATA_W-IMM_W){1'b0}}, i.val})
                  : word_t'({{(DATA_W-IMM_W){i.val[IMM_W-1]}}, i.val});
  endfunction

endpackage
