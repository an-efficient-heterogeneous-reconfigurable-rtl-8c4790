// rfu_tri_fu: tri-instruction functional unit.
//
// Executes any regular three-node sub-DFG (one in which every node feeds at
// most one other node) inside one unit. There are two such shapes:
//   chain (tree = 0):  A = A(p0,p1);  B = B(A,p2);   y = C(B,p3)
//   tree  (tree = 1):  A = A(p0,p1);  B = B(p2,p3);  y = C(A,B)
// swap_b and swap_c exchange the operands of B and C, which matters for SUB,
// SLT and the shifts. The four operand ports pick from the RFU's 32 candidates
// (rfu_pkg). Setting op_c (and op_b) to MOVE uses the unit for shorter graphs.
// Combinational.
// The two shapes follow the design's list of regular sub-DFGs; the operand
// port arrangement, swap bits and select encoding are this implementation's.
module rfu_tri_fu
  import rfu_pkg::*;
#(
  parameter logic [2:0] TYPES = 3'b111
) (
  input  tri_cfg_t cfg,
  input  word_t    cand [NUM_CAND],
  output word_t    y
);

  word_t p0, p1, p2, p3;
  word_t ya, yb;
  word_t b_x, b_y, b_l, b_r;
  word_t c_x, c_y, c_l, c_r;

  assign p0 = cand[cfg.src[0]];
  assign p1 = cand[cfg.src[1]];
  assign p2 = cand[cfg.src[2]];
  assign p3 = cand[cfg.src[3]];

  rfu_alu #(.TYPES(TYPES)) u_a (.op(cfg.op_a), .a(p0), .b(p1), .y(ya));

  // node B: second operand of the chain, or an independent node of the tree
  assign b_x = cfg.tree ? p2 : ya;
  assign b_y = cfg.tree ? p3 : p2;
  assign b_l = cfg.swap_b ? b_y : b_x;
  assign b_r = cfg.swap_b ? b_x : b_y;

  rfu_alu #(.TYPES(TYPES)) u_b (.op(cfg.op_b), .a(b_l), .b(b_r), .y(yb));

  // node C: end of the chain, or the join of the tree
  assign c_x = cfg.tree ? ya : yb;
  assign c_y = cfg.tree ? yb : p3;
  assign c_l = cfg.swap_c ? c_y : c_x;
  assign c_r = cfg.swap_c ? c_x : c_y;

  rfu_alu #(.TYPES(TYPES)) u_c (.op(cfg.op_c), .a(c_l), .b(c_r), .y(y));

endmodule
