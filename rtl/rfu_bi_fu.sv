// rfu_bi_fu: bi-instruction functional unit.
//
// Executes a regular two-node sub-DFG, two dependent operations, inside one
// unit, so the pair costs no interconnect multiplexer between them:
//   A = A(p0, p1);  y = B(A, p2)   (or B(p2, A) with swap_b)
// The three operand ports pick from the RFU's 32 candidates (rfu_pkg). With
// op_b = MOVE and swap_b = 0 the unit acts as a uni-instruction FU.
// Combinational. The shape and the purpose (shorter critical path than two
// uni-FUs and a multiplexer) follow the design; the swap bit and the select
// encoding are this implementation's.
module rfu_bi_fu
  import rfu_pkg::*;
#(
  parameter logic [2:0] TYPES = 3'b111
) (
  input  bi_cfg_t cfg,
  input  word_t   cand [NUM_CAND],
  output word_t   y
);

  word_t p0, p1, p2, ya, b_l, b_r;

  assign p0 = cand[cfg.src[0]];
  assign p1 = cand[cfg.src[1]];
  assign p2 = cand[cfg.src[2]];

  rfu_alu #(.TYPES(TYPES)) u_a (.op(cfg.op_a), .a(p0), .b(p1), .y(ya));

  assign b_l = cfg.swap_b ? p2 : ya;
  assign b_r = cfg.swap_b ? ya : p2;

  rfu_alu #(.TYPES(TYPES)) u_b (.op(cfg.op_b), .a(b_l), .b(b_r), .y(y));

endmodule
