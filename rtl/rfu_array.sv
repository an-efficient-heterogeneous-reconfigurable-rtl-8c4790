// rfu_array: datapath of the heterogeneous reconfigurable functional unit.
//
// Eight functional units in three rows replace the sixteen identical
// single-operation FUs of a homogeneous RFU. Tri- and bi-instruction FUs run
// two or three dependent operations without an interconnect multiplexer in
// between, which shortens the critical path of a mapped custom instruction.
//
//   row 1:  FU0 uni (logic, add)   FU1 uni (shift)   FU2 tri (logic, add, shift)
//   row 2:  FU3 bi  (add)          FU4 tri (logic, add, shift)
//   row 3:  FU5 uni (logic, add)   FU6 bi  (logic, add, shift)  FU7 tri (logic, add)
//
// Connections an operand port can reach (other selects read zero):
//   row 1  RFU inputs, immediates, left neighbour in row 1 (FU0->FU1->FU2)
//   row 2  RFU inputs, immediates, row 1 outputs, left neighbour (FU3->FU4)
//   row 3  RFU inputs, immediates, row 1 outputs, row 2 outputs
// The neighbour links are one-way, so the network has no loops; the longest
// path (FU0, FU1, FU2, FU3, FU4, row 3) holds up to 12 dependent operations.
// Each of the six outputs selects the result of any of the eight FUs.
//
// Interface: p1 holds the functions and connections, imm the CI's immediates,
// out_cfg the FU behind each output. in_data are the eight operands. The
// block is combinational; rfu_unit holds its operands stable for as many
// cycles as the CI's critical path needs.
//
// From the design: eight inputs, six outputs, the number of uni-, bi- and
// tri-FUs, the rows and the per-position type sets, and the row-to-row, row-1-
// to-row-3, input-to-rows-2/3 and neighbour links. The architecture leaves
// open which of the three "uni or bi" positions is a uni-FU (its total is
// 3 uni and 2 bi); FU1 was made the uni-FU here. The exact placement of the
// neighbour links and of the immediates is this implementation's choice.
module rfu_array
  import rfu_pkg::*;
(
  input  p1_t   p1,
  input  p3_t   out_cfg,
  input  p4_t   imm,
  input  word_t in_data  [NUM_IN],
  output word_t out_data [NUM_OUT]
);

  word_t y0, y1, y2, y3, y4, y5, y6, y7;

  // Candidates every port sees: RFU inputs and immediates.
  word_t base [NUM_CAND];
  always_comb begin
    for (int i = 0; i < NUM_CAND; i++) base[i] = '0;
    for (int i = 0; i < NUM_IN; i++)  base[SRC_IN0 + i]  = in_data[i];
    for (int i = 0; i < NUM_IMM; i++) base[SRC_IMM0 + i] = imm_extend(imm.imm[i]);
  end

  word_t c_fu0 [NUM_CAND], c_fu1 [NUM_CAND], c_fu2 [NUM_CAND];
  word_t c_fu3 [NUM_CAND], c_fu4 [NUM_CAND], c_row3 [NUM_CAND];

  // one block per vector, so no vector depends on the FU it feeds
  always_comb c_fu0 = base;
  always_comb begin
    c_fu1 = base;
    c_fu1[SRC_FU0 + 0] = y0;
  end
  always_comb begin
    c_fu2 = base;
    c_fu2[SRC_FU0 + 1] = y1;
  end
  always_comb begin
    c_fu3 = base;
    c_fu3[SRC_FU0 + 0] = y0;
    c_fu3[SRC_FU0 + 1] = y1;
    c_fu3[SRC_FU0 + 2] = y2;
  end
  always_comb begin
    c_fu4 = c_fu3;
    c_fu4[SRC_FU0 + 3] = y3;
  end
  always_comb begin
    c_row3 = c_fu3;
    c_row3[SRC_FU0 + 3] = y3;
    c_row3[SRC_FU0 + 4] = y4;
  end

  // row 1
  rfu_uni_fu #(.TYPES(T_LOGIC | T_ARITH))
    u_fu0 (.cfg(p1.fu0), .cand(c_fu0), .y(y0));
  rfu_uni_fu #(.TYPES(T_SHIFT))
    u_fu1 (.cfg(p1.fu1), .cand(c_fu1), .y(y1));
  rfu_tri_fu #(.TYPES(T_LOGIC | T_ARITH | T_SHIFT))
    u_fu2 (.cfg(p1.fu2), .cand(c_fu2), .y(y2));
  // row 2
  rfu_bi_fu  #(.TYPES(T_ARITH))
    u_fu3 (.cfg(p1.fu3), .cand(c_fu3), .y(y3));
  rfu_tri_fu #(.TYPES(T_LOGIC | T_ARITH | T_SHIFT))
    u_fu4 (.cfg(p1.fu4), .cand(c_fu4), .y(y4));
  // row 3
  rfu_uni_fu #(.TYPES(T_LOGIC | T_ARITH))
    u_fu5 (.cfg(p1.fu5), .cand(c_row3), .y(y5));
  rfu_bi_fu  #(.TYPES(T_LOGIC | T_ARITH | T_SHIFT))
    u_fu6 (.cfg(p1.fu6), .cand(c_row3), .y(y6));
  rfu_tri_fu #(.TYPES(T_LOGIC | T_ARITH))
    u_fu7 (.cfg(p1.fu7), .cand(c_row3), .y(y7));

  // output multiplexers
  word_t fu_y [NUM_FU];
  assign fu_y = '{y0, y1, y2, y3, y4, y5, y6, y7};

  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) out_data[o] = fu_y[out_cfg.out[o].fu];
  end

endmodule
