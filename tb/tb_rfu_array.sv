// tb_rfu_array: maps custom instructions onto the heterogeneous RFU array and
// compares its six outputs with the same data-flow graphs evaluated directly.
//
// CI 1 is a 16-operation graph that uses every FU, the neighbour links of rows
// 1 and 2 (FU0->FU1->FU2, FU3->FU4), the row-1-to-row-3 links, RFU inputs in
// rows 2 and 3, sign- and zero-extended immediates, both tri-FU shapes and the
// operand swaps. It runs on 500 random operand sets.
// CI 2 checks the limits: a select of a connection the array does not have
// (a later FU, a same-row FU that is not the left neighbour, an unused source
// code) reads zero, and an operation type an FU lacks gives zero.
module tb_rfu_array;
  import rfu_pkg::*;

  p1_t   p1;
  p3_t   p3;
  p4_t   p4;
  word_t in_data [NUM_IN];
  word_t out_data [NUM_OUT];
  int    checks = 0, failures = 0;

  rfu_array dut (.p1(p1), .out_cfg(p3), .imm(p4), .in_data(in_data), .out_data(out_data));

  function automatic src_t IN(int i);  return src_t'(SRC_IN0 + i);  endfunction
  function automatic src_t FU(int i);  return src_t'(SRC_FU0 + i);  endfunction
  function automatic src_t IMM(int i); return src_t'(SRC_IMM0 + i); endfunction

  task automatic expect_out(int o, word_t e, string what);
    checks++;
    if (out_data[o] !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %s out%0d=%h exp=%h", what, o, out_data[o], e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---------------- CI 1 ----------------
    p1 = '0; p3 = '0; p4 = '0;
    p4.imm[0] = '{zext: 1'b0, val: 16'd3};
    p4.imm[1] = '{zext: 1'b1, val: 16'h00ff};
    p4.imm[2] = '{zext: 1'b0, val: 16'hfff0};     // -16
    p4.imm[3] = '{zext: 1'b0, val: 16'd2};
    // FU0: y0 = in0 + in1
    p1.fu0.op_a = OP_ADD; p1.fu0.src[0] = IN(0); p1.fu0.src[1] = IN(1);
    // FU1: y1 = y0 << 3
    p1.fu1.op_a = OP_SLL; p1.fu1.src[0] = FU(0); p1.fu1.src[1] = IMM(0);
    // FU2 chain: y2 = ((y1 - in2) & 0xff) | in3
    p1.fu2.op_a = OP_SUB; p1.fu2.op_b = OP_AND; p1.fu2.op_c = OP_OR; p1.fu2.tree = 1'b0;
    p1.fu2.src[0] = FU(1); p1.fu2.src[1] = IN(2); p1.fu2.src[2] = IMM(1); p1.fu2.src[3] = IN(3);
    // FU3 bi: y3 = in5 - (y2 + in4)
    p1.fu3.op_a = OP_ADD; p1.fu3.op_b = OP_SUB; p1.fu3.swap_b = 1'b1;
    p1.fu3.src[0] = FU(2); p1.fu3.src[1] = IN(4); p1.fu3.src[2] = IN(5);
    // FU4 tree: y4 = (y3 + y2) >>> (in6 ^ in7)
    p1.fu4.op_a = OP_ADD; p1.fu4.op_b = OP_XOR; p1.fu4.op_c = OP_SRA; p1.fu4.tree = 1'b1;
    p1.fu4.src[0] = FU(3); p1.fu4.src[1] = FU(2); p1.fu4.src[2] = IN(6); p1.fu4.src[3] = IN(7);
    // FU5: y5 = y4 & y0
    p1.fu5.op_a = OP_AND; p1.fu5.src[0] = FU(4); p1.fu5.src[1] = FU(0);
    // FU6 bi: y6 = (y4 >>> 2) + y3
    p1.fu6.op_a = OP_SRA; p1.fu6.op_b = OP_ADD;
    p1.fu6.src[0] = FU(4); p1.fu6.src[1] = IMM(3); p1.fu6.src[2] = FU(3);
    // FU7 tree: y7 = (y3 - 16) - (y0 ^ y1)
    p1.fu7.op_a = OP_XOR; p1.fu7.op_b = OP_ADD; p1.fu7.op_c = OP_SUB; p1.fu7.tree = 1'b1;
    p1.fu7.swap_c = 1'b1;
    p1.fu7.src[0] = FU(0); p1.fu7.src[1] = FU(1); p1.fu7.src[2] = FU(3); p1.fu7.src[3] = IMM(2);
    for (int o = 0; o < NUM_OUT; o++) begin
      p3.out[o].en = 1'b1;
      p3.out[o].fu = 3'(o + 2);
      p3.out[o].dest = reg_t'(o + 8);
    end

    for (int t = 0; t < 500; t++) begin
      word_t y0, y1, y2, y3, y4, y5, y6, y7;
      foreach (in_data[i]) in_data[i] = (t == 0) ? word_t'(i + 1) : $urandom;
      #1;
      y0 = in_data[0] + in_data[1];
      y1 = y0 << 3;
      y2 = ((y1 - in_data[2]) & 32'h0000_00ff) | in_data[3];
      y3 = in_data[5] - (y2 + in_data[4]);
      y4 = word_t'($signed(y3 + y2) >>> ((in_data[6] ^ in_data[7]) & 32'h1f));
      y5 = y4 & y0;
      y6 = word_t'($signed(y4) >>> 2) + y3;
      y7 = (y3 + 32'hffff_fff0) - (y0 ^ y1);
      expect_out(0, y2, "ci1");
      expect_out(1, y3, "ci1");
      expect_out(2, y4, "ci1");
      expect_out(3, y5, "ci1");
      expect_out(4, y6, "ci1");
      expect_out(5, y7, "ci1");
    end

    // ---------------- CI 2: missing connections and types ----------------
    p1 = '0;
    // FU0 reads FU5 (no such link): y0 = in0 | 0
    p1.fu0.op_a = OP_OR;  p1.fu0.src[0] = IN(0); p1.fu0.src[1] = FU(5);
    // FU1 is shift-only: ADD gives 0
    p1.fu1.op_a = OP_ADD; p1.fu1.src[0] = IN(1); p1.fu1.src[1] = IN(2);
    // FU2 reads FU0, which is not its left neighbour: y2 = in3 + 0 (chain with MOVEs)
    p1.fu2.op_a = OP_ADD; p1.fu2.src[0] = IN(3); p1.fu2.src[1] = FU(0);
    // FU3 reads FU4 (later FU in its row): y3 = in1 + 0
    p1.fu3.op_a = OP_ADD; p1.fu3.src[0] = IN(1); p1.fu3.src[1] = FU(4);
    // FU5 reads FU6 (same row): y5 = in2 | 0
    p1.fu5.op_a = OP_OR;  p1.fu5.src[0] = IN(2); p1.fu5.src[1] = FU(6);
    // FU7 reads unused source code 30: y7 = in4 | 0
    p1.fu7.op_a = OP_OR;  p1.fu7.src[0] = IN(4); p1.fu7.src[1] = src_t'(30);
    p3.out[0].fu = 3'd0; p3.out[1].fu = 3'd1; p3.out[2].fu = 3'd2;
    p3.out[3].fu = 3'd3; p3.out[4].fu = 3'd5; p3.out[5].fu = 3'd7;
    for (int t = 0; t < 50; t++) begin
      foreach (in_data[i]) in_data[i] = $urandom;
      #1;
      expect_out(0, in_data[0], "ci2 link");
      expect_out(1, '0,         "ci2 type");
      expect_out(2, in_data[3], "ci2 link");
      expect_out(3, in_data[1], "ci2 link");
      expect_out(4, in_data[2], "ci2 link");
      expect_out(5, in_data[4], "ci2 code");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
