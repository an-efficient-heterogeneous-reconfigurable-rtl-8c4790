// tb_rfu_tri_fu: random three-operation sub-graphs on a tri-FU, in both
// regular shapes (chain A->B->C and tree A,B->C) with all swap settings,
// against a reference evaluation; counts that each shape was exercised.
module tb_rfu_tri_fu;
  import rfu_pkg::*;

  tri_cfg_t cfg;
  word_t    cand [NUM_CAND];
  word_t    y;
  int       checks = 0, failures = 0, n_chain = 0, n_tree = 0;

  rfu_tri_fu #(.TYPES(3'b111)) dut (.cfg(cfg), .cand(cand), .y(y));

  function automatic word_t ref_op(op_e o, word_t x, word_t z);
    int signed sx = x, sz = z;
    case (o)
      OP_MOVE: return x;
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_XOR:  return x ^ z;
      OP_NOR:  return ~(x | z);
      OP_ADD:  return x + z;
      OP_SUB:  return x - z;
      OP_SLT:  return (sx < sz) ? 32'd1 : 32'd0;
      OP_SLTU: return (x < z) ? 32'd1 : 32'd0;
      OP_SLL:  return x << z[4:0];
      OP_SRL:  return x >> z[4:0];
      OP_SRA:  return word_t'(sx >>> z[4:0]);
      default: return '0;
    endcase
  endfunction

  function automatic word_t op2(op_e o, bit sw, word_t x, word_t z);
    return sw ? ref_op(o, z, x) : ref_op(o, x, z);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // a fixed example of each shape: ((p0 + p1) << p2) ^ p3 and (p0 - p1) | (p2 & p3)
    foreach (cand[i]) cand[i] = 32'(i * 3 + 1);
    cfg = '{op_a: OP_ADD, op_b: OP_SLL, op_c: OP_XOR, tree: 1'b0, swap_b: 1'b0, swap_c: 1'b0,
            src: '{5'd3, 5'd0, 5'd2, 5'd1}};   // src[3]=3, src[2]=0, src[1]=2, src[0]=1
    #1; checks++;
    if (y !== (((32'd4 + 32'd7) << 32'd1) ^ 32'd10)) begin failures++; $display("FAIL chain example %h", y); end
    cfg = '{op_a: OP_SUB, op_b: OP_AND, op_c: OP_OR, tree: 1'b1, swap_b: 1'b0, swap_c: 1'b0,
            src: '{5'd5, 5'd6, 5'd4, 5'd9}};
    #1; checks++;
    if (y !== ((32'd28 - 32'd13) | (32'd19 & 32'd16))) begin failures++; $display("FAIL tree example %h", y); end

    for (int t = 0; t < 4000; t++) begin
      word_t p0, p1, p2, p3, ya, yb, e;
      foreach (cand[i]) cand[i] = $urandom;
      cfg.op_a   = op_e'($urandom_range(0, int'(OP_SRA)));
      cfg.op_b   = op_e'($urandom_range(0, int'(OP_SRA)));
      cfg.op_c   = op_e'($urandom_range(0, int'(OP_SRA)));
      cfg.tree   = 1'($urandom);
      cfg.swap_b = 1'($urandom);
      cfg.swap_c = 1'($urandom);
      for (int k = 0; k < 4; k++) cfg.src[k] = src_t'($urandom);
      #1;
      p0 = cand[cfg.src[0]]; p1 = cand[cfg.src[1]];
      p2 = cand[cfg.src[2]]; p3 = cand[cfg.src[3]];
      ya = ref_op(cfg.op_a, p0, p1);
      if (cfg.tree) begin
        yb = op2(cfg.op_b, cfg.swap_b, p2, p3);
        e  = op2(cfg.op_c, cfg.swap_c, ya, yb);
        n_tree++;
      end else begin
        yb = op2(cfg.op_b, cfg.swap_b, ya, p2);
        e  = op2(cfg.op_c, cfg.swap_c, yb, p3);
        n_chain++;
      end
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL tree=%0d y=%h exp=%h", cfg.tree, y, e);
      end
    end
    checks++;
    if (n_chain == 0 || n_tree == 0) failures++;
    $display("chain=%0d tree=%0d", n_chain, n_tree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
