// tb_rfu_bi_fu: random two-operation chains on a bi-FU with all types,
// with and without operand swap on the second node, against a reference
// evaluation of B(A(p0,p1), p2). Also checks uni use (op_b = MOVE).
module tb_rfu_bi_fu;
  import rfu_pkg::*;

  bi_cfg_t cfg;
  word_t   cand [NUM_CAND];
  word_t   y;
  int      checks = 0, failures = 0;

  rfu_bi_fu #(.TYPES(3'b111)) dut (.cfg(cfg), .cand(cand), .y(y));

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

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      word_t ea, e, p0, p1, p2;
      foreach (cand[i]) cand[i] = $urandom;
      cfg.op_a   = op_e'($urandom_range(0, int'(OP_SRA)));
      cfg.op_b   = (t % 10 == 0) ? OP_MOVE : op_e'($urandom_range(0, int'(OP_SRA)));
      cfg.swap_b = (t % 10 == 0) ? 1'b0 : 1'($urandom);
      for (int k = 0; k < 3; k++) cfg.src[k] = src_t'($urandom);
      #1;
      p0 = cand[cfg.src[0]]; p1 = cand[cfg.src[1]]; p2 = cand[cfg.src[2]];
      ea = ref_op(cfg.op_a, p0, p1);
      e  = cfg.swap_b ? ref_op(cfg.op_b, p2, ea) : ref_op(cfg.op_b, ea, p2);
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %s/%s swap=%0d y=%h exp=%h",
                                    cfg.op_a.name(), cfg.op_b.name(), cfg.swap_b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
