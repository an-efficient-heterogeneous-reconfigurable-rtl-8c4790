// tb_rfu_uni_fu: random operand selections and operations on a uni-FU with
// logical and arithmetic types; the result must equal the reference operation
// on the two selected candidates (zero for a shift, which this FU lacks).
module tb_rfu_uni_fu;
  import rfu_pkg::*;

  uni_cfg_t cfg;
  word_t    cand [NUM_CAND];
  word_t    y;
  int       checks = 0, failures = 0;

  rfu_uni_fu #(.TYPES(T_LOGIC | T_ARITH)) dut (.cfg(cfg), .cand(cand), .y(y));

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
      default: return '0;    // shifts are absent from this FU
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      word_t e;
      foreach (cand[i]) cand[i] = $urandom;
      cfg.op_a   = op_e'($urandom_range(0, int'(OP_SRA)));
      cfg.src[0] = src_t'($urandom);
      cfg.src[1] = src_t'($urandom);
      #1;
      e = ref_op(cfg.op_a, cand[cfg.src[0]], cand[cfg.src[1]]);
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s y=%h exp=%h", cfg.op_a.name(), y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
