// tb_rfu_alu: checks every operation of an RFU operation node against a
// reference written from the MIPS definitions, for random and corner operands,
// on a node with all three instruction types and on a shift-only node (whose
// logical and arithmetic operations must give zero).
module tb_rfu_alu;
  import rfu_pkg::*;

  op_e   op;
  word_t a, b, y_all, y_sh;
  int    checks = 0, failures = 0;
  logic  clk = 0;

  rfu_alu #(.TYPES(3'b111))  dut_all (.op(op), .a(a), .b(b), .y(y_all));
  rfu_alu #(.TYPES(T_SHIFT)) dut_sh  (.op(op), .a(a), .b(b), .y(y_sh));

  always #5 clk = ~clk;

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

  function automatic bit is_shift_or_move(op_e o);
    return o inside {OP_MOVE, OP_SLL, OP_SRL, OP_SRA};
  endfunction

  task automatic check_one(op_e o, word_t x, word_t z);
    word_t e;
    op = o; a = x; b = z;
    #1;
    e = ref_op(o, x, z);
    checks++;
    if (y_all !== e) begin
      failures++;
      $display("FAIL all-types op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y_all, e);
    end
    checks++;
    if (y_sh !== (is_shift_or_move(o) ? e : '0)) begin
      failures++;
      $display("FAIL shift-only op=%s a=%h b=%h y=%h", o.name(), x, z, y_sh);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h0000_001f};
    for (int o = 0; o <= int'(OP_SRA); o++) begin
      foreach (corner[i]) foreach (corner[j]) check_one(op_e'(o), corner[i], corner[j]);
      for (int k = 0; k < 100; k++) check_one(op_e'(o), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
