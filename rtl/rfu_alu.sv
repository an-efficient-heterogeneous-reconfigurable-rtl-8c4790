// rfu_alu: one operation node of an RFU functional unit.
//
// Computes y = op(a, b) in one combinational step for the operations of
// rfu_pkg::op_e. The TYPES parameter fixes which instruction types the node is
// built with (bit 0 logical AND/OR/XOR/NOR, bit 1 ADD/SUB/SLT/SLTU, bit 2
// shifts SLL/SRL/SRA by b[4:0]); MOVE (y = a) is always present because any FU
// may have to pass a value on. An operation of a type the node was not built
// with gives zero: the mapping tools never configure one, and leaving it out
// is what makes a restricted FU smaller.
//
// The three instruction types and their per-FU restriction follow the design;
// integer-only operations without multiply, divide and load follow its CI
// constraints. The zero result for an absent type is this implementation's
// choice.
module rfu_alu
  import rfu_pkg::*;
#(
  parameter logic [2:0] TYPES = 3'b111
) (
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  output word_t y
);

  always_comb begin
    y = a;
    unique case (op)
      OP_MOVE: y = a;
      OP_AND:  y = TYPES[0] ? (a & b)    : '0;
      OP_OR:   y = TYPES[0] ? (a | b)    : '0;
      OP_XOR:  y = TYPES[0] ? (a ^ b)    : '0;
      OP_NOR:  y = TYPES[0] ? ~(a | b)   : '0;
      OP_ADD:  y = TYPES[1] ? (a + b)    : '0;
      OP_SUB:  y = TYPES[1] ? (a - b)    : '0;
      OP_SLT:  y = TYPES[1] ? word_t'($signed(a) < $signed(b)) : '0;
      OP_SLTU: y = TYPES[1] ? word_t'(a < b) : '0;
      OP_SLL:  y = TYPES[2] ? (a << b[4:0]) : '0;
      OP_SRL:  y = TYPES[2] ? (a >> b[4:0]) : '0;
      OP_SRA:  y = TYPES[2] ? word_t'($signed(a) >>> b[4:0]) : '0;
      default: y = '0;
    endcase
  end

endmodule
