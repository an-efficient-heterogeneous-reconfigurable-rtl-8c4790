// rfu_uni_fu: uni-instruction functional unit.
//
// Runs one operation per configuration: its two operand ports each pick one
// of the 32 candidate values of the RFU (inputs, FU outputs, immediates, see
// rfu_pkg) and the node computes y = A(p0, p1). Purely combinational; a CI's
// whole mapped graph settles within the cycles the scheduler allots it.
// The instruction types are fixed by TYPES (the architecture gives them per
// FU position); the operand-select encoding is this implementation's.
module rfu_uni_fu
  import rfu_pkg::*;
#(
  parameter logic [2:0] TYPES = 3'b111
) (
  input  uni_cfg_t cfg,
  input  word_t    cand [NUM_CAND],  // candidate operand values
  output word_t    y
);

  word_t p0, p1;

  assign p0 = cand[cfg.src[0]];
  assign p1 = cand[cfg.src[1]];

  rfu_alu #(.TYPES(TYPES)) u_a (.op(cfg.op_a), .a(p0), .b(p1), .y(y));

endmodule
