// instr_decoder: instruction decoder of the crypto processor.
//
// Purely combinational. It splits the 20-bit instruction word into the
// 8-bit ALU operation and the three 4-bit data memory addresses, and derives
// from the operation its class (general purpose, load, store, prime field,
// Montgomery, binary field, no-operation) and whether the secure unit
// executes it. The field widths follow the published block diagram (8 bits
// to the ALU, 4-bit addresses to the data memory); the field order inside
// the word and the classes are this design's own. An operation code that is
// not defined decodes as a no-operation.
module instr_decoder
  import crypto_pkg::*;
(
  input  instr_t            instr,
  output alu_op_e           op,
  output op_class_e         cls,
  output logic              secure,
  output logic [ADDR_W-1:0] src1,
  output logic [ADDR_W-1:0] src2,
  output logic [ADDR_W-1:0] dst
);

  always_comb begin
    cls    = op_class(instr.op);
    op     = (cls == CLS_NOP) ? OP_NOP : instr.op;
    secure = is_secure(op);
    src1   = instr.src1;
    src2   = instr.src2;
    dst    = instr.dst;
  end

endmodule
