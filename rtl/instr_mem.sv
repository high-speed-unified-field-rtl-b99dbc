// instr_mem: instruction memory of the crypto processor.
//
// A read-only table of NUM_INSTR 20-bit instruction words addressed by the
// 5-bit program counter, which holds the opcode given to the processor. Each
// word carries the ALU operation and the source and destination addresses of
// the data memory, so an opcode names a complete operation on fixed memory
// locations. The read is combinational; an address past the last entry reads
// as a no-operation.
//
// The 5-bit address, the 20-bit word and the 20 entries follow the published
// block diagram and synthesis figures. The contents (which operation sits at
// which opcode besides 0, 18 and 19, and the memory layout below) are this
// design's own:
//   words 0,1   A, B     (operands of every two-operand instruction)
//   words 2,3   C, D     (extra operands of the Montgomery instruction)
//   words 4,5   P1, P2   (modulus; P2 is the Montgomery digit constant)
//   word 8      result of general-purpose instructions
//   word 9      result of secure instructions
//   word 10     target of STORE
module instr_mem
  import crypto_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_INSTR
) (
  input  logic [OPC_W-1:0] addr,
  output instr_t           instr
);

  function automatic instr_t entry(int unsigned k);
    instr_t w;
    w = '{op: OP_NOP, dst: '0, src2: '0, src1: '0};
    if (k <= 10) begin
      // general purpose: the opcode equals the ALU operation
      w = '{op: alu_op_e'(k), dst: ADR_GEN, src2: ADR_B, src1: ADR_A};
    end else begin
      unique case (k)
        11: w = '{op: OP_LOAD,   dst: ADR_A,   src2: ADR_B, src1: ADR_A};
        12: w = '{op: OP_STORE,  dst: ADR_STO, src2: ADR_B, src1: ADR_A};
        15: w = '{op: OP_MODADD, dst: ADR_SEC, src2: ADR_P, src1: ADR_A};
        16: w = '{op: OP_MODSUB, dst: ADR_SEC, src2: ADR_P, src1: ADR_A};
        17: w = '{op: OP_MODMUL, dst: ADR_SEC, src2: ADR_P, src1: ADR_A};
        18: w = '{op: OP_MONT,   dst: ADR_SEC, src2: ADR_P, src1: ADR_A};
        19: w = '{op: OP_GFMUL,  dst: ADR_SEC, src2: ADR_B, src1: ADR_A};
        default: ;
      endcase
    end
    return w;
  endfunction

  instr_t rom [DEPTH];

  always_comb begin
    for (int unsigned k = 0; k < DEPTH; k++) rom[k] = entry(k);
  end

  always_comb begin
    if (32'(addr) < DEPTH) instr = rom[addr];
    else                   instr = '{op: OP_NOP, dst: '0, src2: '0, src1: '0};
  end

endmodule
