// crypto_pkg: widths, the instruction format and the operation codes shared by
// every module of the unified-field crypto processor.
//
// The processor works on 53-bit words held in a 16-word data memory. A 5-bit
// opcode selects one of 20 entries of the instruction memory; each entry is a
// 20-bit instruction word made of an 8-bit ALU operation and three 4-bit data
// memory addresses (first source, second source, destination). The 53-bit
// word, the 20-bit instruction, the 8-bit operation field, the 4-bit address
// fields and the 5-bit opcode are the bus widths of the published block
// diagram. The opcode numbers 0 (addition), 18 (high-radix Montgomery) and
// 19 (GF(2^m) multiplication) are the published ones; the remaining numbering
// is this design's own, following the order of the instruction-set table.
package crypto_pkg;

  localparam int unsigned DATA_W   = 53;  // data path and memory word width
  localparam int unsigned ADDR_W   = 4;   // data memory address width
  localparam int unsigned MEM_DEPTH = 16; // data memory words
  localparam int unsigned OPC_W    = 5;   // opcode / program counter width
  localparam int unsigned NUM_INSTR = 20; // instruction memory entries
  localparam int unsigned OP_W     = 8;   // ALU operation field width
  localparam int unsigned INSTR_W  = OP_W + 3 * ADDR_W; // 20-bit instruction

  // High-radix Montgomery: digit width R and number of digit iterations
  // (count = 0..6 in the flow chart); 7 digits of 8 bits cover 53 bits.
  localparam int unsigned MONT_R     = 8;
  localparam int unsigned MONT_ITERS = 7;

  // Binary-field look-up-table multiplier: GF(2^4) with x^4 + x + 1.
  localparam int unsigned GF_M    = 4;
  localparam logic [4:0]  GF_POLY = 5'b10011;

  // ALU operation codes (8-bit field of the instruction word).
  typedef enum logic [OP_W-1:0] {
    OP_ADD    = 8'd0,   // A + B
    OP_SUB    = 8'd1,   // A - B
    OP_MUL    = 8'd2,   // A * B (low 53 bits)
    OP_DIV    = 8'd3,   // A / B
    OP_AND    = 8'd4,
    OP_OR     = 8'd5,
    OP_XOR    = 8'd6,
    OP_SHR    = 8'd7,   // A >> B
    OP_SHL    = 8'd8,   // A << B
    OP_ROR    = 8'd9,   // rotate right by B mod 53
    OP_ROL    = 8'd10,  // rotate left by B mod 53
    OP_LOAD   = 8'd11,  // temporary register <- memory
    OP_STORE  = 8'd12,  // memory <- temporary register
    OP_NOP    = 8'd13,
    OP_MODADD = 8'd15,  // A + B mod P
    OP_MODSUB = 8'd16,  // A - B mod P
    OP_MODMUL = 8'd17,  // A * B mod P
    OP_MONT   = 8'd18,  // (AB + CD) R^-1, high-radix Montgomery
    OP_GFMUL  = 8'd19   // A * B in GF(2^m), look-up table
  } alu_op_e;

  typedef struct packed {
    alu_op_e           op;
    logic [ADDR_W-1:0] dst;
    logic [ADDR_W-1:0] src2;
    logic [ADDR_W-1:0] src1;
  } instr_t;

  // Operation classes, used by the sequencer to decide how many operand
  // fetch cycles an instruction needs and whether it runs in the secure unit.
  typedef enum logic [2:0] {
    CLS_GENERAL,  // one fetch (src1, src2), combinational result
    CLS_LOAD,     // one fetch, result only to the temporary register
    CLS_STORE,    // no fetch, temporary register to memory
    CLS_NOP,
    CLS_PRIME,    // fetch A,B at src1,src1+1 and P at src2; multi-cycle
    CLS_MONT,     // fetch A,B,C,D at src1..src1+3 and P1,P2 at src2,src2+1
    CLS_BINARY    // fetch (src1, src2), secure unit
  } op_class_e;

  function automatic op_class_e op_class(alu_op_e op);
    unique case (op)
      OP_LOAD:                       return CLS_LOAD;
      OP_STORE:                      return CLS_STORE;
      OP_MODADD, OP_MODSUB, OP_MODMUL: return CLS_PRIME;
      OP_MONT:                       return CLS_MONT;
      OP_GFMUL:                      return CLS_BINARY;
      OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR, OP_XOR,
      OP_SHR, OP_SHL, OP_ROR, OP_ROL: return CLS_GENERAL;
      default:                       return CLS_NOP;
    endcase
  endfunction

  function automatic logic is_secure(alu_op_e op);
    return op inside {OP_MODADD, OP_MODSUB, OP_MODMUL, OP_MONT, OP_GFMUL};
  endfunction

  // Fixed operand layout of the default program (see instr_mem).
  localparam logic [ADDR_W-1:0] ADR_A    = 4'd0;
  localparam logic [ADDR_W-1:0] ADR_B    = 4'd1;
  localparam logic [ADDR_W-1:0] ADR_P    = 4'd4;  // P1; P2 follows at 5
  localparam logic [ADDR_W-1:0] ADR_GEN  = 4'd8;  // general results
  localparam logic [ADDR_W-1:0] ADR_SEC  = 4'd9;  // secure results
  localparam logic [ADDR_W-1:0] ADR_STO  = 4'd10; // STORE target

endpackage
