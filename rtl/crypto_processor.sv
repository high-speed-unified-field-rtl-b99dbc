// crypto_processor: unified-field crypto processor (top level).
//
// A small processor that executes one instruction per opcode given by the
// user. It carries general-purpose instructions (arithmetic, logic, shift,
// rotate, load, store) and secure instructions over both a prime field GF(P)
// (modular add, subtract, multiply and a high-radix Montgomery product
// (AB + CD) R^-1) and a binary field GF(2^m) (look-up-table multiply).
//
// Data flow, as in the published block diagram: the opcode is taken into the
// program counter, which addresses the instruction memory; the instruction
// decoder splits the 20-bit word into an 8-bit ALU operation and 4-bit data
// memory addresses; the data memory supplies the operands to the ALU; the ALU
// result goes to the temporary register and from there to the data memory;
// data_out shows the memory word the instruction wrote. The sequencing below
// is this design's own:
//   IDLE    user words may be written (in_we, in_addr, in_data); a `start`
//           pulse loads the opcode into the program counter
//   FETCH0  operands A, B  (src1, src2; src1, src1+1 for prime-field ops)
//   FETCH1  P1, P2 (prime field: src2, src2+1) or C, D (Montgomery: src1+2,
//           src1+3)
//   FETCH2  P1, P2 at src2, src2+1 (Montgomery only)
//   EXEC    start the ALU          WAIT    wait for the ALU, load temp reg
//   WRITE   memory[dst] <= temp    FINISH  data_out <= memory[dst], `done`
// LOAD copies memory[src1] to the temporary register only; STORE writes the
// temporary register to memory[dst]. `busy` is high from the cycle after
// `start` until `done`; a `start` or a user write while busy is ignored.
// Counted in clock edges from the edge that samples `start` to the edge that
// raises `done` (a one-cycle pulse, with data_out valid from then on): a
// general-purpose instruction takes 5, LOAD 4, STORE 3, a no-operation 2, a
// GF(2^m) multiply 6, a Montgomery product 17, modular add or subtract 62 and
// modular multiply 114.
// Synchronous active-high reset.
module crypto_processor
  import crypto_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [OPC_W-1:0]  opcode,
  input  logic              in_we,
  input  logic [ADDR_W-1:0] in_addr,
  input  logic [DATA_W-1:0] in_data,
  output logic [DATA_W-1:0] data_out,
  output logic              busy,
  output logic              done
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH0, S_FETCH1, S_FETCH2, S_EXEC, S_WAIT, S_WRITE, S_FINISH
  } state_e;

  state_e state;

  logic [OPC_W-1:0]  pc;
  instr_t            instr;
  alu_op_e           op;
  op_class_e         cls;
  logic              secure;
  logic [ADDR_W-1:0] src1, src2, dst;

  logic              mem_we;
  logic [ADDR_W-1:0] mem_waddr, raddr_a, raddr_b;
  logic [DATA_W-1:0] mem_wdata, rdata_a, rdata_b;

  logic [DATA_W-1:0] opa, opb, opc, opd, opp1, opp2;
  logic              alu_start, alu_busy, alu_done;
  logic [DATA_W-1:0] alu_y, temp_q;

  program_counter u_pc (
    .clk, .rst, .load(state == S_IDLE && start), .opcode, .pc);

  instr_mem u_imem (.addr(pc), .instr);

  instr_decoder u_dec (
    .instr, .op, .cls, .secure, .src1, .src2, .dst);

  data_mem u_dmem (
    .clk, .rst, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr_a, .rdata_a, .raddr_b, .rdata_b);

  alu u_alu (
    .clk, .rst, .start(alu_start), .op, .a(opa), .b(opb), .c(opc), .d(opd),
    .p1(opp1), .p2(opp2), .busy(alu_busy), .done(alu_done), .y(alu_y));

  temp_regs u_temp (
    .clk, .rst, .load(state == S_WAIT && alu_done), .d(alu_y), .q(temp_q));

  // Read addresses of each fetch step.
  always_comb begin
    raddr_a = src1;
    raddr_b = src2;
    unique case (state)
      S_FETCH0: if (cls inside {CLS_PRIME, CLS_MONT}) raddr_b = src1 + 1'b1;
      S_FETCH1: if (cls == CLS_MONT) begin
                  raddr_a = src1 + 4'd2;
                  raddr_b = src1 + 4'd3;
                end else begin
                  raddr_a = src2;
                  raddr_b = src2 + 1'b1;
                end
      S_FETCH2: begin
                  raddr_a = src2;
                  raddr_b = src2 + 1'b1;
                end
      S_FINISH: raddr_a = dst;
      default: ;
    endcase
  end

  // Memory write: user words while idle, results in WRITE.
  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = dst;
    mem_wdata = temp_q;
    if (state == S_IDLE && in_we) begin
      mem_we    = 1'b1;
      mem_waddr = in_addr;
      mem_wdata = in_data;
    end else if (state == S_WRITE) begin
      mem_we = 1'b1;
    end
  end

  assign alu_start = (state == S_EXEC);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      data_out <= '0;
      done     <= 1'b0;
      opa <= '0; opb <= '0; opc <= '0; opd <= '0; opp1 <= '0; opp2 <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:   if (start) state <= S_FETCH0;
        S_FETCH0: begin
          opa <= rdata_a;
          opb <= rdata_b;
          unique case (cls)
            CLS_STORE:           state <= S_WRITE;
            CLS_NOP:             state <= S_FINISH;
            CLS_PRIME, CLS_MONT: state <= S_FETCH1;
            default:             state <= S_EXEC;
          endcase
        end
        S_FETCH1: begin
          if (cls == CLS_MONT) begin
            opc   <= rdata_a;
            opd   <= rdata_b;
            state <= S_FETCH2;
          end else begin
            opp1  <= rdata_a;
            opp2  <= rdata_b;
            state <= S_EXEC;
          end
        end
        S_FETCH2: begin
          opp1  <= rdata_a;
          opp2  <= rdata_b;
          state <= S_EXEC;
        end
        S_EXEC:   state <= S_WAIT;
        S_WAIT:   if (alu_done) state <= (cls == CLS_LOAD) ? S_FINISH : S_WRITE;
        S_WRITE:  state <= S_FINISH;
        S_FINISH: begin
          data_out <= (cls == CLS_LOAD) ? temp_q : rdata_a;
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The ALU is only started when it is idle, and finishes only in WAIT.
  assert property (@(posedge clk) disable iff (rst) alu_start |-> !alu_busy)
    else $error("crypto_processor: ALU started while busy");
  assert property (@(posedge clk) disable iff (rst) alu_done |-> state == S_WAIT)
    else $error("crypto_processor: ALU result outside WAIT");

  logic unused;
  assign unused = secure;

endmodule
