// program_counter: 5-bit program counter of the crypto processor.
//
// The processor runs one instruction per opcode given by the user. When
// `load` is high on a clock edge the counter takes the opcode; it then holds
// it, addressing the instruction memory, for the whole multi-cycle execution
// of that instruction, so the opcode input may change while the processor is
// busy. Synchronous active-high reset clears it to 0.
//
// The 5-bit width follows the published opcode bus; loading it from the
// opcode (rather than incrementing through a stored program) is this design's
// reading of a block diagram in which the opcode drives the instruction
// memory directly.
module program_counter
  import crypto_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [OPC_W-1:0] opcode,
  output logic [OPC_W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (load) pc <= opcode;
  end

endmodule
