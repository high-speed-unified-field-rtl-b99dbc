// data_mem: data memory of the crypto processor.
//
// DEPTH words of WIDTH bits with two combinational read ports (the two
// operands fed to the ALU) and one synchronous write port (results from the
// temporary register, or words loaded by the user). Every word is cleared by
// the synchronous active-high reset, so the memory is built from registers.
//
// The 53-bit word and the 16 words (4-bit addresses, two 53-bit 16-to-1 read
// multiplexers) follow the published block diagram and synthesis figures; the
// port arrangement and the reset are this design's own.
module data_mem
  import crypto_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned DEPTH = MEM_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
