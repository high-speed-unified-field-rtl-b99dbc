// temp_regs: temporary register of the crypto processor.
//
// Holds the result of the last ALU operation (or the word fetched by LOAD)
// on its way to the data memory, as in the published block diagram where the
// ALU writes the temporary registers and these write the data memory. It
// takes `d` on a clock edge where `load` is high and holds it otherwise;
// synchronous active-high reset clears it. A single WIDTH-bit register is
// this design's choice: the document does not say how many there are.
module temp_regs
  import crypto_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
