// mod_mul: prime-field modular multiplier, A * B mod P.
//
// The full 2*WIDTH-bit product of a and b is formed by one multiplier when
// the operation starts and is reduced modulo p by a bit-serial reducer
// (mod_reduce), one product bit per cycle. The instruction set names this
// operation without describing its insides; multiply-then-reduce is this
// design's simplest way to do it.
//
// Interface: a one-cycle `start` (while not busy) samples a, b and p; `done`
// rises 2*WIDTH clock edges after the edge that samples start (106 at the
// defaults), for one cycle, with `y` valid; y holds until the next result.
// p must be non-zero.
module mod_mul
  import crypto_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] p,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] y
);

  logic [2*WIDTH-1:0] prod;

  assign prod = (2*WIDTH)'(a) * (2*WIDTH)'(b);

  mod_reduce #(.XW(2*WIDTH), .PW(WIDTH)) u_red (
    .clk, .rst, .start, .x(prod), .p(p), .busy, .done, .r(y));

endmodule
