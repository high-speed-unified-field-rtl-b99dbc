// mod_addsub: prime-field modular adder/subtractor, A + B mod P or A - B mod P.
//
// Follows the two flow charts of the modular add and subtract instructions:
// the remainders C1 = A mod P and C2 = B mod P are computed side by side by
// two bit-serial reducers (mod_reduce), then combined as C = C1 + C2 or
// C = C1 - C2. The flow charts end there; to return the fully reduced value
// the instruction table asks for, this design adds one correction: P is
// subtracted from a sum that reaches P, and added to a difference that is
// negative, so 0 <= y < P.
//
// Interface: a one-cycle `start` (while not busy) samples a, b, p and `sub`;
// `done` rises WIDTH + 1 clock edges after the edge that samples start (54 at
// the defaults), for one cycle, with `y` valid; y holds until the next
// result. p must be non-zero.
module mod_addsub
  import crypto_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             sub,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] p,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] y
);

  logic             busy1, busy2, done1, done2;
  logic [WIDTH-1:0] c1, c2;
  logic             sub_q;
  logic [WIDTH-1:0] p_q;
  logic [WIDTH:0]   sum, diff;
  logic [WIDTH-1:0] res;

  mod_reduce #(.XW(WIDTH), .PW(WIDTH)) u_red_a (
    .clk, .rst, .start(start && !busy), .x(a), .p(p),
    .busy(busy1), .done(done1), .r(c1));

  mod_reduce #(.XW(WIDTH), .PW(WIDTH)) u_red_b (
    .clk, .rst, .start(start && !busy), .x(b), .p(p),
    .busy(busy2), .done(done2), .r(c2));

  always_comb begin
    sum  = {1'b0, c1} + {1'b0, c2};
    diff = {1'b0, c1} - {1'b0, c2};
    if (sub_q) res = diff[WIDTH] ? WIDTH'(diff + {1'b0, p_q}) : diff[WIDTH-1:0];
    else       res = (sum >= {1'b0, p_q}) ? WIDTH'(sum - {1'b0, p_q}) : sum[WIDTH-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sub_q <= 1'b0;
      p_q   <= '0;
      y     <= '0;
      done  <= 1'b0;
      busy  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        sub_q <= sub;
        p_q   <= p;
        busy  <= 1'b1;
      end
      if (done1 && done2) begin
        y    <= res;
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end

  // The two reducers start together and take the same number of cycles.
  assert property (@(posedge clk) disable iff (rst) done1 == done2)
    else $error("mod_addsub: reducers out of step");

  logic unused;
  assign unused = busy1 ^ busy2;

endmodule
