// mod_reduce: sequential remainder x mod p (helper of the prime-field units).
//
// Restoring bit-serial reduction: the remainder register starts at 0 and, for
// each bit of x from the most significant down, is shifted left taking that
// bit and then has p subtracted if it is not below p. The result is x mod p
// after XW cycles: a pulse on `start` (while not busy) samples x and p, and
// `done` rises XW clock edges after that edge, for one cycle, with `r`
// valid; r holds until the next start. p must be non-zero. The reduction method is this design's choice:
// the document only asks for the remainders.
module mod_reduce #(
  parameter int unsigned XW = 53,  // width of the number reduced
  parameter int unsigned PW = 53   // width of the modulus
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [XW-1:0] x,
  input  logic [PW-1:0] p,
  output logic          busy,
  output logic          done,
  output logic [PW-1:0] r
);

  localparam int unsigned CW = $clog2(XW + 1);

  logic [XW-1:0] xs;
  logic [PW-1:0] ps;
  logic [PW-1:0] rem;
  logic [CW-1:0] cnt;
  logic [PW:0]   shifted;

  assign shifted = {rem, xs[XW-1]};
  assign r       = rem;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      rem  <= '0;
      xs   <= '0;
      ps   <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          xs   <= x;
          ps   <= p;
          rem  <= '0;
          cnt  <= CW'(XW);
        end
      end else begin
        xs  <= xs << 1;
        rem <= (shifted >= {1'b0, ps}) ? PW'(shifted - {1'b0, ps}) : PW'(shifted);
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) (start && !busy) |-> (p != '0))
    else $error("mod_reduce: modulus is zero");

endmodule
