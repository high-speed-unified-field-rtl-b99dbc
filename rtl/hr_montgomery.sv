// hr_montgomery: high-radix Montgomery multiplier, (A*B + C*D) * R^-1.
//
// Digit-serial, radix 2^R, one digit of A and of C per clock. With S[0] = 0,
// iteration count = 0 .. ITERS-1 computes
//     Q[count]   = S[count] mod 2^R
//     S[count+1] = (S[count] >> R) + Q[count]*P2 + A[count]*B + C[count]*D
// where A[count] and C[count] are the count-th R-bit digits of A and C
// (least significant first), and one final cycle adds
//     S[ITERS+1] = S[ITERS] + Q[ITERS-1]*P1.
// This is the published flow chart, with its count <= 6 loop giving
// ITERS = 7, and R = 8 so that 7 digits cover the 53-bit operands.
//
// Reading of the operands (this design's own, the flow chart only calls P1
// and P2 primes): P1 is the odd modulus and P2 = 2^-R mod P1. Since
// S = (S >> R)*2^R + Q, the term (S >> R) + Q*P2 is congruent to S*2^-R, so
//     y = (A*B + C*D) * 2^(-R*(ITERS-1))  (mod P1),
// that is (AB + CD) R^-1 with R = 2^48. The result is congruent, not fully
// reduced; it is below 2^(WIDTH+R+2) for any operands, and below 2^WIDTH when
// B, D, P1 and P2 are all below 2^(WIDTH-R-2).
//
// Interface: a one-cycle `start` (while not busy) samples the six operands;
// `done` rises ITERS + 1 clock edges after the edge that samples start (8 at
// the defaults), for one cycle, with `y` valid; y holds until the next start.
module hr_montgomery
  import crypto_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned R     = MONT_R,
  parameter int unsigned ITERS = MONT_ITERS,
  parameter int unsigned SW    = WIDTH + R + 3   // accumulator width
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] p1,
  input  logic [WIDTH-1:0] p2,
  output logic             busy,
  output logic             done,
  output logic [SW-1:0]    y
);

  localparam int unsigned DW = R * ITERS;          // digit-aligned width
  localparam int unsigned CW = $clog2(ITERS + 1);

  logic [DW-1:0]    a_sh, c_sh;   // remaining digits, least significant first
  logic [WIDTH-1:0] b_q, d_q, p1_q, p2_q;
  logic [SW-1:0]    s;
  logic [R-1:0]     q_last;
  logic [CW-1:0]    count;
  logic             final_step;

  logic [R-1:0]     q;
  logic [SW-1:0]    s_next, s_final;

  always_comb begin
    q       = s[R-1:0];
    s_next  = (s >> R)
            + SW'(q * p2_q)
            + SW'(a_sh[R-1:0] * b_q)
            + SW'(c_sh[R-1:0] * d_q);
    s_final = s + SW'(q_last * p1_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      final_step <= 1'b0;
      count      <= '0;
      s          <= '0;
      q_last     <= '0;
      a_sh       <= '0;
      c_sh       <= '0;
      b_q        <= '0;
      d_q        <= '0;
      p1_q       <= '0;
      p2_q       <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          a_sh  <= DW'(a);
          c_sh  <= DW'(c);
          b_q   <= b;
          d_q   <= d;
          p1_q  <= p1;
          p2_q  <= p2;
          s     <= '0;
          count <= '0;
        end
      end else if (final_step) begin
        s          <= s_final;
        final_step <= 1'b0;
        busy       <= 1'b0;
        done       <= 1'b1;
      end else begin
        s      <= s_next;
        q_last <= q;
        a_sh   <= a_sh >> R;
        c_sh   <= c_sh >> R;
        count  <= count + 1'b1;
        if (count == CW'(ITERS - 1)) final_step <= 1'b1;
      end
    end
  end

  assign y = s;

endmodule
