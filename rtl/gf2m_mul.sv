// gf2m_mul: binary extension field multiplier, C = A * B in GF(2^M).
//
// A look-up table indexed by both operands, C = LUT[A][B], as in the
// published flow chart. The table is not stored as data: it is computed at
// elaboration by a shift-and-add carry-less multiplication reduced by the
// field polynomial POLY (bit M set), giving a 2^(2M)-entry constant table.
// The document gives neither M nor the polynomial; GF(2^4) with
// x^4 + x + 1 is this design's choice, small enough for a table and
// consistent with the published example 1 * 8 = 8. Combinational.
module gf2m_mul
  import crypto_pkg::*;
#(
  parameter int unsigned M    = GF_M,
  parameter logic [M:0]  POLY = GF_POLY[M:0]
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);

  localparam int unsigned ENTRIES = 1 << (2 * M);

  function automatic logic [M-1:0] field_mul(logic [M-1:0] x, logic [M-1:0] z);
    logic [M:0]   acc;   // multiple of x being added
    logic [M-1:0] res;
    res = '0;
    acc = {1'b0, x};
    for (int i = 0; i < int'(M); i++) begin
      if (z[i]) res ^= acc[M-1:0];
      acc = acc << 1;
      if (acc[M]) acc ^= POLY;
    end
    return res;
  endfunction

  function automatic logic [ENTRIES*M-1:0] build_lut();
    logic [ENTRIES*M-1:0] t;
    for (int i = 0; i < int'(ENTRIES); i++)
      t[i*M +: M] = field_mul(M'(i >> M), M'(i));
    return t;
  endfunction

  localparam logic [ENTRIES*M-1:0] LUT = build_lut();

  assign y = LUT[{a, b} * M +: M];

endmodule
