// secure_unit: unified-field (secure instruction) unit of the ALU.
//
// Executes the prime-field instructions GF(P) (modular add, subtract,
// multiply and the high-radix Montgomery product (AB + CD) R^-1) and the
// binary-field instruction GF(2^m) (look-up-table multiplication) in one
// unit, which is what makes the processor "unified field". A one-cycle
// `start` with a secure operation code (while not busy) launches the
// matching engine; `done` pulses for one cycle when its result is in `y`,
// which then holds until the next result. Latency, counted in clock edges
// from the edge that samples `start` to the edge that raises `done`, at the
// defaults: modular add/subtract 55, modular multiply 107, Montgomery 9,
// GF(2^m) multiply 0 (done is high in the cycle right after start).
//
// Operands: a, b (all operations), c, d (Montgomery), p1 (modulus of every
// prime-field operation) and p2 (Montgomery digit constant 2^-R mod p1).
// The binary-field multiply uses the low GF_M bits of a and b and returns its
// product zero-extended. The Montgomery result is cut to WIDTH bits, exact
// when B, D, P1 and P2 are below 2^(WIDTH-R-2) (see hr_montgomery).
module secure_unit
  import crypto_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] p1,
  input  logic [WIDTH-1:0] p2,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] y
);

  localparam int unsigned MW = WIDTH + MONT_R + 3;

  logic             go;
  logic             as_busy, as_done, mm_busy, mm_done, mt_busy, mt_done;
  logic [WIDTH-1:0] as_y, mm_y;
  logic [MW-1:0]    mt_y;
  logic [GF_M-1:0]  gf_y;

  assign go = start && !busy;

  mod_addsub #(.WIDTH(WIDTH)) u_addsub (
    .clk, .rst,
    .start(go && (op == OP_MODADD || op == OP_MODSUB)),
    .sub(op == OP_MODSUB), .a, .b, .p(p1),
    .busy(as_busy), .done(as_done), .y(as_y));

  mod_mul #(.WIDTH(WIDTH)) u_mul (
    .clk, .rst, .start(go && op == OP_MODMUL), .a, .b, .p(p1),
    .busy(mm_busy), .done(mm_done), .y(mm_y));

  hr_montgomery #(.WIDTH(WIDTH), .SW(MW)) u_mont (
    .clk, .rst, .start(go && op == OP_MONT), .a, .b, .c, .d, .p1, .p2,
    .busy(mt_busy), .done(mt_done), .y(mt_y));

  gf2m_mul u_gf (.a(a[GF_M-1:0]), .b(b[GF_M-1:0]), .y(gf_y));

  always_ff @(posedge clk) begin
    if (rst) begin
      y       <= '0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      if (go && op == OP_GFMUL) y <= WIDTH'(gf_y);
      if (as_done) y <= as_y;
      if (mm_done) y <= mm_y;
      if (mt_done) y <= WIDTH'(mt_y);
      done <= as_done | mm_done | mt_done | (go && op == OP_GFMUL);
    end
  end

  assign busy = as_busy | mm_busy | mt_busy;

  // At most one engine finishes in any cycle.
  assert property (@(posedge clk) disable iff (rst)
                   $onehot0({as_done, mm_done, mt_done}))
    else $error("secure_unit: two engines finished together");

endmodule
