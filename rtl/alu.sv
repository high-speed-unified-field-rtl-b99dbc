// alu: arithmetic logic unit of the crypto processor.
//
// Two parts, as in the published block diagram: the general-purpose unit
// (general_alu, combinational) and the secure instruction unit (secure_unit,
// multi-cycle, prime and binary field). A one-cycle `start` (while not busy)
// launches `op` on the operands; `done` pulses for one cycle with the result
// in `y`, which holds until the next result. General-purpose operations,
// LOAD, STORE and no-operation raise `done` on the edge that samples `start`
// (done is high in the next cycle); STORE and no-operation leave `y`
// unchanged. A secure operation raises `done` one edge after its engine
// (56 edges after start for modular add/subtract, 108 for modular multiply,
// 10 for Montgomery, 1 for GF(2^m) multiply). Registering the result and the
// start/done handshake are this design's own.
module alu
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

  logic             secure, go;
  logic             sec_busy, sec_done, sec_pending;
  logic [WIDTH-1:0] gen_y, sec_y;

  assign secure = is_secure(op);
  assign go     = start && !busy;
  assign busy   = sec_busy | sec_pending;

  general_alu #(.WIDTH(WIDTH)) u_gen (.op, .a, .b, .y(gen_y));

  secure_unit #(.WIDTH(WIDTH)) u_sec (
    .clk, .rst, .start(go && secure), .op, .a, .b, .c, .d, .p1, .p2,
    .busy(sec_busy), .done(sec_done), .y(sec_y));

  always_ff @(posedge clk) begin
    if (rst) begin
      y           <= '0;
      done        <= 1'b0;
      sec_pending <= 1'b0;
    end else begin
      done <= 1'b0;
      if (go && !secure) begin
        if (op != OP_STORE && op != OP_NOP) y <= gen_y;
        done <= 1'b1;
      end
      if (go && secure) sec_pending <= 1'b1;
      if (sec_done) begin
        y           <= sec_y;
        done        <= 1'b1;
        sec_pending <= 1'b0;
      end
    end
  end

endmodule
