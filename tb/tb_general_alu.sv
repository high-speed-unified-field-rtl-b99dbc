// tb_general_alu: every general-purpose operation on directed and random
// operands, compared with results computed here in 64-bit arithmetic and,
// for rotates, bit by bit.
module tb_general_alu;
  import crypto_pkg::*;

  localparam longint unsigned MASK = (64'd1 << DATA_W) - 1;

  alu_op_e           op;
  logic [DATA_W-1:0] a, b, y;
  int checks = 0, failures = 0;

  general_alu dut (.op, .a, .b, .y);

  function automatic longint unsigned model(alu_op_e o, longint unsigned x, longint unsigned z);
    longint unsigned r, k;
    case (o)
      OP_ADD: r = x + z;
      OP_SUB: r = x - z;
      OP_MUL: r = x * z;
      OP_DIV: r = (z == 0) ? MASK : x / z;
      OP_AND: r = x & z;
      OP_OR:  r = x | z;
      OP_XOR: r = x ^ z;
      OP_SHR: r = (z >= 64'(DATA_W)) ? 0 : x >> z;
      OP_SHL: r = (z >= 64'(DATA_W)) ? 0 : x << z;
      OP_ROR, OP_ROL: begin
        k = z % 64'(DATA_W);
        if (o == OP_ROL) k = (64'(DATA_W) - k) % 64'(DATA_W);
        r = 0;
        for (int i = 0; i < DATA_W; i++)
          if (x[6'((64'(i) + k) % 64'(DATA_W))]) r[i] = 1'b1;
      end
      OP_LOAD: r = x;
      default: r = 0;
    endcase
    return r & MASK;
  endfunction

  task automatic check(alu_op_e o, longint unsigned x, longint unsigned z);
    op = o; a = DATA_W'(x); b = DATA_W'(z);
    #1;
    checks++;
    if (64'(y) !== model(o, x & MASK, z & MASK)) begin
      failures++;
      $display("FAIL op %0d a=%0d b=%0d y=%0d expected %0d", o, a, b, y, model(o, x & MASK, z & MASK));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static alu_op_e ops [13] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR, OP_XOR,
                          OP_SHR, OP_SHL, OP_ROR, OP_ROL, OP_LOAD, OP_NOP};
    check(OP_ADD, 1, 1000);           // the published example: 1001
    checks++;
    if (y !== 53'd1001) begin failures++; $display("FAIL 1 + 1000 = %0d", y); end
    check(OP_DIV, 77, 0);
    check(OP_ROL, 64'h1F_FFFF_FFFF_FFFF, 3);
    check(OP_ROR, 1, 1);
    check(OP_SHL, 5, 60);
    foreach (ops[i]) begin
      for (int n = 0; n < 200; n++) begin
        longint unsigned x, z;
        x = {$urandom, $urandom};
        z = (n % 2 == 0) ? 64'($urandom % 70) : {$urandom, $urandom} >> ($urandom % 53);
        check(ops[i], x, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
