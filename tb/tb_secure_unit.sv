// tb_secure_unit: every secure operation (modular add, subtract, multiply,
// Montgomery product, GF(2^4) multiply) through the unified-field unit, with
// results worked out here and the latency of each operation checked.
module tb_secure_unit;
  import crypto_pkg::*;

  logic clk = 0, rst = 1, start = 0, busy, done;
  alu_op_e op = OP_NOP;
  logic [DATA_W-1:0] a = '0, b = '0, c = '0, d = '0, p1 = 53'd1, p2 = '0, y;
  int checks = 0, failures = 0;

  secure_unit dut (.clk, .rst, .start, .op, .a, .b, .c, .d, .p1, .p2, .busy, .done, .y);

  always #5 clk = ~clk;

  function automatic logic [DATA_W-1:0] rnd(int bits);
    return DATA_W'({$urandom, $urandom} >> (64 - bits));
  endfunction

  function automatic logic [DATA_W-1:0] inv_pow2(logic [DATA_W-1:0] m, int k);
    logic [DATA_W:0] v;
    v = 1;
    repeat (k) v = v[0] ? (v + m) >> 1 : v >> 1;
    return DATA_W'(v);
  endfunction

  function automatic logic [3:0] gf_ref(logic [3:0] x, logic [3:0] z);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (z[i]) p ^= 7'(x) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  task automatic run(alu_op_e o, int latency);
    int cycles;
    logic [255:0] e;
    @(negedge clk);
    op = o; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 2;
    if (cycles !== latency) begin failures++; $display("FAIL op %0d latency %0d", o, cycles); end
    case (o)
      OP_MODADD: e = (256'(a) + 256'(b)) % 256'(p1);
      OP_MODSUB: e = (256'(a) % 256'(p1) + 256'(p1) - 256'(b) % 256'(p1)) % 256'(p1);
      OP_MODMUL: e = (256'(a) * 256'(b)) % 256'(p1);
      OP_GFMUL:  e = 256'(gf_ref(a[3:0], b[3:0]));
      default:   e = 0;
    endcase
    if (o == OP_MONT) begin
      // y * 2^48 = AB + CD (mod P1), and y fits the word for P1 < 2^43
      if (((256'(y) << 48) % 256'(p1)) !== ((256'(a) * b + 256'(c) * d) % 256'(p1))) begin
        failures++; $display("FAIL Montgomery congruence");
      end
    end else if (256'(y) !== e) begin
      failures++;
      $display("FAIL op %0d a=%0d b=%0d p=%0d y=%0d expected %0d", o, a, b, p1, y, e);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    a = 53'd1; b = 53'd8;
    run(OP_GFMUL, 0);
    checks++;
    if (y !== 53'd8) begin failures++; $display("FAIL 1*8 in GF(2^4) = %0d", y); end
    for (int i = 0; i < 40; i++) begin
      p1 = rnd(43) | 53'd1;
      if (p1 < 3) p1 = 53'd3;
      p2 = inv_pow2(p1, 8);
      a = rnd(53); b = rnd(53);
      run(OP_MODADD, 55);
      run(OP_MODSUB, 55);
      run(OP_MODMUL, 107);
      a = a % p1; b = b % p1; c = rnd(53) % p1; d = rnd(53) % p1;
      run(OP_MONT, 9);
      run(OP_GFMUL, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
