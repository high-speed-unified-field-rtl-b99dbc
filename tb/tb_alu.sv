// tb_alu: the ALU with its start/done handshake: general-purpose operations
// (one cycle) and secure operations (secure latency plus one), results
// worked out here; STORE and no-operation leave the result unchanged.
module tb_alu;
  import crypto_pkg::*;

  localparam longint unsigned MASK = (64'd1 << DATA_W) - 1;

  logic clk = 0, rst = 1, start = 0, busy, done;
  alu_op_e op = OP_NOP;
  logic [DATA_W-1:0] a = '0, b = '0, c = '0, d = '0, p1 = 53'd1, p2 = '0, y;
  int checks = 0, failures = 0;

  alu dut (.clk, .rst, .start, .op, .a, .b, .c, .d, .p1, .p2, .busy, .done, .y);

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

  task automatic run(alu_op_e o, int latency, logic [255:0] e, logic check_value);
    int cycles;
    @(negedge clk);
    op = o; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 2;
    if (cycles !== latency) begin failures++; $display("FAIL op %0d latency %0d", o, cycles); end
    if (check_value && 256'(y) !== e) begin
      failures++;
      $display("FAIL op %0d a=%0d b=%0d y=%0d expected %0d", o, a, b, y, e);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] keep;
    repeat (2) @(posedge clk);
    rst = 0;
    a = 53'd1; b = 53'd1000;
    run(OP_ADD, 0, 256'd1001, 1);
    keep = y;
    run(OP_STORE, 0, 256'(keep), 1);
    run(OP_NOP, 0, 256'(keep), 1);
    for (int i = 0; i < 30; i++) begin
      a = rnd(53); b = rnd(53);
      run(OP_ADD, 0, 256'(64'(64'(a) + 64'(b)) & MASK), 1);
      run(OP_SUB, 0, 256'(64'(64'(a) - 64'(b)) & MASK), 1);
      run(OP_XOR, 0, 256'(a ^ b), 1);
      run(OP_LOAD, 0, 256'(a), 1);
      b = rnd(5);
      run(OP_SHR, 0, 256'(a >> b), 1);
      run(OP_DIV, 0, b == 0 ? 256'(MASK) : 256'(64'(a) / 64'(b)), 1);
      p1 = rnd(43) | 53'd1;
      if (p1 < 3) p1 = 53'd3;
      p2 = inv_pow2(p1, 8);
      run(OP_MODADD, 56, (256'(a) + 256'(b)) % 256'(p1), 1);
      run(OP_MODMUL, 108, (256'(a) * 256'(b)) % 256'(p1), 1);
      a = a % p1; b = rnd(53) % p1; c = rnd(53) % p1; d = rnd(53) % p1;
      run(OP_MONT, 10, 0, 0);
      checks++;
      if (((256'(y) << 48) % 256'(p1)) !== ((256'(a) * b + 256'(c) * d) % 256'(p1))) begin
        failures++; $display("FAIL Montgomery congruence");
      end
      a = 53'd1; b = 53'd8;
      run(OP_GFMUL, 1, 256'd8, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
