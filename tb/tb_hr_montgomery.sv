// tb_hr_montgomery: the high-radix Montgomery unit against two references
// written here: (1) the flow-chart recurrence evaluated on 128-bit integers,
// which must match the output bit for bit, and (2) the algebraic property
// y * 2^48 = A*B + C*D (mod P1) when P2 = 2^-8 mod P1 for an odd P1. Also
// checks the ITERS + 1 = 8 cycle latency.
module tb_hr_montgomery;
  import crypto_pkg::*;

  localparam int SW = DATA_W + MONT_R + 3;

  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [DATA_W-1:0] a = '0, b = '0, c = '0, d = '0, p1 = '0, p2 = '0;
  logic [SW-1:0] y;
  int checks = 0, failures = 0;

  hr_montgomery dut (.clk, .rst, .start, .a, .b, .c, .d, .p1, .p2, .busy, .done, .y);

  always #5 clk = ~clk;

  function automatic logic [DATA_W-1:0] rnd53();
    return {21'($urandom), 32'($urandom)};
  endfunction

  // 2^-k mod m for odd m, by halving k times
  function automatic logic [DATA_W-1:0] inv_pow2(logic [DATA_W-1:0] m, int k);
    logic [DATA_W:0] v;
    v = 1;
    repeat (k) v = v[0] ? (v + m) >> 1 : v >> 1;
    return DATA_W'(v);
  endfunction

  function automatic logic [127:0] flow_chart(logic [DATA_W-1:0] A, B, C, D, P1, P2);
    logic [127:0] s, q;
    s = 0; q = 0;
    for (int cnt = 0; cnt <= 6; cnt++) begin
      q = s & 128'hFF;
      s = (s >> 8) + q * P2 + 128'(A[8 * cnt +: 8]) * B
                            + 128'(C[8 * cnt +: 8]) * D;
    end
    return s + q * P1;
  endfunction

  task automatic run(logic [DATA_W-1:0] A, B, C, D, P1, P2, logic algebraic);
    int cycles;
    logic [255:0] lhs, rhs;
    @(negedge clk);
    a = A; b = B; c = C; d = D; p1 = P1; p2 = P2; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 2;
    if (128'(y) !== flow_chart(A, B, C, D, P1, P2)) begin
      failures++;
      $display("FAIL recurrence y=%0d expected %0d", y, flow_chart(A, B, C, D, P1, P2));
    end
    if (cycles !== MONT_ITERS + 1) begin
      failures++;
      $display("FAIL latency %0d", cycles);
    end
    if (algebraic) begin
      lhs = (256'(y) << 48) % 256'(P1);
      rhs = (256'(A) * B + 256'(C) * D) % 256'(P1);
      checks++;
      if (lhs !== rhs) begin
        failures++;
        $display("FAIL congruence P1=%0d", P1);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    run(53'd3, 53'd5, 53'd7, 53'd11, 53'd13, inv_pow2(53'd13, 8), 1);
    for (int i = 0; i < 300; i++) begin
      logic [DATA_W-1:0] m;
      m = (rnd53() >> ($urandom % 50)) | 53'd1;
      if (m == 1) m = 53'd3;
      run(rnd53() % m, rnd53() % m, rnd53() % m, rnd53() % m, m, inv_pow2(m, 8), 1);
    end
    // arbitrary operands: the recurrence must still be followed exactly
    for (int i = 0; i < 100; i++)
      run(rnd53(), rnd53(), rnd53(), rnd53(), rnd53(), rnd53(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
