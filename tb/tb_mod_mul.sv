// tb_mod_mul: modular multiplication on directed and random operands,
// compared with the % operator on 128-bit values; also checks the 2*WIDTH
// cycle latency.
module tb_mod_mul;
  import crypto_pkg::*;

  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [DATA_W-1:0] a = '0, b = '0, p = 53'd1, y;
  int checks = 0, failures = 0;

  mod_mul dut (.clk, .rst, .start, .a, .b, .p, .busy, .done, .y);

  always #5 clk = ~clk;

  function automatic logic [DATA_W-1:0] rnd53();
    return {21'($urandom), 32'($urandom)};
  endfunction

  task automatic run(logic [DATA_W-1:0] x, logic [DATA_W-1:0] z, logic [DATA_W-1:0] m);
    logic [127:0] e;
    int cycles;
    @(negedge clk);
    a = x; b = z; p = m; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    e = (128'(x) * 128'(z)) % 128'(m);
    checks += 2;
    if (128'(y) !== e) begin
      failures++;
      $display("FAIL a=%0d b=%0d p=%0d y=%0d expected %0d", x, z, m, y, e);
    end
    if (cycles !== 2 * DATA_W) begin
      failures++;
      $display("FAIL latency %0d cycles", cycles);
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
    run(53'd7, 53'd9, 53'd11);                   // 63 mod 11 = 8
    run('1, '1, 53'h1F_FFFF_FFFF_FFFF - 53'd110); // largest product
    for (int i = 0; i < 120; i++) begin
      logic [DATA_W-1:0] m;
      m = rnd53() >> ($urandom % 52);
      if (m == 0) m = 53'd5;
      run(rnd53(), rnd53() >> ($urandom % 53), m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
