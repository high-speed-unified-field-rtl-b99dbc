// tb_mod_addsub: modular addition and subtraction on directed and random
// operands (including operands above the modulus), compared with the %
// operator on 128-bit values; also checks the WIDTH + 1 cycle latency.
module tb_mod_addsub;
  import crypto_pkg::*;

  logic clk = 0, rst = 1, start = 0, sub = 0, busy, done;
  logic [DATA_W-1:0] a = '0, b = '0, p = 53'd1, y;
  int checks = 0, failures = 0;

  mod_addsub dut (.clk, .rst, .start, .sub, .a, .b, .p, .busy, .done, .y);

  always #5 clk = ~clk;

  function automatic logic [DATA_W-1:0] rnd53();
    return {21'($urandom), 32'($urandom)};
  endfunction

  task automatic run(logic s, logic [DATA_W-1:0] x, logic [DATA_W-1:0] z, logic [DATA_W-1:0] m);
    logic [127:0] e;
    int cycles;
    @(negedge clk);
    sub = s; a = x; b = z; p = m; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    if (s) e = ((128'(x) % 128'(m)) + 128'(m) - (128'(z) % 128'(m))) % 128'(m);
    else   e = ((128'(x) % 128'(m)) + (128'(z) % 128'(m))) % 128'(m);
    checks += 2;
    if (128'(y) !== e) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d p=%0d y=%0d expected %0d", s ? "sub" : "add", x, z, m, y, e);
    end
    if (cycles !== DATA_W + 1) begin
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
    run(0, 53'd5, 53'd9, 53'd11);      // 14 mod 11 = 3
    run(1, 53'd5, 53'd9, 53'd11);      // -4 mod 11 = 7
    run(0, 53'd100, 53'd200, 53'd7);   // operands above the modulus
    run(1, 53'd3, 53'd3, 53'd13);
    for (int i = 0; i < 150; i++) begin
      logic [DATA_W-1:0] m;
      m = rnd53() >> ($urandom % 52);
      if (m == 0) m = 53'd3;
      run(1'($urandom), rnd53() >> ($urandom % 40), rnd53() >> ($urandom % 40), m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
