// tb_temp_regs: reset value, loading and holding of the temporary register.
module tb_temp_regs;
  import crypto_pkg::*;

  logic clk = 0, rst = 1, load = 0;
  logic [DATA_W-1:0] d = '0, q, expected;
  int checks = 0, failures = 0;

  temp_regs dut (.clk, .rst, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    expected = '0;
    for (int i = 0; i < 300; i++) begin
      load = ($urandom % 2) == 1;
      d    = {21'($urandom), 32'($urandom)};
      @(posedge clk);
      if (load) expected = d;
      #1;
      checks++;
      if (q !== expected) begin failures++; $display("FAIL step %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
