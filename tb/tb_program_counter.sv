// tb_program_counter: reset value, loading of random opcodes and holding
// while load is low.
module tb_program_counter;
  import crypto_pkg::*;

  logic clk = 0, rst = 1, load = 0;
  logic [OPC_W-1:0] opcode = '0, pc, expected;
  int checks = 0, failures = 0;

  program_counter dut (.clk, .rst, .load, .opcode, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode = 5'd17;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pc !== '0) begin failures++; $display("FAIL reset value %0d", pc); end
    rst = 0;
    expected = '0;
    for (int i = 0; i < 200; i++) begin
      load   = ($urandom % 2) == 1;
      opcode = OPC_W'($urandom);
      @(posedge clk);
      if (load) expected = opcode;
      #1;
      checks++;
      if (pc !== expected) begin
        failures++;
        $display("FAIL step %0d: pc=%0d expected %0d", i, pc, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
