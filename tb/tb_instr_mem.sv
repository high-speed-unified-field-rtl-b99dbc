// tb_instr_mem: checks every entry of the instruction memory against the
// documented opcode map and memory layout, and that addresses past the last
// entry read as no-operations.
module tb_instr_mem;
  import crypto_pkg::*;

  logic [OPC_W-1:0] addr;
  instr_t           instr;
  int checks = 0, failures = 0;

  instr_mem dut (.addr, .instr);

  task automatic expect_entry(int k, logic [7:0] op, int s1, int s2, int d);
    addr = OPC_W'(k);
    #1;
    checks++;
    if (instr.op !== alu_op_e'(op) ||
        (op !== 8'd13 && (instr.src1 !== 4'(s1) || instr.src2 !== 4'(s2) || instr.dst !== 4'(d)))) begin
      failures++;
      $display("FAIL opcode %0d: op=%0d src1=%0d src2=%0d dst=%0d", k, instr.op,
               instr.src1, instr.src2, instr.dst);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 10; k++) expect_entry(k, 8'(k), 0, 1, 8);
    expect_entry(11, 8'd11, 0, 1, 0);
    expect_entry(12, 8'd12, 0, 1, 10);
    expect_entry(13, 8'd13, 0, 0, 0);
    expect_entry(14, 8'd13, 0, 0, 0);
    expect_entry(15, 8'd15, 0, 4, 9);
    expect_entry(16, 8'd16, 0, 4, 9);
    expect_entry(17, 8'd17, 0, 4, 9);
    expect_entry(18, 8'd18, 0, 4, 9);
    expect_entry(19, 8'd19, 0, 1, 9);
    for (int k = 20; k < 32; k++) expect_entry(k, 8'd13, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
