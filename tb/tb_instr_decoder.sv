// tb_instr_decoder: random instruction words; checks the address fields, the
// operation, its class and the secure flag against a table written here.
module tb_instr_decoder;
  import crypto_pkg::*;

  instr_t            instr;
  alu_op_e           op;
  op_class_e         cls;
  logic              secure;
  logic [ADDR_W-1:0] src1, src2, dst;
  int checks = 0, failures = 0;

  instr_decoder dut (.instr, .op, .cls, .secure, .src1, .src2, .dst);

  function automatic op_class_e ref_class(int code);
    if (code <= 10) return CLS_GENERAL;
    if (code == 11) return CLS_LOAD;
    if (code == 12) return CLS_STORE;
    if (code >= 15 && code <= 17) return CLS_PRIME;
    if (code == 18) return CLS_MONT;
    if (code == 19) return CLS_BINARY;
    return CLS_NOP;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      logic [19:0] w;
      int code;
      w = 20'($urandom);
      code = (i < 256) ? i : int'(w[19:12]) % 24;
      w[19:12] = 8'(code);
      instr = instr_t'(w);
      #1;
      checks++;
      if (src1 !== w[3:0] || src2 !== w[7:4] || dst !== w[11:8] ||
          cls !== ref_class(code) ||
          secure !== (code >= 15 && code <= 19) ||
          (ref_class(code) == CLS_NOP ? op !== OP_NOP : op !== alu_op_e'(code))) begin
        failures++;
        $display("FAIL word %h: op=%0d cls=%0d secure=%0b", w, op, cls, secure);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
