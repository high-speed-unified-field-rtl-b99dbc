// tb_gf2m_mul: all 256 operand pairs of GF(2^4) against a reference that
// forms the 7-bit carry-less product and then reduces it by x^4 + x + 1,
// plus the published example 1 * 8 = 8 and field identities.
module tb_gf2m_mul;
  import crypto_pkg::*;

  logic [3:0] a, b, y;
  int checks = 0, failures = 0;

  gf2m_mul dut (.a, .b, .y);

  function automatic logic [3:0] ref_mul(logic [3:0] x, logic [3:0] z);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (z[i]) p ^= 7'(x) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 4'd1; b = 4'd8; #1;
    checks++;
    if (y !== 4'd8) begin failures++; $display("FAIL 1*8 = %0d", y); end
    a = 4'd2; b = 4'd8; #1;           // x * x^3 = x^4 = x + 1
    checks++;
    if (y !== 4'd3) begin failures++; $display("FAIL 2*8 = %0d", y); end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j); #1;
        checks++;
        if (y !== ref_mul(a, b)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d expected %0d", i, j, y, ref_mul(a, b));
        end
      end
    // every non-zero element has an inverse
    for (int i = 1; i < 16; i++) begin
      int found;
      found = 0;
      for (int j = 1; j < 16; j++) begin
        a = 4'(i); b = 4'(j); #1;
        if (y == 4'd1) found++;
      end
      checks++;
      if (found !== 1) begin failures++; $display("FAIL %0d has %0d inverses", i, found); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
