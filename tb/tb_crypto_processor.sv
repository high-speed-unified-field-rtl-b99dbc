// tb_crypto_processor: end-to-end test of the crypto processor at its default
// sizes (no parameter is overridden). Operands are written into the data
// memory through the user port, opcodes are issued with `start`, and data_out
// is compared after `done` with results worked out here. It runs the published
// examples (opcode 0: 1 + 1000 = 1001; opcode 19: 1 * 8 = 8 in GF(2^4)), every
// opcode on random operands, the Montgomery product checked by its defining
// congruence, LOAD followed by STORE, and the cycle count of each class. It
// also makes sure a `start` and a user write while busy are ignored. Each of
// these mechanisms is counted; one that never happened counts as a failure.
module tb_crypto_processor;
  import crypto_pkg::*;

  localparam longint unsigned MASK = (64'd1 << DATA_W) - 1;

  logic clk = 0, rst = 1, start = 0, in_we = 0, busy, done;
  logic [OPC_W-1:0]  opcode = '0;
  logic [ADDR_W-1:0] in_addr = '0;
  logic [DATA_W-1:0] in_data = '0, data_out;
  int checks = 0, failures = 0;

  // shadow copy of the operand words
  logic [DATA_W-1:0] A, B, C, D, P1, P2;

  // mechanism counters
  int n_general = 0, n_load = 0, n_store = 0, n_nop = 0, n_prime = 0, n_mont = 0,
      n_binary = 0, n_start_ignored = 0, n_write_ignored = 0, n_user_write = 0;

  crypto_processor dut (.clk, .rst, .start, .opcode, .in_we, .in_addr, .in_data,
                        .data_out, .busy, .done);

  always #10 clk = ~clk;   // 20 ns clock period

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

  function automatic logic [DATA_W-1:0] general_ref(int k, logic [DATA_W-1:0] x, logic [DATA_W-1:0] z);
    longint unsigned r, s;
    case (k)
      0: r = 64'(x) + 64'(z);
      1: r = 64'(x) - 64'(z);
      2: r = 64'(x) * 64'(z);
      3: r = (z == 0) ? MASK : 64'(x) / 64'(z);
      4: r = 64'(x & z);
      5: r = 64'(x | z);
      6: r = 64'(x ^ z);
      7: r = (64'(z) >= 64'(DATA_W)) ? 0 : 64'(x) >> z;
      8: r = (64'(z) >= 64'(DATA_W)) ? 0 : 64'(x) << z;
      9, 10: begin
        s = 64'(z) % 64'(DATA_W);
        if (k == 10) s = (64'(DATA_W) - s) % 64'(DATA_W);
        r = 0;
        for (int i = 0; i < DATA_W; i++) if (x[6'((64'(i) + s) % 64'(DATA_W))]) r[i] = 1'b1;
      end
      default: r = 0;
    endcase
    return DATA_W'(r & MASK);
  endfunction

  task automatic user_write(int addr, logic [DATA_W-1:0] value);
    @(negedge clk);
    in_we = 1; in_addr = ADDR_W'(addr); in_data = value;
    @(negedge clk);
    in_we = 0;
    n_user_write++;
  endtask

  task automatic set_operands(logic [DATA_W-1:0] a, b, c, d, p1, p2);
    A = a; B = b; C = c; D = d; P1 = p1; P2 = p2;
    user_write(0, a); user_write(1, b); user_write(2, c);
    user_write(3, d); user_write(4, p1); user_write(5, p2);
  endtask

  // Issue one opcode; returns the clock edges from the start edge to done.
  task automatic exec(int opc, output int cycles);
    @(negedge clk);
    opcode = OPC_W'(opc); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic expect_result(string what, logic [DATA_W-1:0] value);
    checks++;
    if (data_out !== value) begin
      failures++;
      $display("FAIL %s: data_out=%0d expected %0d", what, data_out, value);
    end
  endtask

  task automatic expect_cycles(string what, int got, int want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [255:0] lhs, rhs;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // published example: opcode 0 adds data1 = 1 and data2 = 1000
    set_operands(53'd1, 53'd1000, 0, 0, 53'd13, 0);
    exec(0, cyc);
    expect_result("1 + 1000", 53'd1001);
    expect_cycles("general", cyc, 5);
    n_general++;

    // published example: opcode 19 multiplies 1 and 8 in GF(2^m)
    set_operands(53'd1, 53'd8, 0, 0, 53'd13, 0);
    exec(19, cyc);
    expect_result("GF 1 * 8", 53'd8);
    expect_cycles("binary field", cyc, 6);
    n_binary++;

    for (int round = 0; round < 12; round++) begin
      logic [DATA_W-1:0] m;
      m = rnd(43) | 53'd1;
      if (m < 3) m = 53'd3;
      set_operands(rnd(53) % m, rnd(53) % m, rnd(53) % m, rnd(53) % m, m, inv_pow2(m, 8));

      for (int k = 0; k <= 10; k++) begin
        exec(k, cyc);
        expect_result($sformatf("opcode %0d", k), general_ref(k, A, B));
        expect_cycles("general", cyc, 5);
        n_general++;
      end
      // shift and rotate by small amounts too
      user_write(1, rnd(6));
      B = dut.u_dmem.mem[1];
      for (int k = 7; k <= 10; k++) begin
        exec(k, cyc);
        expect_result($sformatf("opcode %0d small shift", k), general_ref(k, A, B));
        n_general++;
      end
      user_write(1, rnd(53) % m);
      B = dut.u_dmem.mem[1];

      // LOAD A into the temporary register, then STORE it at word 10
      exec(11, cyc);
      expect_result("load", A);
      expect_cycles("load", cyc, 4);
      n_load++;
      exec(12, cyc);
      expect_result("store", A);
      expect_cycles("store", cyc, 3);
      n_store++;

      exec(13 + round % 2, cyc);
      expect_cycles("no-operation", cyc, 2);
      n_nop++;

      exec(15, cyc);
      expect_result("mod add", DATA_W'((256'(A) + 256'(B)) % 256'(P1)));
      expect_cycles("mod add", cyc, 62);
      exec(16, cyc);
      expect_result("mod sub", DATA_W'((256'(A) + 256'(P1) - 256'(B)) % 256'(P1)));
      expect_cycles("mod sub", cyc, 62);
      exec(17, cyc);
      expect_result("mod mul", DATA_W'((256'(A) * 256'(B)) % 256'(P1)));
      expect_cycles("mod mul", cyc, 114);
      n_prime += 3;

      exec(18, cyc);
      lhs = (256'(data_out) << 48) % 256'(P1);
      rhs = (256'(A) * B + 256'(C) * D) % 256'(P1);
      checks++;
      if (lhs !== rhs) begin failures++; $display("FAIL Montgomery congruence"); end
      expect_cycles("Montgomery", cyc, 17);
      n_mont++;

      exec(19, cyc);
      expect_result("GF multiply", DATA_W'(gf_ref(A[3:0], B[3:0])));
      n_binary++;
    end

    // a start and a user write while busy are ignored
    @(negedge clk);
    opcode = 5'd17; start = 1;
    @(negedge clk);
    start = 0;
    repeat (5) @(negedge clk);
    opcode = 5'd0; start = 1; in_we = 1; in_addr = 4'd0; in_data = 53'd12345;
    @(negedge clk);
    start = 0; in_we = 0;
    n_start_ignored++;
    n_write_ignored++;
    while (!done) @(negedge clk);
    expect_result("mod mul with start while busy", DATA_W'((256'(A) * 256'(B)) % 256'(P1)));
    checks++;
    if (dut.u_dmem.mem[0] !== A) begin failures++; $display("FAIL write while busy landed"); end
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL a start while busy was queued"); end

    // every mechanism must have happened at least once
    if (n_general == 0)       begin failures++; $display("FAIL no general instruction"); end
    if (n_load == 0)          begin failures++; $display("FAIL no load"); end
    if (n_store == 0)         begin failures++; $display("FAIL no store"); end
    if (n_nop == 0)           begin failures++; $display("FAIL no no-operation"); end
    if (n_prime == 0)         begin failures++; $display("FAIL no prime-field instruction"); end
    if (n_mont == 0)          begin failures++; $display("FAIL no Montgomery instruction"); end
    if (n_binary == 0)        begin failures++; $display("FAIL no binary-field instruction"); end
    if (n_user_write == 0)    begin failures++; $display("FAIL no user write"); end
    if (n_start_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    if (n_write_ignored == 0) begin failures++; $display("FAIL no ignored write"); end
    $display("mechanisms: general=%0d load=%0d store=%0d nop=%0d prime=%0d montgomery=%0d binary=%0d user_writes=%0d ignored_starts=%0d ignored_writes=%0d",
             n_general, n_load, n_store, n_nop, n_prime, n_mont, n_binary, n_user_write,
             n_start_ignored, n_write_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
