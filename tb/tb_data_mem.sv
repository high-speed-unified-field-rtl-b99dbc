// tb_data_mem: reset clears every word; random writes are read back on both
// read ports against a shadow array.
module tb_data_mem;
  import crypto_pkg::*;

  logic clk = 0, rst = 1, we = 0;
  logic [ADDR_W-1:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [DATA_W-1:0] wdata = '0, rdata_a, rdata_b;
  logic [DATA_W-1:0] shadow [MEM_DEPTH];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .rst, .we, .waddr, .wdata, .raddr_a, .rdata_a, .raddr_b, .rdata_b);

  always #5 clk = ~clk;

  function automatic logic [DATA_W-1:0] rnd53();
    return {21'($urandom), 32'($urandom)};
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < MEM_DEPTH; i++) begin
      shadow[i] = '0;
      raddr_a = ADDR_W'(i);
      raddr_b = ADDR_W'(MEM_DEPTH - 1 - i);
      #1;
      checks++;
      if (rdata_a !== '0 || rdata_b !== '0) begin failures++; $display("FAIL reset word %0d", i); end
    end
    for (int i = 0; i < 500; i++) begin
      we    = ($urandom % 3) !== 0;
      waddr = ADDR_W'($urandom);
      wdata = rnd53();
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      we = 0;
      raddr_a = ADDR_W'($urandom);
      raddr_b = ADDR_W'($urandom);
      #1;
      checks++;
      if (rdata_a !== shadow[raddr_a] || rdata_b !== shadow[raddr_b]) begin
        failures++;
        $display("FAIL read %0d/%0d", raddr_a, raddr_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
