// tb_instr_mem: loads a pattern through the load port and reads it back
// through the fetch address, including the wrap of addresses beyond the
// 4096-word size.
module tb_instr_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] addr = 0, instr, load_addr = 0, load_data = 0;
  logic load_we = 0;
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .addr, .instr, .load_we, .load_addr, .load_data);

  function automatic logic [31:0] pat(int i); return 32'(i) * 32'h9E37_79B9 ^ 32'h48C1_0000; endfunction

  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); load_we = 1; load_addr = 32'(i) * 4; load_data = pat(i);
    end
    @(negedge clk); load_we = 0;
    for (int k = 0; k < 2000; k++) begin
      int i; i = $urandom_range(0, 4095);
      addr = 32'(i) * 4 + (k[0] ? 32'h4000 : 0); #1;
      checks++;
      if (instr !== pat(i)) begin failures++; $display("FAIL word %0d: %h", i, instr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
