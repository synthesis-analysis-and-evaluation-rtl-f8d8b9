// tb_data_mem: random word writes and reads against a model, checking that
// a read in the cycle of a write returns the old word and the new one after
// the edge.
module tb_data_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic we = 0;
  logic [31:0] model [int];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .addr, .we, .wdata, .rdata);

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; addr = 32'(i) * 4; wdata = ~32'(i); model[i] = wdata;
    end
    for (int k = 0; k < 3000; k++) begin
      int i; i = $urandom_range(0, 63);
      @(negedge clk); we = 1'($urandom_range(0, 1)); addr = 32'(i) * 4; wdata = $urandom; #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL word %0d: %h exp %h", i, rdata, model[i]); end
      if (we) model[i] = wdata;
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
