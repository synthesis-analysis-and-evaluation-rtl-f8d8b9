// tb_gpr_bank: random writes and reads across all 8 banks against a model
// array in the bench, checking bank isolation, both read ports, register 0
// reading as zero and the reset clear.
module tb_gpr_bank;
  localparam int NT = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [2:0] bank_sel = 0;
  logic [4:0] r1 = 0, r2 = 0, wr = 0;
  logic [31:0] d1, d2, wd = 0;
  logic we = 0;
  logic [31:0] model [NT][32];
  int checks = 0, failures = 0;

  gpr_bank #(.NR_TASKS(NT)) dut (.clk, .rst, .bank_sel, .read_reg1_rs(r1), .read_reg2_rt(r2),
    .read_data1_rs(d1), .read_data2_rt(d2), .reg_write(we), .write_reg_rtrd(wr), .write_data_wb(wd));

  initial begin
    foreach (model[t, r]) model[t][r] = 0;
    @(negedge clk); rst = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      // check two random reads in the current bank
      bank_sel = 3'($urandom_range(0, NT-1)); r1 = 5'($urandom); r2 = 5'($urandom); #1;
      checks++;
      if (d1 !== model[bank_sel][r1] || d2 !== model[bank_sel][r2]) begin
        failures++; $display("FAIL bank %0d r%0d=%h r%0d=%h", bank_sel, r1, d1, r2, d2);
      end
      // and one random write
      we = 1'($urandom_range(0, 1)); wr = 5'($urandom); wd = $urandom;
      if (we && wr != 0) model[bank_sel][wr] = wd;
      @(posedge clk); #1 we = 0;
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
