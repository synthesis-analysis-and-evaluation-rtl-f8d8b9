// tb_forward_unit: directed cases for the ID-stage operand selection
// (MEM result over WB result over register file, never for r0) and the
// EX-stage bypass from EX/MEM.
module tb_forward_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] id_rs, id_rt, mem_dst, wb_dst, ex_rs, ex_rt, exmem_dst;
  logic [31:0] rf_rs, rf_rt, mem_result, wb_result, ex_rs_in, ex_rt_in, exmem_alu;
  logic mem_valid, mem_reg_write, wb_valid, wb_reg_write, exmem_alu_fwd;
  logic [31:0] id_rs_val, id_rt_val, ex_rs_val, ex_rt_val;
  int checks = 0, failures = 0;

  forward_unit dut (.*);

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    rf_rs = 32'hAAAA_0001; rf_rt = 32'hAAAA_0002; mem_result = 32'hBBBB_0000; wb_result = 32'hCCCC_0000;
    ex_rs_in = 32'h1111_0000; ex_rt_in = 32'h2222_0000; exmem_alu = 32'hDDDD_0000;
    id_rs = 4; id_rt = 5; mem_dst = 4; wb_dst = 5; mem_valid = 1; mem_reg_write = 1; wb_valid = 1; wb_reg_write = 1;
    ex_rs = 6; ex_rt = 7; exmem_dst = 7; exmem_alu_fwd = 1;
    #1;
    chk("rs from MEM", id_rs_val, mem_result);
    chk("rt from WB", id_rt_val, wb_result);
    chk("ex rs not forwarded", ex_rs_val, ex_rs_in);
    chk("ex rt from EX/MEM", ex_rt_val, exmem_alu);
    wb_dst = 4; #1;
    chk("MEM over WB", id_rs_val, mem_result);
    chk("rt from RF", id_rt_val, rf_rt);
    mem_valid = 0; #1;
    chk("WB when MEM invalid", id_rs_val, wb_result);
    wb_reg_write = 0; #1;
    chk("RF when no writer", id_rs_val, rf_rs);
    id_rs = 0; mem_dst = 0; mem_valid = 1; #1;
    chk("r0 is zero", id_rs_val, 32'd0);
    exmem_alu_fwd = 0; #1;
    chk("no EX bypass for load", ex_rt_val, ex_rt_in);
    exmem_alu_fwd = 1; ex_rs = 0; ex_rt = 0; exmem_dst = 0; #1;
    chk("no EX bypass for r0", ex_rs_val, ex_rs_in);
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
