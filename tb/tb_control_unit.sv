// tb_control_unit: decodes one instruction of each kind the pipeline supports
// (including the CTC2 "wait" word 0x48C10000 and a CFC2) and compares the
// fields of the control word with the values expected from the MIPS32
// encoding; also checks that an unknown opcode is not legal and writes
// nothing.
module tb_control_unit;
  import nmpra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.instr, .ctrl);

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s (%h): got %b", what, instr, got); end
  endtask

  initial begin
    instr = 32'h2001_0011; #1;                       // addi r1, r0, 0x11
    chk("addi legal", ctrl.legal, 1); chk("addi wr", ctrl.reg_write, 1);
    chk("addi imm", ctrl.alu_src_imm, 1); chk("addi dst rt", ctrl.dst == DST_RT, 1);
    chk("addi sext", ctrl.imm_zext, 0); chk("addi add", ctrl.alu_op == ALU_ADD, 1);
    instr = 32'h48C1_0000; #1;                       // ctc2 r1, crTR  ("wait r1")
    chk("ctc2", ctrl.cop2_write, 1); chk("ctc2 rt", ctrl.uses_rt, 1); chk("ctc2 nowr", ctrl.reg_write, 0);
    instr = {OP_COP2, CO_CFC2, 5'd3, 5'd1, 11'd0}; #1;
    chk("cfc2", ctrl.cop2_read, 1); chk("cfc2 wr", ctrl.reg_write, 1); chk("cfc2 dst", ctrl.dst == DST_RT, 1);
    instr = {6'h0, 5'd2, 5'd2, 5'd3, 5'd0, FN_SUB}; #1;
    chk("sub", ctrl.alu_op == ALU_SUB, 1); chk("sub dst", ctrl.dst == DST_RD, 1); chk("sub rs", ctrl.uses_rs, 1);
    instr = {6'h0, 5'd0, 5'd2, 5'd3, 5'd4, FN_SRA}; #1;
    chk("sra", ctrl.alu_op == ALU_SRA, 1); chk("sra no rs", ctrl.uses_rs, 0); chk("sra shamt", ctrl.shift_var, 0);
    instr = {6'h0, 5'd5, 5'd2, 5'd3, 5'd0, FN_SLLV}; #1;
    chk("sllv", ctrl.shift_var, 1);
    instr = {OP_LW, 5'd0, 5'd4, 16'h100}; #1;
    chk("lw", ctrl.mem_read, 1); chk("lw wr", ctrl.reg_write, 1);
    instr = {OP_SW, 5'd0, 5'd4, 16'h100}; #1;
    chk("sw", ctrl.mem_write, 1); chk("sw nowr", ctrl.reg_write, 0); chk("sw rt", ctrl.uses_rt, 1);
    instr = {OP_BNE, 5'd1, 5'd2, 16'hFFFE}; #1;
    chk("bne", ctrl.branch == BR_NE, 1);
    instr = {OP_REGIMM, 5'd1, RI_BGEZ, 16'h4}; #1;
    chk("bgez", ctrl.branch == BR_GEZ, 1);
    instr = {OP_REGIMM, 5'd1, RI_BLTZ, 16'h4}; #1;
    chk("bltz", ctrl.branch == BR_LTZ, 1);
    instr = {OP_BLEZ, 5'd1, 5'd0, 16'h4}; #1;
    chk("blez", ctrl.branch == BR_LEZ, 1);
    instr = {OP_BGTZ, 5'd1, 5'd0, 16'h4}; #1;
    chk("bgtz", ctrl.branch == BR_GTZ, 1);
    instr = {OP_JAL, 26'h32}; #1;
    chk("jal", ctrl.jump, 1); chk("jal link", ctrl.link, 1); chk("jal ra", ctrl.dst == DST_RA, 1);
    instr = {6'h0, 5'd31, 15'd0, FN_JR}; #1;
    chk("jr", ctrl.jump_reg, 1); chk("jr nowr", ctrl.reg_write, 0);
    instr = {6'h0, 5'd6, 5'd7, 10'd0, FN_DIV}; #1;
    chk("div", ctrl.div_start, 1); chk("div signed", ctrl.div_signed, 1);
    instr = {6'h0, 5'd6, 5'd7, 10'd0, FN_DIVU}; #1;
    chk("divu", ctrl.div_start, 1); chk("divu unsigned", ctrl.div_signed, 0);
    instr = {6'h0, 10'd0, 5'd8, 5'd0, FN_MFLO}; #1;
    chk("mflo", ctrl.mflo, 1); chk("mflo wr", ctrl.reg_write, 1);
    instr = {OP_ORI, 5'd1, 5'd1, 16'h8000}; #1;
    chk("ori zext", ctrl.imm_zext, 1); chk("ori or", ctrl.alu_op == ALU_OR, 1);
    instr = {OP_LUI, 5'd0, 5'd1, 16'h1}; #1;
    chk("lui", ctrl.alu_op == ALU_LUI, 1); chk("lui no rs", ctrl.uses_rs, 0);
    instr = {6'h3F, 26'h0}; #1;
    chk("illegal", ctrl.legal, 0); chk("illegal nowr", ctrl.reg_write, 0);
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
