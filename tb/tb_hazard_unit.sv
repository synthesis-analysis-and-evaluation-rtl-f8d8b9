// tb_hazard_unit: directed cases for each stall condition (load-use,
// branch operand produced in EX, CTC2 operand produced in EX, HI/LO access
// while the divider is busy) and for the cases that must not stall (register
// 0, a load feeding an instruction two slots later, an invalid EX slot).
module tb_hazard_unit;
  import nmpra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  ctrl_t id_ctrl;
  logic [4:0] id_rs, id_rt, ex_dst;
  logic ex_valid, ex_reg_write, ex_mem_read, div_busy;
  logic stall, s_lu, s_br, s_hilo;
  int checks = 0, failures = 0;

  hazard_unit dut (.id_ctrl, .id_rs, .id_rt, .ex_valid, .ex_reg_write, .ex_mem_read, .ex_dst,
                   .div_busy, .stall, .stall_load_use(s_lu), .stall_branch(s_br), .stall_hilo(s_hilo));

  task automatic expect_(string what, logic e_stall, logic e_lu, logic e_br, logic e_hilo);
    #1; checks++;
    if ({stall, s_lu, s_br, s_hilo} !== {e_stall, e_lu, e_br, e_hilo}) begin
      failures++; $display("FAIL %s: got %b%b%b%b", what, stall, s_lu, s_br, s_hilo);
    end
  endtask

  task automatic base();
    id_ctrl = '0; id_ctrl.branch = BR_NONE; id_ctrl.dst = DST_RT; id_ctrl.alu_op = ALU_ADD;
    id_rs = 5'd2; id_rt = 5'd3; ex_dst = 5'd2;
    ex_valid = 1; ex_reg_write = 1; ex_mem_read = 0; div_busy = 0;
  endtask

  initial begin
    base(); id_ctrl.uses_rs = 1;                       expect_("alu after alu: forwarded", 0, 0, 0, 0);
    base(); id_ctrl.uses_rs = 1; ex_mem_read = 1;      expect_("load-use rs", 1, 1, 0, 0);
    base(); id_ctrl.uses_rt = 1; ex_dst = 3; ex_mem_read = 1; expect_("load-use rt", 1, 1, 0, 0);
    base(); id_ctrl.uses_rs = 1; ex_mem_read = 1; ex_valid = 0; expect_("invalid EX", 0, 0, 0, 0);
    base(); id_ctrl.uses_rs = 1; ex_mem_read = 1; ex_dst = 5; expect_("other register", 0, 0, 0, 0);
    base(); id_ctrl.uses_rs = 1; ex_mem_read = 1; id_rs = 0; ex_dst = 0; expect_("r0", 0, 0, 0, 0);
    base(); id_ctrl.uses_rs = 1; id_ctrl.uses_rt = 1; id_ctrl.branch = BR_NE; expect_("branch operand", 1, 0, 1, 0);
    base(); id_ctrl.uses_rt = 1; id_ctrl.cop2_write = 1; ex_dst = 3; expect_("ctc2 operand", 1, 0, 1, 0);
    base(); id_ctrl.uses_rs = 1; id_ctrl.jump_reg = 1; ex_reg_write = 0; expect_("jr, EX not writing", 0, 0, 0, 0);
    base(); id_ctrl.mflo = 1; div_busy = 1; ex_valid = 0; expect_("mflo busy", 1, 0, 0, 1);
    base(); id_ctrl.mfhi = 1; div_busy = 0; ex_valid = 0; expect_("mfhi idle", 0, 0, 0, 0);
    base(); id_ctrl.div_start = 1; id_ctrl.uses_rs = 1; id_ctrl.uses_rt = 1; div_busy = 1; ex_dst = 9; expect_("div busy", 1, 0, 0, 1);
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
