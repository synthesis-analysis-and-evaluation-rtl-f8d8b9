// hazard_unit: stall detection for the instruction in the ID stage.
//
// Branches, jump-register, CTC2 (whose data goes to the nHSE in ID) and the
// divider start all consume their register operands in the decode stage.
// The unit stalls decode for one cycle when
//   * the instruction in EX is a load whose destination ID reads (load-use),
//   * the instruction in EX writes a register that ID consumes in ID itself
//     (its ALU result does not exist yet), or
//   * the instruction reads or rewrites HI/LO (mfhi, mflo, div) while this
//     semiprocessor's divider is still busy, as the document requires.
// Values from the MEM and WB stages are forwarded to ID instead of stalling.
// The inputs are the current sCPU's pipeline registers; the unit is
// combinational.
module hazard_unit
  import nmpra_pkg::*;
(
  input  ctrl_t      id_ctrl,
  input  logic [4:0] id_rs,
  input  logic [4:0] id_rt,
  input  logic       ex_valid,
  input  logic       ex_reg_write,
  input  logic       ex_mem_read,
  input  logic [4:0] ex_dst,
  input  logic       div_busy,
  output logic       stall,
  output logic       stall_load_use,
  output logic       stall_branch,
  output logic       stall_hilo
);
  logic rs_hit, rt_hit, early_use;
  always_comb begin
    rs_hit    = id_ctrl.uses_rs && ex_valid && ex_reg_write && (ex_dst != 5'd0) && (ex_dst == id_rs);
    rt_hit    = id_ctrl.uses_rt && ex_valid && ex_reg_write && (ex_dst != 5'd0) && (ex_dst == id_rt);
    early_use = (id_ctrl.branch != BR_NONE) || id_ctrl.jump_reg || id_ctrl.cop2_write || id_ctrl.div_start;
    stall_load_use = ex_mem_read && (rs_hit || rt_hit);
    stall_branch   = early_use && (rs_hit || rt_hit) && !ex_mem_read;
    stall_hilo     = div_busy && (id_ctrl.mfhi || id_ctrl.mflo || id_ctrl.div_start);
    stall          = stall_load_use || stall_branch || stall_hilo;
  end
endmodule
