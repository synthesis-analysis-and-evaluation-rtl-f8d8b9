// forward_unit: data forwarding for the nMPRA pipeline.
//
// Two operands are resolved here. In the ID stage each source register
// takes, in order of preference, the result of the MEM stage (ALU result or
// the word just loaded), the result being written back in WB, or the bank of
// the register file. In the EX stage an operand is replaced by the ALU result
// sitting in EX/MEM when that instruction writes the register; the older
// producers were already folded in while the instruction was decoded, and a
// load in EX/MEM can never feed EX because the hazard unit stalls load-use.
// Register 0 is never forwarded. Purely combinational.
module forward_unit (
  // ID-stage operand
  input  logic [4:0]  id_rs,
  input  logic [4:0]  id_rt,
  input  logic [31:0] rf_rs,
  input  logic [31:0] rf_rt,
  input  logic        mem_valid,
  input  logic        mem_reg_write,
  input  logic [4:0]  mem_dst,
  input  logic [31:0] mem_result,
  input  logic        wb_valid,
  input  logic        wb_reg_write,
  input  logic [4:0]  wb_dst,
  input  logic [31:0] wb_result,
  output logic [31:0] id_rs_val,
  output logic [31:0] id_rt_val,
  // EX-stage operand
  input  logic [4:0]  ex_rs,
  input  logic [4:0]  ex_rt,
  input  logic [31:0] ex_rs_in,
  input  logic [31:0] ex_rt_in,
  input  logic        exmem_alu_fwd,   // EX/MEM holds a non-load register write
  input  logic [4:0]  exmem_dst,
  input  logic [31:0] exmem_alu,
  output logic [31:0] ex_rs_val,
  output logic [31:0] ex_rt_val
);
  function automatic logic [31:0] pick_id(input logic [4:0] r, input logic [31:0] rf);
    if (r == 5'd0)                                         return 32'd0;
    else if (mem_valid && mem_reg_write && mem_dst == r)   return mem_result;
    else if (wb_valid && wb_reg_write && wb_dst == r)      return wb_result;
    else                                                   return rf;
  endfunction

  always_comb begin
    id_rs_val = pick_id(id_rs, rf_rs);
    id_rt_val = pick_id(id_rt, rf_rt);
    ex_rs_val = (exmem_alu_fwd && exmem_dst != 5'd0 && exmem_dst == ex_rs) ? exmem_alu : ex_rs_in;
    ex_rt_val = (exmem_alu_fwd && exmem_dst != 5'd0 && exmem_dst == ex_rt) ? exmem_alu : ex_rt_in;
  end
endmodule
