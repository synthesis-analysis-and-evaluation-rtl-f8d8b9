// control_unit: instruction decoder of the nMPRA pipeline.
//
// Shared by all semiprocessors, it turns the 32-bit instruction in the ID
// stage into the control word (ctrl_t) that steers the datapath: register
// destination, ALU operation and operand source, memory access, branch or
// jump kind, divider and HI/LO access, and the two coprocessor-2 transfers
// that talk to the nHSE scheduler (CTC2 writes an nHSE register, CFC2 reads
// one). The subset decoded is the MIPS32 integer core without multiply,
// byte/halfword memory access and exceptions; the document only names this
// unit, so the subset is this design's choice. An unrecognised instruction
// decodes as a no-operation with legal = 0. Purely combinational.
module control_unit
  import nmpra_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [5:0] op, fn;
  logic [4:0] rs_f, rt_f;
  assign op   = instr[31:26];
  assign fn   = instr[5:0];
  assign rs_f = instr[25:21];
  assign rt_f = instr[20:16];

  always_comb begin
    ctrl        = '0;
    ctrl.dst    = DST_RT;
    ctrl.alu_op = ALU_ADD;
    ctrl.branch = BR_NONE;
    unique case (op)
      OP_RTYPE: begin
        ctrl.legal     = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.dst       = DST_RD;
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
        unique case (fn)
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; ctrl.uses_rs = 1'b0; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; ctrl.uses_rs = 1'b0; end
          FN_SRA:  begin ctrl.alu_op = ALU_SRA; ctrl.uses_rs = 1'b0; end
          FN_SLLV: begin ctrl.alu_op = ALU_SLL; ctrl.shift_var = 1'b1; end
          FN_SRLV: begin ctrl.alu_op = ALU_SRL; ctrl.shift_var = 1'b1; end
          FN_SRAV: begin ctrl.alu_op = ALU_SRA; ctrl.shift_var = 1'b1; end
          FN_JR:   begin ctrl.reg_write = 1'b0; ctrl.jump_reg = 1'b1; ctrl.uses_rt = 1'b0; end
          FN_JALR: begin ctrl.jump_reg = 1'b1; ctrl.link = 1'b1; ctrl.uses_rt = 1'b0; end
          FN_MFHI: begin ctrl.mfhi = 1'b1; ctrl.uses_rs = 1'b0; ctrl.uses_rt = 1'b0; end
          FN_MFLO: begin ctrl.mflo = 1'b1; ctrl.uses_rs = 1'b0; ctrl.uses_rt = 1'b0; end
          FN_DIV:  begin ctrl.reg_write = 1'b0; ctrl.div_start = 1'b1; ctrl.div_signed = 1'b1; end
          FN_DIVU: begin ctrl.reg_write = 1'b0; ctrl.div_start = 1'b1; end
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          default: begin
            ctrl.legal = 1'b0; ctrl.reg_write = 1'b0;
            ctrl.uses_rs = 1'b0; ctrl.uses_rt = 1'b0;
          end
        endcase
      end
      OP_REGIMM: begin
        ctrl.uses_rs = 1'b1;
        if (rt_f == RI_BLTZ) begin ctrl.legal = 1'b1; ctrl.branch = BR_LTZ; end
        else if (rt_f == RI_BGEZ) begin ctrl.legal = 1'b1; ctrl.branch = BR_GEZ; end
        else ctrl.uses_rs = 1'b0;
      end
      OP_J:    begin ctrl.legal = 1'b1; ctrl.jump = 1'b1; end
      OP_JAL:  begin ctrl.legal = 1'b1; ctrl.jump = 1'b1; ctrl.link = 1'b1;
                     ctrl.reg_write = 1'b1; ctrl.dst = DST_RA; end
      OP_BEQ:  begin ctrl.legal = 1'b1; ctrl.branch = BR_EQ;  ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1; end
      OP_BNE:  begin ctrl.legal = 1'b1; ctrl.branch = BR_NE;  ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1; end
      OP_BLEZ: begin ctrl.legal = 1'b1; ctrl.branch = BR_LEZ; ctrl.uses_rs = 1'b1; end
      OP_BGTZ: begin ctrl.legal = 1'b1; ctrl.branch = BR_GTZ; ctrl.uses_rs = 1'b1; end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.legal       = 1'b1;
        ctrl.reg_write   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.uses_rs     = (op != OP_LUI);
        ctrl.imm_zext    = (op == OP_ANDI) || (op == OP_ORI) || (op == OP_XORI);
        unique case (op)
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SLTIU: ctrl.alu_op = ALU_SLTU;
          OP_ANDI:  ctrl.alu_op = ALU_AND;
          OP_ORI:   ctrl.alu_op = ALU_OR;
          OP_XORI:  ctrl.alu_op = ALU_XOR;
          OP_LUI:   ctrl.alu_op = ALU_LUI;
          default:  ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        ctrl.legal = 1'b1; ctrl.reg_write = 1'b1; ctrl.alu_src_imm = 1'b1;
        ctrl.mem_read = 1'b1; ctrl.uses_rs = 1'b1;
      end
      OP_SW: begin
        ctrl.legal = 1'b1; ctrl.alu_src_imm = 1'b1; ctrl.mem_write = 1'b1;
        ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1;
      end
      OP_COP2: begin
        if (rs_f == CO_CTC2) begin
          ctrl.legal = 1'b1; ctrl.cop2_write = 1'b1; ctrl.uses_rt = 1'b1;
        end else if (rs_f == CO_CFC2) begin
          ctrl.legal = 1'b1; ctrl.cop2_read = 1'b1; ctrl.reg_write = 1'b1;
        end
      end
      default: ;
    endcase
  end
endmodule
