// alu: the arithmetic logic unit shared by all semiprocessors.
//
// One combinational unit computes add, subtract, the logic operations,
// signed and unsigned set-less-than, the three shifts and load-upper-
// immediate for whichever sCPU owns the execute stage in the current cycle.
// Like MIPS32 without exceptions, add and sub wrap (overflow is not trapped,
// since the exception coprocessor is not part of this design). The shift
// amount is the low five bits of operand A.
module alu
  import nmpra_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = $unsigned($signed(b) >>> a[4:0]);
      ALU_LUI:  y = {b[15:0], 16'd0};
      default:  y = 32'd0;
    endcase
  end
endmodule
