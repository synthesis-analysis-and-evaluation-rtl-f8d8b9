// cond_test_unit: branch condition test unit of the ID stage.
//
// It compares the two 32-bit operands read (and forwarded) in the decode
// stage and produces the condition flags the control logic uses to resolve
// a branch there: A == B, A > 0, A < 0, A >= 0, A <= 0 (signed) and A == 0.
// The flag names follow the signals shown for this unit in the processor's
// simulation (bit_EQ, bit_GZ, bit_LZ, bit_GEZ, bit_LEZ, ZeroA); the unit is
// purely combinational, so a branch is decided in the same cycle it decodes.
module cond_test_unit
  import nmpra_pkg::*;
(
  input  logic [31:0] operand_a,
  input  logic [31:0] operand_b,
  output cond_t       cond
);
  always_comb begin
    cond.eq     = (operand_a == operand_b);
    cond.zero_a = (operand_a == 32'd0);
    cond.lz     = operand_a[31];
    cond.gez    = !operand_a[31];
    cond.gz     = !operand_a[31] && !cond.zero_a;
    cond.lez    = operand_a[31] || cond.zero_a;
  end
endmodule
