// tb_cond_test_unit: checks the six branch condition flags against signed
// comparisons computed in the bench, for corner values and random operands.
module tb_cond_test_unit;
  import nmpra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] a, b;
  cond_t cond;
  int checks = 0, failures = 0;

  cond_test_unit dut (.operand_a(a), .operand_b(b), .cond);

  task automatic run_one();
    cond_t e;
    e.eq = (a == b); e.zero_a = (a == 0);
    e.gz = $signed(a) > 0; e.lz = $signed(a) < 0;
    e.gez = $signed(a) >= 0; e.lez = $signed(a) <= 0;
    #1;
    checks++;
    if (cond !== e) begin failures++; $display("FAIL a=%h b=%h got %b exp %b", a, b, cond, e); end
  endtask

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_1011};
    foreach (corners[i]) foreach (corners[j]) begin a = corners[i]; b = corners[j]; run_one(); end
    for (int k = 0; k < 2000; k++) begin
      a = $urandom; b = ($urandom_range(0, 3) == 0) ? a : $urandom; run_one();
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
