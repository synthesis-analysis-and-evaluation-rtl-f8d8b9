// tb_alu: every ALU operation with corner and random operands, compared with
// results computed by the bench.
module tb_alu;
  import nmpra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  alu_op_e op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return ($signed(x) < $signed(z)) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0;
      ALU_SLL:  return z << x[4:0];
      ALU_SRL:  return z >> x[4:0];
      ALU_SRA:  return $unsigned($signed(z) >>> x[4:0]);
      ALU_LUI:  return {z[15:0], 16'h0};
      default:  return 0;
    endcase
  endfunction

  initial begin
    alu_op_e ops [12] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
                          ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI};
    // a few hand-worked values
    op = ALU_ADD; a = 32'h0000_0000; b = 32'h0000_0011; #1; checks++; if (y !== 32'h11) failures++;
    op = ALU_SLT; a = 32'hFFFF_FFFF; b = 32'h1; #1; checks++; if (y !== 32'h1) failures++;
    op = ALU_SLTU; #1; checks++; if (y !== 32'h0) failures++;
    op = ALU_SRA; a = 32'd4; b = 32'h8000_0000; #1; checks++; if (y !== 32'hF800_0000) failures++;
    op = ALU_LUI; b = 32'h0000_1234; #1; checks++; if (y !== 32'h1234_0000) failures++;
    for (int k = 0; k < 3000; k++) begin
      op = ops[$urandom_range(0, 11)]; a = $urandom; b = $urandom;
      #1; checks++;
      if (y !== model(op, a, b)) begin failures++; $display("FAIL op=%s a=%h b=%h y=%h", op.name(), a, b, y); end
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
