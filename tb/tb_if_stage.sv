// tb_if_stage: checks the multiplied program counters of the fetch stage:
// reset start addresses (i * 0x400), independent sequential advance per sCPU,
// a frozen sCPU keeping its PC, the precedence of the PC multiplexers
// (stored PC < ID target < exception PC < PC_nHSE) and the write-back of
// the chosen address plus 4.
module tb_if_stage;
  localparam int NT = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [2:0] task_sel = 0;
  logic advance = 0, pc_src = 0, exception_sel = 0, pc_nhse_sel = 0;
  logic [31:0] id_target = 32'h100, exception_pc = 32'h200, pc_nhse_out = 32'h300;
  logic [31:0] fetch_pc, fetch_pc_plus4;
  int checks = 0, failures = 0;

  if_stage #(.NR_TASKS(NT)) dut (.clk, .rst, .task_sel, .advance, .pc_src, .id_target,
    .exception_sel, .exception_pc, .pc_nhse_sel, .pc_nhse_out, .fetch_pc, .fetch_pc_plus4);

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    for (int t = 0; t < NT; t++) begin task_sel = 3'(t); #1; chk("reset pc", fetch_pc, 32'(t) * 32'h400); end
    // sCPU3 advances 5 times
    @(negedge clk); task_sel = 3; advance = 1;
    repeat (5) @(negedge clk);
    chk("sCPU3 after 5", fetch_pc, 32'hC00 + 20);
    chk("plus4", fetch_pc_plus4, 32'hC00 + 24);
    advance = 0; task_sel = 2; #1;
    chk("sCPU2 untouched", fetch_pc, 32'h800);
    pc_src = 1; #1; chk("ID target", fetch_pc, 32'h100);
    exception_sel = 1; #1; chk("exception over target", fetch_pc, 32'h200);
    pc_nhse_sel = 1; #1; chk("PC_nHSE over exception", fetch_pc, 32'h300);
    advance = 1; @(negedge clk); advance = 0; pc_nhse_sel = 0; exception_sel = 0; pc_src = 0; #1;
    chk("sCPU2 continues after PC_nHSE", fetch_pc, 32'h304);
    task_sel = 3; #1; chk("sCPU3 kept", fetch_pc, 32'hC14);
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
