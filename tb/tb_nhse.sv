// tb_nhse: the nHSE output stage must present the decision it was given one
// clock later, and come out of reset with no sCPU enabled.
module tb_nhse;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [2:0] sel_in = 0, task_select;
  logic en_in = 0, pc_sel_in = 0, en_scpu, pc_nhse_sel;
  logic [31:0] pc_in = 0, pc_nhse_out;
  int checks = 0, failures = 0;

  nhse #(.NR_TASKS(8)) dut (.clk, .rst, .sel_in, .en_in, .pc_sel_in, .pc_in,
    .task_select, .en_scpu, .pc_nhse_sel, .pc_nhse_out);

  initial begin
    logic [2:0] s, prev_s; logic e, p; logic [31:0] a;
    sel_in = 5; en_in = 1; pc_sel_in = 1; pc_in = 32'h1234;
    @(negedge clk);
    checks++;
    if (task_select !== 0 || en_scpu !== 0 || pc_nhse_sel !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int k = 0; k < 500; k++) begin
      s = 3'($urandom); e = 1'($urandom); p = 1'($urandom); a = $urandom;
      sel_in = s; en_in = e; pc_sel_in = p; pc_in = a;
      #1;
      if (k > 0 && s != prev_s) begin
        // the new request must not be visible before the clock edge
        checks++;
        if (task_select !== prev_s) begin failures++; $display("FAIL passes through at step %0d", k); end
      end
      prev_s = s;
      @(negedge clk);
      checks++;
      if (task_select !== s || en_scpu !== e || pc_nhse_sel !== p || pc_nhse_out !== a) begin
        failures++; $display("FAIL step %0d", k);
      end
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
