// tb_nhse_prio_enc: random and directed test of the nHSE priority encoder
// (8 requests, 8-bit priorities). A reference loop in the bench finds the
// highest priority active request, lowest index on ties, and compares it
// with the block's index, valid flag and winning priority.
module tb_nhse_prio_enc;
  localparam int N = 8, PW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req;
  logic [N-1:0][PW-1:0] prio;
  logic valid;
  logic [2:0] idx;
  logic [PW-1:0] best_prio;
  int checks = 0, failures = 0;

  nhse_prio_enc #(.N(N), .PW(PW)) dut (.req, .prio, .valid, .idx, .best_prio);

  task automatic run_one();
    int ref_i; logic [PW-1:0] ref_p;
    ref_i = -1; ref_p = 0;
    for (int i = 0; i < N; i++)
      if (req[i] && (ref_i < 0 || prio[i] > ref_p)) begin ref_i = i; ref_p = prio[i]; end
    #1;
    checks++;
    if (valid !== (ref_i >= 0) || (ref_i >= 0 && (idx !== 3'(ref_i) || best_prio !== ref_p))) begin
      failures++;
      $display("FAIL req=%b valid=%0d idx=%0d exp %0d", req, valid, idx, ref_i);
    end
  endtask

  initial begin
    req = '0; prio = '0; run_one();                       // nothing requested
    req = 8'b1010_0000; prio = '0; run_one();              // tie -> lowest index (5)
    for (int i = 0; i < N; i++) prio[i] = PW'(i);
    req = '1; run_one();                                  // highest index has highest priority
    for (int k = 0; k < 2000; k++) begin
      req = N'($urandom);
      for (int i = 0; i < N; i++) prio[i] = PW'($urandom_range(0, 7)); // many ties
      run_one();
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
