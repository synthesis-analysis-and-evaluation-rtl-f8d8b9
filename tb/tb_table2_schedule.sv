// tb_table2_schedule: runs a three-task real-time task set through the nHSE
// scheduler (register_file_nhse followed by the nhse output stage) under the
// three scheduling models the scheduler supports, and checks the schedule
// against an independent model of each policy.
//
// Task set (C_i, T_i, D_i in time units), priorities by deadline-monotonic
// order, tau1 > tau2 > tau3, placed on sCPU0, sCPU1 and sCPU2:
//   tau1: C=2 T=7  D=6      tau2: C=3 T=12 D=10     tau3: C=7 T=22 D=17
// One time unit is U clock cycles. The bench stands in for the processor:
// in each cycle where the nHSE lets the selected sCPU issue, that sCPU's task
// executes one cycle. A task first programs its own crPM (preemption mode),
// then executes "wait" (a CTC2 to crTR validating the time event); from then
// on every job runs C_i*U - SLACK cycles, the last being the "wait" that
// ends it. The slack keeps each job inside its WCET once the few cycles the
// scheduler needs per switch are added; without it, jobs that the task-set
// analysis has ending exactly at another task's release would end just
// after it.
// Releases are one-cycle pulses on each sCPU's time-event line, all tasks
// released together at t=0.
// Modes:
//   0  fully preemptive: a released higher-priority task takes over at once;
//      tau3 misses its deadline (it finishes at t=19, after D=17);
//   1  deferred preemption, activation-triggered, q3 = 2 units (2*U cycles in
//      crPM2): every task meets its deadline;
//   2  task splitting: tau3 runs non-preemptively as two subjobs of 5 and 2
//      units, with a preemption point (CTC2 to the PP register) between
//      them: every task meets its deadline.
// Checks per mode: the running task in the middle of each of the first 22
// units equals the reference schedule, each job's completion cycle lies
// within TOL cycles of the reference completion time, and tau3's deadline is
// met or missed as the reference says. The reference works in whole time
// units; a release that coincides with a completion is seen after the
// scheduler has already picked the next task, as the scheduler does (it
// needs two cycles to latch and validate an event).
module tb_table2_schedule;
  import nmpra_pkg::*;
  localparam int NT  = 8;
  localparam int U   = 64;    // clock cycles per time unit
  localparam int TOL = 8;     // allowed lag of a completion, in cycles
  localparam int HOR = 24;    // simulated horizon, in time units
  localparam int T0  = 64;    // cycle of the first release
  localparam int SLACK = 2;   // a job runs C_i*U - SLACK cycles (within its WCET)

  localparam int C [3] = '{2, 3, 7};
  localparam int T [3] = '{7, 12, 22};
  localparam int D [3] = '{6, 10, 17};
  localparam int SPLIT = 5;   // tau3's first subjob in mode 2
  localparam int Q3    = 2;   // tau3's deferred-preemption interval in mode 1

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [2:0]  next_sel, task_select;
  logic        next_en, en_scpu;
  logic        c2_we;
  logic [4:0]  c2_reg;
  logic [31:0] c2_wdata, c2_rdata, pc_nhse_out, pcn_out, grssf;
  logic        pc_nhse_sel, pcn_sel, fetch_ok, run_ok, preempt, defer_active, pp_switch;
  logic [NT-1:0] wait_exec;
  logic [NT-1:0][NR_EVENTS-1:0] ev_in;

  register_file_nhse u_rf (
    .clk, .rst,
    .cur_sel(task_select), .cur_en(en_scpu), .cur_busy(1'b0),
    .c2_we, .c2_reg, .c2_target(8'd0), .c2_wdata, .c2_rdata,
    .ext_int('0), .ev_in,
    .next_sel, .next_en, .pc_nhse_sel, .pc_nhse_out,
    .fetch_ok, .run_ok, .grssf, .preempt, .defer_active, .pp_switch, .wait_exec
  );
  nhse u_nhse (
    .clk, .rst,
    .sel_in(next_sel), .en_in(next_en), .pc_sel_in(pc_nhse_sel), .pc_in(pc_nhse_out),
    .task_select, .en_scpu, .pc_nhse_sel(pcn_sel), .pc_nhse_out(pcn_out)
  );

  int checks = 0, failures = 0;
  int mode;
  int cyc;                       // cycles since reset
  int setup_step [3];            // progress through the task's set-up code
  int job_cyc [3];               // cycles executed by the current job
  int job_no [3];                // completed jobs
  int fin_cyc [3][4];            // completion cycle of each job
  int n_preempt, n_defer, n_pp;

  // --------------------------------------------------- the tasks' "code"
  function automatic logic [31:0] pm_word(input int m, input int i);
    if (m == 1 && i == 2) return 32'(Q3 * U);
    if (m == 2 && i == 2) return 32'(1) << PM_NP_BIT;
    return 32'd0;
  endfunction

  always_comb begin
    c2_we    = 1'b0;
    c2_reg   = C2_CRTR;
    c2_wdata = 32'd0;
    if (!rst && fetch_ok && task_select < 3) begin
      automatic int i = int'(task_select);
      if (i == 0 && setup_step[0] == 0) begin
        c2_we = 1'b1; c2_reg = C2_CR0MSTOP; c2_wdata = 32'hF8;   // park sCPU3..7
      end else if (setup_step[i] == ((i == 0) ? 1 : 0)) begin
        c2_we = 1'b1; c2_reg = C2_CRPM; c2_wdata = pm_word(mode, i);
      end else if (setup_step[i] == ((i == 0) ? 2 : 1)) begin
        c2_we = 1'b1; c2_reg = C2_CRTR; c2_wdata = 32'h1;        // wait for the time event
      end else if (job_cyc[i] == C[i] * U - SLACK - 1) begin
        c2_we = 1'b1; c2_reg = C2_CRTR; c2_wdata = 32'h1;        // job done: wait
      end else if (mode == 2 && i == 2 && job_cyc[i] == SPLIT * U - SLACK - 1) begin
        c2_we = 1'b1; c2_reg = C2_PP;                            // end of the first subjob
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc <= 0;
      for (int i = 0; i < 3; i++) begin
        setup_step[i] <= 0;
        job_cyc[i]    <= 0;
        job_no[i]     <= 0;
        for (int k = 0; k < 4; k++) fin_cyc[i][k] <= 0;
      end
    end else begin
      cyc <= cyc + 1;
      if (fetch_ok && task_select < 3) begin
        automatic int i = int'(task_select);
        if (setup_step[i] < ((i == 0) ? 3 : 2)) begin
          setup_step[i] <= setup_step[i] + 1;
        end else if (job_cyc[i] == C[i] * U - SLACK - 1) begin
          job_cyc[i] <= 0;
          if (job_no[i] < 4) fin_cyc[i][job_no[i]] <= cyc;
          job_no[i] <= job_no[i] + 1;
        end else begin
          job_cyc[i] <= job_cyc[i] + 1;
        end
      end
    end
  end

  // releases: one-cycle pulses on the time-event line
  always_comb begin
    ev_in = '0;
    for (int i = 0; i < 3; i++)
      if (!rst && cyc >= T0 && (cyc - T0) % (T[i] * U) == 0 && (cyc - T0) < HOR * U)
        ev_in[i][EV_TEV] = 1'b1;
  end

  logic defer_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      n_preempt <= 0; n_defer <= 0; n_pp <= 0; defer_q <= 1'b0;
    end else begin
      defer_q <= defer_active;
      if (preempt)                   n_preempt <= n_preempt + 1;
      if (defer_active && !defer_q)  n_defer   <= n_defer + 1;
      if (pp_switch)                 n_pp      <= n_pp + 1;
    end
  end

  // ------------------------------------------------ reference schedules
  int ref_run [HOR];             // task running in each unit, -1 idle
  int ref_fin [3][4];            // completion time of each job, in units
  function automatic void reference(input int m);
    int rem [3], exec [3], nfin [3];
    int cur, req, best;
    bit pp_pend;
    for (int i = 0; i < 3; i++) begin
      rem[i] = 0; exec[i] = 0; nfin[i] = 0;
      for (int k = 0; k < 4; k++) ref_fin[i][k] = -1;
    end
    cur = -1; req = -1; pp_pend = 0;
    for (int t = 0; t < HOR; t++) begin
      // the running task ended: pick among jobs released before t
      if (cur < 0 || rem[cur] == 0) begin
        cur = -1; req = -1;
        for (int i = 2; i >= 0; i--) if (rem[i] > 0) cur = i;
      end
      for (int i = 0; i < 3; i++) if (t % T[i] == 0) rem[i] = C[i];
      best = -1;
      for (int i = 2; i >= 0; i--) if (rem[i] > 0) best = i;
      if (cur < 0) begin
        cur = best;
      end else if (best >= 0 && best < cur) begin
        if (m == 1 && cur == 2) begin
          if (req < 0) req = t;
          if (t - req >= Q3) begin cur = best; req = -1; end
        end else if (m == 2 && cur == 2) begin
          if (pp_pend) cur = best;
        end else begin
          cur = best;
        end
      end
      pp_pend = 0;
      ref_run[t] = cur;
      if (cur >= 0) begin
        rem[cur]--; exec[cur]++;
        if (m == 2 && cur == 2 && exec[cur] == SPLIT) pp_pend = 1;
        if (rem[cur] == 0) begin
          if (nfin[cur] < 4) ref_fin[cur][nfin[cur]] = t + 1;
          nfin[cur]++; exec[cur] = 0; req = -1;
        end
      end
    end
  endfunction

  // ------------------------------------------------------------ checking
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL mode %0d: %s", mode, what);
    end
  endtask

  initial begin
    for (mode = 0; mode < 3; mode++) begin
      reference(mode);
      rst = 1;
      repeat (3) @(posedge clk);
      @(negedge clk);
      rst = 0;
      // set-up finished before the first release: all three tasks wait
      while (cyc < T0 - 1) @(negedge clk);
      check(setup_step[0] == 3 && setup_step[1] == 2 && setup_step[2] == 2, "set-up incomplete");
      check(!fetch_ok, "a task still runs before the first release");
      for (int t = 0; t < 22; t++) begin
        int who;
        while (cyc < T0 + t * U + U / 2) @(negedge clk);
        who = (fetch_ok && en_scpu) ? int'(task_select) : -1;
        check(who == ref_run[t], $sformatf("unit %0d runs %0d, expected %0d", t, who, ref_run[t]));
      end
      while (cyc < T0 + HOR * U) @(negedge clk);
      for (int i = 0; i < 3; i++)
        for (int k = 0; k < 4; k++)
          if (ref_fin[i][k] >= 0) begin
            int got, want;
            got  = fin_cyc[i][k] + 1 - T0;
            want = ref_fin[i][k] * U;
            check(job_no[i] > k && got >= want - 6 * SLACK && got <= want + TOL,
                  $sformatf("tau%0d job %0d ends at cycle %0d, expected %0d", i + 1, k, got, want));
          end
      // tau3's first deadline
      if (mode == 0) check(fin_cyc[2][0] + 1 - T0 > D[2] * U, "tau3 should miss its deadline");
      else           check(fin_cyc[2][0] + 1 - T0 <= D[2] * U, "tau3 should meet its deadline");
      for (int i = 0; i < 2; i++)
        check(fin_cyc[i][0] + 1 - T0 <= D[i] * U, $sformatf("tau%0d misses its deadline", i + 1));
      $display("mode %0d: tau3 ends at unit %0d (deadline %0d), preemptions=%0d deferrals=%0d pp-switches=%0d",
               mode, (fin_cyc[2][0] + 1 - T0 + U - 1) / U, D[2], n_preempt, n_defer,
               n_pp);
      // the mechanism of each mode was used
      if (mode == 0) check(n_preempt > 0, "no preemption");
      if (mode == 1) check(n_defer > 0, "no deferred preemption");
      if (mode == 2) check(n_pp > 0, "no switch at a preemption point");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (T0 + HOR * U + 200)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
