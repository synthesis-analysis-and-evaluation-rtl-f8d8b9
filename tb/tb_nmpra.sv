// tb_nmpra: end-to-end test of the nMPRA processor with its nHSE scheduler,
// at the default size (8 semiprocessors, 4096-word memories).
//
// The testbench assembles a small multitasking program into the instruction
// memory and lets it run:
//   sCPU0 (highest priority) exercises forwarding, load-use, branch-operand
//     and divider (HI/LO) stalls, a loop, a taken branch, jal/jr, loads a
//     start PC for sCPU2 through the nHSE, stops sCPU7, reprioritises sCPU3
//     and sCPU4, then waits for its interrupt and counts activations.
//   sCPU1 runs the same summation loop three times: fully preemptive,
//     with deferred preemption (q = 20 cycles) and non-preemptive with a
//     preemption point at its end; an interrupt for sCPU0 is raised during
//     each loop.
//   sCPU2 starts at the loaded PC, then is redirected by an exception request.
//   sCPU3..6 record that they ran and count time events.
// Expected memory contents are worked out by hand from the program. The
// bench also checks the scheduling latencies (wait -> next sCPU in 2 to 5 cycles,
// exactly 2 when only nops precede the wait,
// deferred preemption exactly q cycles after the request), the run order set
// by the priorities, and counts every mechanism, failing any that never
// occurred.
module tb_nmpra;
  import nmpra_pkg::*;

  localparam int NT = 8;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [NT-1:0] ext_int = '0;
  logic [NT-1:0][NR_EVENTS-1:0] ev_in = '0;
  logic exception_req = 1'b0;
  logic [31:0] exception_pc = 32'h0000_2100;
  logic imem_load_we = 1'b0;
  logic [31:0] imem_load_addr = '0, imem_load_data = '0;
  logic [2:0] task_sel;
  logic en_scpu;
  logic [31:0] grssf;

  nmpra dut (
    .clk, .rst, .ext_int, .ev_in, .exception_req, .exception_pc,
    .imem_load_we, .imem_load_addr, .imem_load_data,
    .nhse_task_select(task_sel), .nhse_en_scpu(en_scpu), .grssf
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------- tiny assembler
  function automatic logic [31:0] R(logic [5:0] fn, logic [4:0] rs, logic [4:0] rt, logic [4:0] rd, logic [4:0] sh = 0);
    return {6'h00, rs, rt, rd, sh, fn};
  endfunction
  function automatic logic [31:0] I(logic [5:0] op, logic [4:0] rs, logic [4:0] rt, int imm);
    return {op, rs, rt, imm[15:0]};
  endfunction
  function automatic logic [31:0] JI(logic [5:0] op, int addr);
    return {op, addr[27:2]};
  endfunction
  function automatic logic [31:0] CTC2(logic [4:0] rt, logic [4:0] rd, int tgt = 0);
    return {OP_COP2, CO_CTC2, rt, rd, 3'b000, tgt[7:0]};
  endfunction
  function automatic logic [31:0] CFC2(logic [4:0] rt, logic [4:0] rd, int tgt = 0);
    return {OP_COP2, CO_CFC2, rt, rd, 3'b000, tgt[7:0]};
  endfunction

  logic [31:0] prog [int];
  int pc;
  task automatic org(int a); pc = a; endtask
  task automatic put(logic [31:0] w); prog[pc] = w; pc += 4; endtask

  task automatic build_program();
    // ---------------- sCPU0 @ 0x000
    org(32'h000);
    put(I(OP_SW, 0, 0, 'h124));          // 0
    put(I(OP_ADDI, 0, 1, 'h11));         // 1  r1 = 0x11 (TEv | IntEv)
    put(I(OP_ADDI, 0, 2, 5));            // 2
    put(R(FN_ADD, 2, 2, 3));             // 3  r3 = 10 (EX forward)
    put(I(OP_SW, 0, 3, 'h100));          // 4
    put(I(OP_LW, 0, 4, 'h100));          // 5
    put(R(FN_ADD, 4, 4, 5));             // 6  load-use stall, r5 = 20
    put(I(OP_SW, 0, 5, 'h104));          // 7
    put(I(OP_ADDI, 0, 6, -100));         // 8
    put(I(OP_ADDI, 0, 7, 7));            // 9
    put(R(FN_DIV, 6, 7, 0));             // 10 operand stall
    put(R(FN_MFLO, 0, 0, 8));            // 11 HI/LO stall
    put(R(FN_MFHI, 0, 0, 9));            // 12
    put(I(OP_SW, 0, 8, 'h108));          // 13
    put(I(OP_SW, 0, 9, 'h10C));          // 14
    put(I(OP_ADDI, 0, 10, 0));           // 15
    put(I(OP_ADDI, 0, 11, 6));           // 16
    put(I(OP_ADDI, 10, 10, 1));          // 17 loop
    put(I(OP_BNE, 10, 11, -2));          // 18 -> 17
    put(I(OP_SW, 0, 10, 'h120));         // 19
    put(I(OP_BEQ, 0, 0, 1));             // 20 -> 22
    put(I(OP_SW, 0, 11, 'h124));         // 21 skipped
    put(I(OP_LUI, 0, 12, 0));            // 22
    put(I(OP_ORI, 12, 12, 'h2000));      // 23
    put(CTC2(12, C2_PCNHSE, 2));         // 24 sCPU2 starts at 0x2000
    put(I(OP_ADDI, 0, 13, 'h80));        // 25
    put(CTC2(13, C2_CR0MSTOP));          // 26 stop sCPU7
    put(I(OP_ADDI, 0, 13, 4));           // 27
    put(CTC2(13, C2_MRPRI, 4));          // 28 mrPRI[4] = 4
    put(I(OP_ADDI, 0, 13, 3));           // 29
    put(CTC2(13, C2_MRPRI, 3));          // 30 mrPRI[3] = 3
    put(CFC2(14, C2_MRPRI, 4));          // 31
    put(I(OP_SW, 0, 14, 'h128));         // 32
    put(I(OP_SW, 0, 0, 'h118));          // 33
    put(JI(OP_JAL, 50*4));               // 34
    put(I(OP_SW, 0, 15, 'h12C));         // 35
    put(I(OP_SW, 0, 31, 'h130));         // 36
    put(CTC2(1, C2_CRTR));               // 37 wait r1 (0x48C10000)
    put(I(OP_LW, 0, 14, 'h118));         // 38
    put(I(OP_ADDI, 14, 14, 1));          // 39
    put(I(OP_SW, 0, 14, 'h118));         // 40
    put(CFC2(13, C2_CREV));              // 41
    put(I(OP_SW, 0, 13, 'h110));         // 42
    put(CFC2(13, C2_GRINTID));           // 43
    put(I(OP_SW, 0, 13, 'h114));         // 44
    put(JI(OP_J, 37*4));                 // 45
    org(50*4);
    put(I(OP_ADDI, 0, 15, 'h55));        // 50
    put(R(FN_JR, 31, 0, 0));             // 51
    // ---------------- sCPU1 @ 0x400
    org(32'h400);
    for (int ph = 1; ph <= 3; ph++) begin
      if (ph == 2) begin put(I(OP_ADDI, 0, 5, 20)); put(CTC2(5, C2_CRPM)); end
      if (ph == 3) begin put(I(OP_LUI, 0, 5, 1));   put(CTC2(5, C2_CRPM)); end
      put(I(OP_ADDI, 0, 1, ph));
      put(I(OP_SW, 0, 1, 'h200));
      put(I(OP_ADDI, 0, 2, 0));
      put(I(OP_ADDI, 0, 3, 0));
      put(I(OP_ADDI, 0, 4, 300));
      put(I(OP_ADDI, 3, 3, 1));
      put(R(FN_ADD, 2, 3, 2));
      put(I(OP_BNE, 3, 4, -3));
      put(I(OP_SW, 0, 2, 'h200 + 4*ph));
    end
    put(I(OP_ADDI, 0, 1, 4));
    put(I(OP_SW, 0, 1, 'h200));
    put(CTC2(0, C2_PP));                 // preemption point
    put(CTC2(0, C2_CRPM));
    put(I(OP_ADDI, 0, 1, 5));
    put(I(OP_SW, 0, 1, 'h200));
    put(CTC2(0, C2_CRTR));               // wait with nothing validated
    put(I(OP_BEQ, 0, 0, -1));
    // ---------------- sCPU2: reset address (must not run) and loaded address
    org(32'h800);
    put(I(OP_ADDI, 0, 1, 'hBAD));
    put(I(OP_SW, 0, 1, 'h300));
    put(I(OP_BEQ, 0, 0, -1));
    org(32'h2000);
    put(I(OP_ADDI, 0, 1, 'h600D));
    put(I(OP_SW, 0, 1, 'h300));
    put(I(OP_ADDI, 0, 2, 1));
    put(I(OP_SW, 0, 2, 'h304));
    put(I(OP_BEQ, 0, 0, -1));
    org(32'h2100);
    put(I(OP_ADDI, 0, 3, 'hE0));
    put(I(OP_SW, 0, 3, 'h308));
    put(CTC2(0, C2_CRTR));
    put(I(OP_BEQ, 0, 0, -1));
    // ---------------- sCPU3..7
    for (int t = 3; t < NT; t++) begin
      org(t * 32'h400);
      put(I(OP_ADDI, 0, 1, t));
      put(I(OP_SW, 0, 1, 'h400 + 4*t));
      put(I(OP_SW, 0, 0, 'h500 + 4*t));
      put(I(OP_ADDI, 0, 2, 1));
      put(CTC2(2, C2_CRTR));             // wait for the time event
      put(I(OP_LW, 0, 3, 'h500 + 4*t));
      put(I(OP_ADDI, 3, 3, 1));
      put(I(OP_SW, 0, 3, 'h500 + 4*t));
      put(32'h0000_0000);                // nop
      put(32'h0000_0000);                // nop: the store has left EX/MEM
      put(JI(OP_J, t*32'h400 + 16));     // back to the wait, nothing to drain
    end
  endtask

  function automatic logic [31:0] dm(int a);
    return dut.u_dmem.mem[a >> 2];
  endfunction

  // ------------------------------------------------------- observation
  int acts_before_pp = -1;
  int n_stall_lu, n_stall_br, n_stall_hilo, n_fwd_ex, n_fwd_id, n_switch, n_preempt;
  int n_defer, n_pp, n_pcload, n_exc, n_wait, n_taken, n_wake, n_div;
  longint first_run [NT];
  longint wait_cyc = -1, defer_cyc = -1;
  int wait_lat_bad, defer_lat_bad, defer_lat_seen;
  int n_quiet_wait = 0;
  longint quiet_cyc = -1;
  logic [2:0] quiet_sel;
  logic [2:0] prev_sel;
  logic prev_en;

  initial for (int t = 0; t < NT; t++) first_run[t] = -1;

  always @(posedge clk) if (!rst) begin
    if (dut.run) begin
      if (dut.stall_lu)   n_stall_lu++;
      if (dut.stall_br)   n_stall_br++;
      if (dut.stall_hilo) n_stall_hilo++;
      if (dut.pc_src)     n_taken++;
      if (dut.id_go && dut.ctrl.div_start) n_div++;
      if (dut.idex.valid && dut.exmem.valid && dut.exmem.reg_write && !dut.exmem.mem_read
          && dut.exmem.dst != 0 && (dut.exmem.dst == dut.idex.rs || dut.exmem.dst == dut.idex.rt)) n_fwd_ex++;
      if (dut.ifid.valid && dut.exmem.valid && dut.exmem.reg_write && dut.exmem.dst != 0
          && (dut.exmem.dst == dut.id_rs || dut.exmem.dst == dut.id_rt)) n_fwd_id++;
      if (dut.pcsel_q)       n_pcload++;
      if (exception_req)     n_exc++;
    end
    if (dut.preempt)   n_preempt++;
    if (dut.pp_switch) begin n_pp++; acts_before_pp = dm('h118); end
    // only nops ahead of the wait: the sCPU gives up the datapath two
    // cycles after the wait is decoded (to another sCPU, or to none)
    if (quiet_cyc >= 0 && cyc == quiet_cyc + 2) begin
      n_quiet_wait++;
      if (en_scpu && task_sel == quiet_sel && !dut.u_rf_nhse.ready[quiet_sel]) begin
        wait_lat_bad++;
        $display("sCPU%0d still selected 2 cycles after a wait with nothing to drain", quiet_sel);
      end
      quiet_cyc = -1;
    end
    if (|dut.wait_exec) begin
      n_wait++; wait_cyc = cyc;
      if (!dut.cur_busy) begin quiet_cyc = cyc; quiet_sel = task_sel; end
    end
    if (dut.u_rf_nhse.defer_start) begin n_defer++; defer_cyc = cyc; end
    if (dut.preempt && defer_cyc >= 0) begin
      defer_lat_seen++;
      if (cyc - defer_cyc != 20) begin defer_lat_bad++; $display("deferred preemption after %0d cycles", cyc - defer_cyc); end
      defer_cyc = -1;
    end
    for (int t = 0; t < NT; t++)
      if (dut.u_rf_nhse.waiting[t] && dut.u_rf_nhse.validated[t]) n_wake++;
    if (en_scpu && first_run[task_sel] < 0) first_run[task_sel] = cyc;
    if (en_scpu && prev_en && task_sel != prev_sel) begin
      n_switch++;
      // a wait decoded at cycle k hands the datapath over at cycle k+2,
      // plus at most three cycles to drain the older instructions
      if (wait_cyc >= 0 && (cyc - wait_cyc < 2 || cyc - wait_cyc > 5) && !dut.u_rf_nhse.ready[prev_sel]) begin
        wait_lat_bad++;
        $display("switch %0d cycles after wait", cyc - wait_cyc);
      end
      wait_cyc = -1;
    end
    prev_sel <= task_sel;
    prev_en  <= en_scpu;
  end

  task automatic pulse_int0();
    @(negedge clk) ext_int[0] = 1'b1;
    repeat (3) @(negedge clk);
    ext_int[0] = 1'b0;
  endtask

  initial begin
    build_program();
    // the assembler reproduces the documented encodings of the test sequence
    check("encoding of addi r1,r0,0x11", I(OP_ADDI, 0, 1, 'h11), 32'h2001_0011);
    check("encoding of wait r1", CTC2(1, C2_CRTR), 32'h48C1_0000);
    foreach (prog[a]) begin
      @(negedge clk);
      imem_load_we = 1'b1; imem_load_addr = a; imem_load_data = prog[a];
    end
    @(negedge clk) imem_load_we = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // phase 1: preemptive loop of sCPU1
    while (!(dm('h200) == 1 && task_sel == 1)) @(negedge clk);
    repeat (100) @(negedge clk);
    pulse_int0();
    while (!(dm('h118) == 1)) @(negedge clk);
    // phase 2: deferred preemption
    while (!(dm('h200) == 2 && task_sel == 1)) @(negedge clk);
    repeat (100) @(negedge clk);
    pulse_int0();
    while (!(dm('h118) == 2)) @(negedge clk);
    // phase 3: non-preemptive until the preemption point
    while (!(dm('h200) == 3 && task_sel == 1)) @(negedge clk);
    repeat (100) @(negedge clk);
    pulse_int0();
    while (!(dm('h200) == 4)) @(negedge clk);
    while (!(dm('h118) == 3)) @(negedge clk);
    // sCPU2 at its loaded PC, then an exception redirect
    while (!(dm('h304) == 1 && task_sel == 2 && dut.run)) @(negedge clk);
    @(negedge clk) exception_req = 1'b1;
    @(negedge clk) exception_req = 1'b0;
    while (!(dm('h308) == 'hE0)) @(negedge clk);
    // time events for sCPU5 (twice) and sCPU3 (once)
    while (!(first_run[6] >= 0)) @(negedge clk);
    repeat (50) @(negedge clk);
    ev_in[5][EV_TEV] = 1'b1; @(negedge clk) ev_in[5][EV_TEV] = 1'b0;
    repeat (50) @(negedge clk);
    ev_in[5][EV_TEV] = 1'b1; @(negedge clk) ev_in[5][EV_TEV] = 1'b0;
    repeat (50) @(negedge clk);
    ev_in[3][EV_TEV] = 1'b1; @(negedge clk) ev_in[3][EV_TEV] = 1'b0;
    repeat (100) @(negedge clk);

    // ---------------------------------------------------- results
    check("add forward",      dm('h100), 32'd10);
    check("load-use",         dm('h104), 32'd20);
    check("div quotient",     dm('h108), 32'hFFFF_FFF2);
    check("div remainder",    dm('h10C), 32'hFFFF_FFFE);
    check("loop count",       dm('h120), 32'd6);
    check("branch skip",      dm('h124), 32'd0);
    check("mrPRI readback",   dm('h128), 32'd4);
    check("jal/jr body",      dm('h12C), 32'h55);
    check("jal link",         dm('h130), 32'h8C);
    check("sCPU0 activations",dm('h118), 32'd3);
    check("crEV at wake",     dm('h110), 32'h10);
    check("grINT_ID at wake", dm('h114), 32'h8000_0004);
    check("sum preemptive",   dm('h204), 32'd45150);
    check("sum deferred",     dm('h208), 32'd45150);
    check("sum non-preempt",  dm('h20C), 32'd45150);
    check("no preemption before PP", acts_before_pp, 32'd2);
    check("sCPU2 from PC_nHSE", dm('h300), 32'h600D);
    check("exception target", dm('h308), 32'hE0);
    for (int t = 3; t < 7; t++) check($sformatf("sCPU%0d ran", t), dm('h400 + 4*t), t);
    check("sCPU5 time events", dm('h514), 32'd2);
    check("sCPU3 time events", dm('h50C), 32'd1);
    check("sCPU4 before sCPU3", 32'(first_run[4] < first_run[3]), 1);
    check("sCPU2 before sCPU4", 32'(first_run[2] < first_run[4]), 1);
    check("sCPU7 stopped",    32'(first_run[7]), 32'hFFFF_FFFF);
    check("wait latency",     wait_lat_bad, 0);
    check("deferred latency", defer_lat_bad, 0);
    check("deferred seen",    32'(defer_lat_seen > 0), 1);

    $display("mechanisms: load-use=%0d branch-stall=%0d hilo-stall=%0d fwd-ex=%0d fwd-id=%0d taken=%0d div=%0d",
             n_stall_lu, n_stall_br, n_stall_hilo, n_fwd_ex, n_fwd_id, n_taken, n_div);
    $display("scheduler: switches=%0d preempt=%0d deferred=%0d pp=%0d pc_nhse=%0d exception=%0d wait=%0d wake=%0d quiet-wait=%0d",
             n_switch, n_preempt, n_defer, n_pp, n_pcload, n_exc, n_wait, n_wake, n_quiet_wait);
    check("mech load-use",     32'(n_stall_lu > 0), 1);
    check("mech branch stall", 32'(n_stall_br > 0), 1);
    check("mech hilo stall",   32'(n_stall_hilo > 0), 1);
    check("mech EX forward",   32'(n_fwd_ex > 0), 1);
    check("mech ID forward",   32'(n_fwd_id > 0), 1);
    check("mech branch taken", 32'(n_taken > 0), 1);
    check("mech divide",       32'(n_div > 0), 1);
    check("mech context switch", 32'(n_switch > 0), 1);
    check("mech preemption",   32'(n_preempt > 0), 1);
    check("mech deferred",     32'(n_defer > 0), 1);
    check("mech preempt point",32'(n_pp > 0), 1);
    check("mech PC_nHSE load", 32'(n_pcload > 0), 1);
    check("mech exception",    32'(n_exc > 0), 1);
    check("mech wait",         32'(n_wait > 0), 1);
    check("mech wake",         32'(n_wake > 0), 1);
    check("mech wait without drain", 32'(n_quiet_wait > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
