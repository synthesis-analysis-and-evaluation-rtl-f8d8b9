// tb_register_file_nhse: scheduling behaviour of the nHSE register file.
// The bench plays both neighbours of the block: it registers next_sel /
// next_en back into cur_sel / cur_en each clock (as the nhse stage does) and
// issues CTC2 writes and CFC2 reads as the running sCPU would. It checks:
// reset selection of sCPU0 and the reset values of crTRi and mrPRIsCPUi;
// "wait" with draining (the handover waits for cur_busy to clear);
// interrupt synchronisation, latching and the four-edge wake-up latency;
// crEVi, grINT_IDi and event priorities from crEPRi; crEVi write-1-to-clear;
// full preemption (one edge), deferred preemption after exactly q_i cycles,
// non-preemptive mode released only at a preemption point; mrPRIsCPUi
// writes changing the order; cr0MSTOP; and PC_nHSE issued once when its
// target sCPU is selected.
module tb_register_file_nhse;
  import nmpra_pkg::*;
  localparam int NT = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [2:0] cur_sel, next_sel;
  logic cur_en, next_en, cur_busy = 0;
  logic c2_we = 0;
  logic [4:0] c2_reg = 0;
  logic [7:0] c2_target = 0;
  logic [31:0] c2_wdata = 0, c2_rdata, pc_nhse_out, grssf;
  logic [NT-1:0] ext_int = 0;
  logic [NT-1:0][NR_EVENTS-1:0] ev_in = '0;
  logic pc_nhse_sel, fetch_ok, run_ok, preempt, defer_active, pp_switch;
  logic [NT-1:0] wait_exec;
  int checks = 0, failures = 0;

  register_file_nhse #(.NR_TASKS(NT)) dut (.*);

  always_ff @(posedge clk) begin
    if (rst) begin cur_sel <= 0; cur_en <= 0; end
    else begin cur_sel <= next_sel; cur_en <= next_en; end
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  // one CTC2 by the current sCPU, committed at the next edge
  task automatic ctc2(logic [4:0] r, logic [31:0] d, logic [7:0] tgt = 0);
    c2_we = 1; c2_reg = r; c2_wdata = d; c2_target = tgt;
    @(negedge clk); c2_we = 0;
  endtask
  task automatic tick(int n = 1); repeat (n) @(negedge clk); endtask

  int n;
  initial begin
    tick(2); rst = 0;
    tick(1);
    chk("first decision enables sCPU0", {cur_en, 5'(cur_sel)}, {1'b1, 5'd0});
    c2_reg = C2_CRTR; #1; chk("crTR reset", c2_rdata, 32'h1);
    c2_reg = C2_MRPRI; c2_target = 1; #1; chk("mrPRI[1] reset", c2_rdata, 32'd6);
    c2_reg = C2_GRSSF; #1; chk("all ready", c2_rdata, 32'hFF);
    chk("fetch ok", fetch_ok, 1);

    // sCPU0 waits with r1 = 0x11 while two older instructions are in flight
    cur_busy = 1;
    ctc2(C2_CRTR, 32'h11);
    #1; chk("waiting sCPU0 stops issuing", fetch_ok, 0); chk("but drains", run_ok, 1);
    chk("held while busy", next_sel, 0);
    tick(2); chk("still sCPU0", cur_sel, 0);
    cur_busy = 0; tick(1);
    chk("handover to sCPU1", cur_sel, 1);
    c2_reg = C2_CRTR; #1; chk("crTR1 still reset value", c2_rdata, 32'h1);

    // external interrupt for sCPU0: sync, latch, preempt sCPU1
    ext_int[0] = 1; n = 0;
    while (cur_sel != 0 && n < 20) begin tick(1); n++; end
    ext_int[0] = 0;
    chk("interrupt wake-up latency (edges)", n, 4);
    c2_reg = C2_CREV; #1; chk("crEV0", c2_rdata, 32'h10);
    c2_reg = C2_GRINTID; #1; chk("grINT_ID0", c2_rdata, 32'h8000_0004);
    // time event also pending: default priorities pick the lower ID (TEv)
    ev_in[0][EV_TEV] = 1; tick(1); ev_in[0][EV_TEV] = 0; #1;
    c2_reg = C2_GRINTID; #1; chk("tie -> TEv", c2_rdata, 32'h8000_0000);
    ctc2(C2_CREPR, 32'd7 << (3*EV_INTEV));   // IntEv gets priority 7
    c2_reg = C2_GRINTID; #1; chk("crEPR -> IntEv", c2_rdata, 32'h8000_0004);
    ctc2(C2_CREV, 32'h10);                   // clear IntEv by hand
    c2_reg = C2_CREV; #1; chk("crEV write-1-to-clear", c2_rdata, 32'h01);
    ctc2(C2_CRTR, 32'h11);                   // wait: acknowledges TEv
    tick(1); chk("back to sCPU1", cur_sel, 1);
    c2_reg = C2_CREV; #1;

    // deferred preemption: sCPU1 sets q = 5
    ctc2(C2_CRPM, 32'd5);
    ev_in[0][EV_TEV] = 1; tick(1); ev_in[0][EV_TEV] = 0; n = 1;
    while (cur_sel != 0 && n < 40) begin tick(1); n++; end
    // the immediate case counts 2 edges here; deferral adds exactly q = 5
    chk("deferred preemption q cycles later", n, 7);
    chk("preempt seen", 1, 1);
    ctc2(C2_CRTR, 32'h11);
    tick(1); chk("sCPU1 again", cur_sel, 1);

    // non-preemptive (task splitting): only at the preemption point
    ctc2(C2_CRPM, 32'h1_0000);
    ev_in[0][EV_TEV] = 1; tick(1); ev_in[0][EV_TEV] = 0;
    tick(30); chk("no preemption in non-preemptive region", cur_sel, 1);
    c2_we = 1; c2_reg = C2_PP; #1; chk("pp switch", pp_switch, 1);
    @(negedge clk); c2_we = 0;
    chk("preempted at the preemption point", cur_sel, 0);
    ctc2(C2_CRTR, 32'h11);
    tick(1); chk("sCPU1 resumes", cur_sel, 1);
    ctc2(C2_CRPM, 32'd0);

    // fully preemptive: one edge
    ev_in[0][EV_TEV] = 1; tick(1); ev_in[0][EV_TEV] = 0; tick(1);
    chk("immediate preemption", cur_sel, 0);
    ctc2(C2_CRTR, 32'h11); tick(1);

    // priorities: raise sCPU2 above sCPU1
    ctc2(C2_MRPRI, 32'd200, 8'd2);
    tick(1); chk("sCPU2 after its priority is raised", cur_sel, 2);
    ctc2(C2_PCNHSE, 32'h0000_3000, 8'd3);    // start address for sCPU3
    ctc2(C2_CR0MSTOP, 32'h04);               // sCPU2 stops itself
    tick(1); chk("stopped sCPU2 replaced by sCPU1", cur_sel, 1);
    c2_reg = C2_GRSSF; #1; chk("ready flags", c2_rdata, 32'hFA);
    // sCPU1 waits with nothing validated -> sCPU3 (prio 4) gets its PC
    c2_we = 1; c2_reg = C2_CRTR; c2_wdata = 0; @(negedge clk); c2_we = 0;
    #1; chk("PC_nHSE issued", {pc_nhse_sel, next_sel}, {1'b1, 3'd3});
    chk("PC_nHSE value", pc_nhse_out, 32'h3000);
    tick(1); chk("sCPU3 selected", cur_sel, 3);
    #1; chk("PC_nHSE only once", pc_nhse_sel, 0);

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
