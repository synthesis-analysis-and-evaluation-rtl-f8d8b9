// register_file_nhse: the nHSE coprocessor-2 register file and scheduling
// decision (the RegisterFileHSE block of the nMPRA processor).
//
// Per semiprocessor i it holds
//   crTRi     which of the seven event types may activate sCPU i (reset 0x1,
//             the value visible for all sCPUs before the documented
//             context-switch example);
//   crEVi     the event latches (lr_TEv, lr_WDEv, lr_D1Ev, lr_D2Ev, lr_IntEv,
//             lr_MutexEv, lr_SynEv); an event input sets its latch;
//   crEPRi    a 3-bit priority per event type (event k in bits 3k+2:3k);
//   grINT_IDi the ID of the highest-priority validated pending event, found
//             by the priority encoder block;
//   mrPRIsCPUi the task priority (larger is higher; reset NR_TASKS-1-i, so
//             sCPU0 ranks first as tasks are ranked in descending order);
//   crPMi     preemption mode: q_i in [15:0] for deferred preemption and a
//             non-preemptive flag in bit 16;
// and, globally, cr0MSTOP (one stop bit per sCPU).
//
// Task states: a CTC2 to crTRi by the running sCPU is the "wait Rj"
// instruction. It loads crTRi, acknowledges (clears) the events the old
// crTRi validated, and puts the sCPU into the waiting state. A waiting sCPU
// becomes ready again as soon as one of its latched events is validated.
// sCPU i is ready when it is not stopped and either not waiting or holding
// a validated event. The ready sCPU of highest mrPRI is the candidate
// (ties: lowest index). The running sCPU is replaced by the candidate when
// it stops being ready, or when the candidate has a strictly higher priority
// and preemption is allowed:
//   * fully preemptive (q_i = 0, flag clear): at once;
//   * deferred preemption, activation-triggered (q_i > 0): q_i cycles after
//     the higher-priority request appears;
//   * non-preemptive flag set (floating non-preemptive region, or task
//     splitting where the task runs its subjobs non-preemptively): only at a
//     preemption point, signalled by a CTC2 to register C2_PP.
// A CTC2 to C2_PCNHSE stores a start address for the target sCPU; it is
// issued as PC_nHSE_Sel / PC_nHSE_Out the next time the nHSE selects that
// sCPU, which then fetches from that address.
//
// A sCPU that waits or is stopped is not switched out at once: it stops
// issuing, and the nHSE keeps it selected until the instructions ahead of the
// wait have left the pipeline (cur_busy), at most three cycles. Preemption,
// by contrast, freezes the preempted sCPU's pipeline as it is.
//
// The decision is combinational and is registered by the nhse block, whose
// outputs (the current selection) are fed back here. CTC2 writes come from
// the ID stage (ID_ReadData2_RF as data, the rd field as register number and
// the low byte of the immediate naming the target sCPU for mrPRI and
// PC_nHSE); CFC2 reads return Read_Data_from_nHSE combinationally. External
// interrupts pass a two-flop synchroniser and set lr_IntEv on a rising edge.
// Register numbering, reset values, the q_i counter and the preemption-point
// register are this design's choices where the document gives only the
// register names.
module register_file_nhse
  import nmpra_pkg::*;
#(
  parameter int NR_TASKS = 8,
  parameter int PRI_W    = 8,
  localparam int TW = (NR_TASKS > 1) ? $clog2(NR_TASKS) : 1
) (
  input  logic                               clk,
  input  logic                               rst,
  // current state of the nhse output stage
  input  logic [TW-1:0]                      cur_sel,
  input  logic                               cur_en,
  input  logic                               cur_busy,   // older instructions of the current sCPU still in flight
  // COP2 access from the ID stage
  input  logic                               c2_we,      // committed CTC2
  input  logic [4:0]                         c2_reg,     // rd field
  input  logic [7:0]                         c2_target,  // Immediate[7:0]
  input  logic [31:0]                        c2_wdata,   // ID_ReadData2_RF
  output logic [31:0]                        c2_rdata,   // Read_Data_from_nHSE
  // events
  input  logic [NR_TASKS-1:0]                ext_int,    // ExtIntEv, asynchronous
  input  logic [NR_TASKS-1:0][NR_EVENTS-1:0] ev_in,      // other event sources, synchronous
  // decision for the nhse output stage
  output logic [TW-1:0]                      next_sel,   // nHSE_sCPUi_Select
  output logic                               next_en,    // nHSE_EN_sCPUi
  output logic                               pc_nhse_sel,
  output logic [31:0]                        pc_nhse_out,
  output logic                               fetch_ok,   // nHSE_Fetch_I: the selected sCPU may issue instructions
  output logic                               run_ok,     // the selected sCPU's pipeline advances
  output logic [31:0]                        grssf,      // ready flags of all sCPUs
  // observation of the scheduling mechanisms
  output logic                               preempt,        // a switch away from a still-ready sCPU
  output logic                               defer_active,   // deferred-preemption counter running
  output logic                               pp_switch,      // preemption taken at a preemption point
  output logic [NR_TASKS-1:0]                wait_exec       // sCPU executed "wait"
);
  logic [NR_EVENTS-1:0] cr_tr   [NR_TASKS];
  logic [NR_EVENTS-1:0] lr_ev   [NR_TASKS];
  logic [3*NR_EVENTS-1:0] cr_epr [NR_TASKS];
  logic [NR_TASKS-1:0][PRI_W-1:0] mr_pri;
  logic [15:0]          pm_q    [NR_TASKS];
  logic [NR_TASKS-1:0]  pm_np;
  logic [NR_TASKS-1:0]  waiting;
  logic [NR_TASKS-1:0]  mstop;
  logic [NR_TASKS-1:0]  pc_pend_v;
  logic [31:0]          pc_pend [NR_TASKS];
  logic [15:0]          defer_cnt;
  logic [NR_TASKS-1:0]  int_s1, int_s2, int_s3;

  // ---------------------------------------------------------------- events
  logic [NR_TASKS-1:0]  validated;
  logic [NR_TASKS-1:0]  ready;
  logic [NR_TASKS-1:0]  ev_id_valid;
  logic [2:0]           ev_id [NR_TASKS];

  for (genvar i = 0; i < NR_TASKS; i++) begin : g_task
    logic [NR_EVENTS-1:0][2:0] epr_f;
    logic [2:0]                unused_best;
    always_comb begin
      for (int k = 0; k < NR_EVENTS; k++) epr_f[k] = cr_epr[i][3*k +: 3];
    end
    nhse_prio_enc #(.N(NR_EVENTS), .PW(3)) u_ev_enc (
      .req      (lr_ev[i] & cr_tr[i]),
      .prio     (epr_f),
      .valid    (ev_id_valid[i]),
      .idx      (ev_id[i]),
      .best_prio(unused_best)
    );
    assign validated[i] = |(lr_ev[i] & cr_tr[i]);
    assign ready[i]     = !mstop[i] && (!waiting[i] || validated[i]);
  end

  // ------------------------------------------------------------- candidate
  logic          best_v;
  logic [TW-1:0] best;
  logic [PRI_W-1:0] best_pri;
  nhse_prio_enc #(.N(NR_TASKS), .PW(PRI_W)) u_task_enc (
    .req      (ready),
    .prio     (mr_pri),
    .valid    (best_v),
    .idx      (best),
    .best_prio(best_pri)
  );

  // --------------------------------------------------------- COP2 decoding
  logic          wr_tr, wr_ev, wr_epr, wr_pri, wr_mstop, wr_pm, wr_pc, pp_hit;
  logic          tgt_ok;
  logic [TW-1:0] tgt;
  always_comb begin
    tgt      = c2_target[TW-1:0];
    tgt_ok   = (32'(c2_target) < NR_TASKS);
    wr_tr    = c2_we && c2_reg == C2_CRTR;
    wr_ev    = c2_we && c2_reg == C2_CREV;
    wr_epr   = c2_we && c2_reg == C2_CREPR;
    wr_pri   = c2_we && c2_reg == C2_MRPRI && tgt_ok;
    wr_mstop = c2_we && c2_reg == C2_CR0MSTOP;
    wr_pm    = c2_we && c2_reg == C2_CRPM;
    wr_pc    = c2_we && c2_reg == C2_PCNHSE && tgt_ok;
    pp_hit   = c2_we && c2_reg == C2_PP;
  end

  always_comb begin
    c2_rdata = 32'd0;
    unique case (c2_reg)
      C2_CRTR:     c2_rdata = 32'(cr_tr[cur_sel]);
      C2_CREV:     c2_rdata = 32'(lr_ev[cur_sel]);
      C2_CREPR:    c2_rdata = 32'(cr_epr[cur_sel]);
      C2_MRPRI:    c2_rdata = tgt_ok ? 32'(mr_pri[tgt]) : 32'd0;
      C2_GRINTID:  c2_rdata = {ev_id_valid[cur_sel], 28'd0, ev_id[cur_sel]};
      C2_CR0MSTOP: c2_rdata = 32'(mstop);
      C2_CRPM:     c2_rdata = {15'd0, pm_np[cur_sel], pm_q[cur_sel]};
      C2_PCNHSE:   c2_rdata = tgt_ok ? pc_pend[tgt] : 32'd0;
      C2_GRSSF:    c2_rdata = 32'(ready);
      default:     c2_rdata = 32'd0;
    endcase
  end

  // -------------------------------------------------------------- decision
  logic cur_running, higher, sw, defer_start;
  always_comb begin
    cur_running = cur_en && ready[cur_sel];
    higher      = best_v && (best_pri > mr_pri[cur_sel]);
    sw          = 1'b0;
    defer_start = 1'b0;
    pp_switch   = 1'b0;
    if (!cur_running && cur_en && cur_busy) begin
      // the sCPU has just waited or been stopped: let its older
      // instructions leave the pipeline before handing over
      next_sel = cur_sel;
      next_en  = 1'b1;
    end else if (!cur_running) begin
      next_sel = best_v ? best : cur_sel;
      next_en  = best_v;
    end else begin
      next_en = 1'b1;
      if (higher) begin
        if (pm_np[cur_sel]) begin
          sw        = pp_hit;
          pp_switch = pp_hit;
        end else if (pm_q[cur_sel] != 16'd0) begin
          sw          = defer_active && (defer_cnt == 16'd0);
          defer_start = !defer_active;
        end else begin
          sw = 1'b1;
        end
      end
      next_sel = sw ? best : cur_sel;
    end
    preempt     = cur_running && sw;
    pc_nhse_sel = next_en && pc_pend_v[next_sel];
    pc_nhse_out = pc_pend[next_sel];
    fetch_ok    = cur_running;
    run_ok      = cur_running || (cur_en && cur_busy);
    grssf       = 32'(ready);
  end

  assign wait_exec = wr_tr ? (NR_TASKS'(1) << cur_sel) : '0;

  // ------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NR_TASKS; i++) begin
        cr_tr[i]   <= NR_EVENTS'(1);
        lr_ev[i]   <= '0;
        cr_epr[i]  <= '0;
        mr_pri[i]  <= PRI_W'(NR_TASKS - 1 - i);
        pm_q[i]    <= '0;
        pc_pend[i] <= '0;
      end
      pm_np        <= '0;
      waiting      <= '0;
      mstop        <= '0;
      pc_pend_v    <= '0;
      defer_active <= 1'b0;
      defer_cnt    <= '0;
      int_s1       <= '0;
      int_s2       <= '0;
      int_s3       <= '0;
    end else begin
      int_s1 <= ext_int;
      int_s2 <= int_s1;
      int_s3 <= int_s2;

      for (int i = 0; i < NR_TASKS; i++) begin
        logic [NR_EVENTS-1:0] clr, set;
        clr = '0;
        set = ev_in[i];
        set[EV_INTEV] = set[EV_INTEV] | (int_s2[i] & ~int_s3[i]);
        if (wr_tr && cur_sel == TW'(i)) clr = cr_tr[i];
        if (wr_ev && cur_sel == TW'(i)) clr = clr | c2_wdata[NR_EVENTS-1:0];
        lr_ev[i] <= (lr_ev[i] & ~clr) | set;
        // a waiting sCPU wakes up when a validated event is pending
        if (wr_tr && cur_sel == TW'(i)) waiting[i] <= 1'b1;
        else if (validated[i])          waiting[i] <= 1'b0;
      end

      if (wr_tr)    cr_tr[cur_sel]  <= c2_wdata[NR_EVENTS-1:0];
      if (wr_epr)   cr_epr[cur_sel] <= c2_wdata[3*NR_EVENTS-1:0];
      if (wr_pri)   mr_pri[tgt]     <= c2_wdata[PRI_W-1:0];
      if (wr_mstop) mstop           <= c2_wdata[NR_TASKS-1:0];
      if (wr_pm) begin
        pm_q[cur_sel]  <= c2_wdata[15:0];
        pm_np[cur_sel] <= c2_wdata[PM_NP_BIT];
      end

      // PC load: issued once to the nhse stage, then forgotten
      if (pc_nhse_sel) pc_pend_v[next_sel] <= 1'b0;
      if (wr_pc) begin
        pc_pend[tgt]   <= c2_wdata;
        pc_pend_v[tgt] <= 1'b1;
      end

      // deferred-preemption timer (activation-triggered model)
      if (defer_start) begin
        defer_active <= 1'b1;
        defer_cnt    <= pm_q[cur_sel] - 16'd1;
      end else if (defer_active && cur_running && higher && !sw && !pm_np[cur_sel]) begin
        defer_cnt <= defer_cnt - 16'd1;
      end else begin
        defer_active <= 1'b0;
        defer_cnt    <= '0;
      end
    end
  end
endmodule
