// nmpra: nMPRA processor (Multi Pipeline Register Architecture) with the
// integrated nHSE hardware scheduler.
//
// The processor is a five-stage MIPS32-style pipeline (IF, ID, EX, MEM, WB)
// whose state is multiplied NR_TASKS times: every semiprocessor (sCPU) owns a
// program counter, a copy of each pipeline register (IF/ID, ID/EX, EX/MEM,
// MEM/WB), a bank of 32 general-purpose registers and a divider with its
// HI/LO register. The combinational logic (instruction and data memory,
// control unit, hazard and forwarding units, condition test unit, ALU) is
// shared. Each cycle the nHSE names one sCPU with nHSE_Task_Select; the
// shared logic then reads and writes only that sCPU's copies, so all other
// sCPUs stay frozen with their instructions in flight. A context switch is
// therefore nothing more than a new select value: no state is saved or
// restored and the switched-out pipeline resumes exactly where it stopped.
//
// Scheduling: the running sCPU executes "wait Rj" (CTC2 Rj to nHSE register
// crTRi) when it has treated its events; the nHSE then selects the
// highest-priority sCPU that has a validated pending event, or preempts the
// running sCPU when a higher-priority one becomes ready (immediately,
// after q_i cycles, or at a preemption point, depending on the running
// sCPU's preemption mode). After the wait is decoded the sCPU stops issuing
// until those instructions ahead of the wait that still write a register or
// memory have left its pipeline (at most three cycles, none when only nops
// precede the wait, as in the documented wait sequence), and the new sCPU
// runs from the cycle after the handover decision.
//
// Pipeline details chosen here: branches and jumps are resolved in ID by the
// condition test unit and the target is fetched in the same cycle (no delay
// slot, no branch penalty); ID-stage operands are forwarded from MEM and WB,
// EX operands from EX/MEM; the hazard unit stalls for load-use, for a branch
// operand still being computed in EX and for HI/LO access while the divider
// is busy. A PC loaded through the nHSE (PC_nHSE_Sel) or an exception
// request flushes the sCPU's IF/ID and ID/EX registers and fetches from the
// new address. COP0 is not part of this design: exception_req and
// exception_pc are ports for it.
//
// Interface: one clock; synchronous active-high reset. The instruction
// memory is loaded through the imem_load_* port while the design is held in
// reset. ext_int are asynchronous interrupt lines (one per sCPU, the IntEv
// event), ev_in the other event lines of each sCPU, one bit per event type
// (bit 4 is OR-ed with the interrupt).
//
// The scheduler's observation outputs (preempt, defer_active, pp_switch,
// wait_exec) and the individual stall causes are kept as named internal
// signals so that a simulation can count each mechanism; they drive no logic.
module nmpra
  import nmpra_pkg::*;
#(
  parameter int          NR_TASKS     = 8,
  parameter int          PRI_W        = 8,
  parameter int          IMEM_WORDS   = 4096,
  parameter int          DMEM_WORDS   = 4096,
  parameter logic [31:0] RESET_STRIDE = 32'h0000_0400,
  localparam int TW = (NR_TASKS > 1) ? $clog2(NR_TASKS) : 1
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [NR_TASKS-1:0]                ext_int,
  input  logic [NR_TASKS-1:0][NR_EVENTS-1:0] ev_in,
  input  logic                               exception_req,
  input  logic [31:0]                        exception_pc,
  input  logic                               imem_load_we,
  input  logic [31:0]                        imem_load_addr,
  input  logic [31:0]                        imem_load_data,
  output logic [TW-1:0]                      nhse_task_select,
  output logic                               nhse_en_scpu,
  output logic [31:0]                        grssf
);
  // ----------------------------------------------------------- nHSE
  logic [TW-1:0] cur;
  logic          en_q, pcsel_q;
  logic [31:0]   pcnhse_q;
  logic [TW-1:0] next_sel;
  logic          next_en, pcsel_d, fetch_ok, run_ok, cur_busy;
  logic [31:0]   pcnhse_d, c2_rdata;
  logic          c2_we;
  logic          preempt, defer_active, pp_switch;
  logic [NR_TASKS-1:0] wait_exec;

  // ---------------------------------------------- multiplied pipeline state
  ifid_t  ifid_r  [NR_TASKS];
  idex_t  idex_r  [NR_TASKS];
  exmem_t exmem_r [NR_TASKS];
  memwb_t memwb_r [NR_TASKS];

  ifid_t  ifid;
  idex_t  idex, idex_d;
  exmem_t exmem, exmem_d;
  memwb_t memwb, memwb_d;

  assign ifid  = ifid_r[cur];
  assign idex  = idex_r[cur];
  assign exmem = exmem_r[cur];
  assign memwb = memwb_r[cur];

  logic run, issue, redirect, stall, hold_id, advance_if;
  assign run      = run_ok;                         // the pipeline of sCPU cur advances
  assign issue    = fetch_ok;                       // nHSE_Fetch_I: it may also fetch and issue
  assign redirect = issue && (pcsel_q || exception_req);
  assign hold_id  = stall || !issue;                // a waiting sCPU only drains
  // instructions ahead of a wait that still change state (a register other
  // than r0, or memory); bubbles and nops may stay frozen in the pipeline
  assign cur_busy = (idex.valid  && ((idex.ctrl.reg_write && idex.dst != 5'd0) || idex.ctrl.mem_write))
                 || (exmem.valid && ((exmem.reg_write && exmem.dst != 5'd0) || exmem.mem_write))
                 || (memwb.valid && memwb.reg_write && memwb.dst != 5'd0);

  // ------------------------------------------------------------------ IF
  logic [31:0] fetch_pc, fetch_pc4, instr;
  logic        pc_src;
  logic [31:0] id_target;

  if_stage #(.NR_TASKS(NR_TASKS), .RESET_STRIDE(RESET_STRIDE)) u_if (
    .clk, .rst,
    .task_sel      (cur),
    .advance       (advance_if),
    .pc_src        (pc_src),
    .id_target     (id_target),
    .exception_sel (exception_req),
    .exception_pc  (exception_pc),
    .pc_nhse_sel   (pcsel_q),
    .pc_nhse_out   (pcnhse_q),
    .fetch_pc      (fetch_pc),
    .fetch_pc_plus4(fetch_pc4)
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(fetch_pc), .instr,
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data)
  );

  // ------------------------------------------------------------------ ID
  ctrl_t       ctrl;
  logic [4:0]  id_rs, id_rt, id_rd;
  logic [31:0] rf_rs, rf_rt, id_rs_val, id_rt_val;
  cond_t       cond;
  logic        taken;
  logic        stall_lu, stall_br, stall_hilo;
  logic [NR_TASKS-1:0] div_busy;
  logic [31:0]         div_hi [NR_TASKS];
  logic [31:0]         div_lo [NR_TASKS];
  logic [31:0] mem_result;

  assign id_rs = ifid.instr[25:21];
  assign id_rt = ifid.instr[20:16];
  assign id_rd = ifid.instr[15:11];

  control_unit u_ctrl (.instr(ifid.instr), .ctrl);

  gpr_bank #(.NR_TASKS(NR_TASKS)) u_gpr (
    .clk, .rst,
    .bank_sel      (cur),
    .read_reg1_rs  (id_rs),
    .read_reg2_rt  (id_rt),
    .read_data1_rs (rf_rs),
    .read_data2_rt (rf_rt),
    .reg_write     (run && memwb.valid && memwb.reg_write),
    .write_reg_rtrd(memwb.dst),
    .write_data_wb (memwb.result)
  );

  logic [31:0] ex_rs_val, ex_rt_val;
  forward_unit u_fwd (
    .id_rs, .id_rt, .rf_rs, .rf_rt,
    .mem_valid    (exmem.valid),
    .mem_reg_write(exmem.reg_write),
    .mem_dst      (exmem.dst),
    .mem_result   (mem_result),
    .wb_valid     (memwb.valid),
    .wb_reg_write (memwb.reg_write),
    .wb_dst       (memwb.dst),
    .wb_result    (memwb.result),
    .id_rs_val, .id_rt_val,
    .ex_rs        (idex.rs),
    .ex_rt        (idex.rt),
    .ex_rs_in     (idex.rs_val),
    .ex_rt_in     (idex.rt_val),
    .exmem_alu_fwd(exmem.valid && exmem.reg_write && !exmem.mem_read),
    .exmem_dst    (exmem.dst),
    .exmem_alu    (exmem.alu),
    .ex_rs_val, .ex_rt_val
  );

  logic [4:0] idex_dst_eff;
  assign idex_dst_eff = idex.dst;

  hazard_unit u_haz (
    .id_ctrl      (ifid.valid ? ctrl : ctrl_t'('0)),
    .id_rs, .id_rt,
    .ex_valid     (idex.valid),
    .ex_reg_write (idex.ctrl.reg_write),
    .ex_mem_read  (idex.ctrl.mem_read),
    .ex_dst       (idex_dst_eff),
    .div_busy     (div_busy[cur]),
    .stall,
    .stall_load_use(stall_lu),
    .stall_branch (stall_br),
    .stall_hilo
  );

  cond_test_unit u_cond (.operand_a(id_rs_val), .operand_b(id_rt_val), .cond);

  always_comb begin
    unique case (ctrl.branch)
      BR_EQ:   taken = cond.eq;
      BR_NE:   taken = !cond.eq;
      BR_LEZ:  taken = cond.lez;
      BR_GTZ:  taken = cond.gz;
      BR_LTZ:  taken = cond.lz;
      BR_GEZ:  taken = cond.gez;
      default: taken = 1'b0;
    endcase
    if (ctrl.jump || ctrl.jump_reg) taken = 1'b1;
    if (ctrl.jump_reg)  id_target = id_rs_val;
    else if (ctrl.jump) id_target = {ifid.pc4[31:28], ifid.instr[25:0], 2'b00};
    else                id_target = ifid.pc4 + {{14{ifid.instr[15]}}, ifid.instr[15:0], 2'b00};
  end

  logic id_go;  // the instruction in ID moves on this cycle
  assign id_go      = run && ifid.valid && !hold_id && !redirect;
  assign pc_src     = id_go && taken;
  assign advance_if = run && (redirect || !hold_id);
  assign c2_we      = id_go && ctrl.cop2_write;

  always_comb begin
    idex_d         = '0;
    idex_d.valid   = ifid.valid && ctrl.legal;
    idex_d.ctrl    = ctrl;
    idex_d.rs      = id_rs;
    idex_d.rt      = id_rt;
    unique case (ctrl.dst)
      DST_RD:  idex_d.dst = id_rd;
      DST_RA:  idex_d.dst = 5'd31;
      default: idex_d.dst = id_rt;
    endcase
    idex_d.rs_val  = id_rs_val;
    idex_d.rt_val  = id_rt_val;
    idex_d.imm     = ctrl.imm_zext ? {16'd0, ifid.instr[15:0]} : {{16{ifid.instr[15]}}, ifid.instr[15:0]};
    idex_d.shamt   = ifid.instr[10:6];
    idex_d.use_pre = ctrl.link || ctrl.cop2_read || ctrl.mfhi || ctrl.mflo;
    if (ctrl.link)           idex_d.pre_val = ifid.pc4;
    else if (ctrl.cop2_read) idex_d.pre_val = c2_rdata;
    else if (ctrl.mfhi)      idex_d.pre_val = div_hi[cur];
    else                     idex_d.pre_val = div_lo[cur];
  end

  // one divider per sCPU (the division unit is part of the context)
  for (genvar t = 0; t < NR_TASKS; t++) begin : g_div
    divider u_div (
      .clk, .rst,
      .start    (id_go && ctrl.div_start && cur == TW'(t)),
      .is_signed(ctrl.div_signed),
      .dividend (id_rs_val),
      .divisor  (id_rt_val),
      .busy     (div_busy[t]),
      .hi       (div_hi[t]),
      .lo       (div_lo[t])
    );
  end

  // ------------------------------------------------------------------ EX
  logic [31:0] alu_a, alu_b, alu_y;
  always_comb begin
    alu_a = idex.ctrl.shift_var ? ex_rs_val
          : (idex.ctrl.alu_op inside {ALU_SLL, ALU_SRL, ALU_SRA}) ? {27'd0, idex.shamt}
          : ex_rs_val;
    alu_b = idex.ctrl.alu_src_imm ? idex.imm : ex_rt_val;
  end

  alu u_alu (.op(idex.ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  always_comb begin
    exmem_d            = '0;
    exmem_d.valid      = idex.valid && !redirect;
    exmem_d.reg_write  = idex.ctrl.reg_write;
    exmem_d.mem_read   = idex.ctrl.mem_read;
    exmem_d.mem_write  = idex.ctrl.mem_write;
    exmem_d.dst        = idex.dst;
    exmem_d.alu        = idex.use_pre ? idex.pre_val : alu_y;
    exmem_d.store_data = ex_rt_val;
  end

  // ----------------------------------------------------------------- MEM
  logic [31:0] dmem_rdata;
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .addr (exmem.alu),
    .we   (run && exmem.valid && exmem.mem_write),
    .wdata(exmem.store_data),
    .rdata(dmem_rdata)
  );

  assign mem_result = exmem.mem_read ? dmem_rdata : exmem.alu;

  always_comb begin
    memwb_d           = '0;
    memwb_d.valid     = exmem.valid;
    memwb_d.reg_write = exmem.reg_write;
    memwb_d.dst       = exmem.dst;
    memwb_d.result    = mem_result;
  end

  // ------------------------------------- pipeline register update (sCPU cur)
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < NR_TASKS; t++) begin
        ifid_r[t]  <= '0;
        idex_r[t]  <= '0;
        exmem_r[t] <= '0;
        memwb_r[t] <= '0;
      end
    end else if (run) begin
      memwb_r[cur] <= memwb_d;
      exmem_r[cur] <= exmem_d;
      if (redirect || hold_id || !ifid.valid) idex_r[cur] <= '0;
      else                                    idex_r[cur] <= idex_d;
      if (redirect || !hold_id) ifid_r[cur] <= '{valid: 1'b1, instr: instr, pc4: fetch_pc4};
    end
  end

  // --------------------------------------------------------- nHSE blocks
  register_file_nhse #(.NR_TASKS(NR_TASKS), .PRI_W(PRI_W)) u_rf_nhse (
    .clk, .rst,
    .cur_sel   (cur),
    .cur_en    (en_q),
    .cur_busy,
    .c2_we,
    .c2_reg    (id_rd),
    .c2_target (ifid.instr[7:0]),
    .c2_wdata  (id_rt_val),
    .c2_rdata,
    .ext_int,
    .ev_in,
    .next_sel,
    .next_en,
    .pc_nhse_sel(pcsel_d),
    .pc_nhse_out(pcnhse_d),
    .fetch_ok,
    .run_ok,
    .grssf,
    .preempt,
    .defer_active,
    .pp_switch,
    .wait_exec
  );

  nhse #(.NR_TASKS(NR_TASKS)) u_nhse (
    .clk, .rst,
    .sel_in     (next_sel),
    .en_in      (next_en),
    .pc_sel_in  (pcsel_d),
    .pc_in      (pcnhse_d),
    .task_select(cur),
    .en_scpu    (en_q),
    .pc_nhse_sel(pcsel_q),
    .pc_nhse_out(pcnhse_q)
  );

  assign nhse_task_select = cur;
  assign nhse_en_scpu     = en_q;

endmodule
