// if_stage: instruction-fetch stage with one program counter per sCPU.
//
// PC[0..NR_TASKS-1] holds, for each semiprocessor, the address of its next
// sequential instruction. The register of the sCPU named by nHSE_Task_Select
// is multiplexed out and passes through a chain of multiplexers that picks
// the address fetched in this cycle, lowest to highest precedence:
//   the stored PC, or (pc_src) the branch / jump / jump-register target
//   resolved in ID; the exception PC; the PC supplied by the nHSE
//   (PC_nHSE_Out, selected by PC_nHSE_Sel).
// The chosen address goes to the instruction memory and, plus 4, is written
// back into PC[sCPUi] when the sCPU advances. This mirrors the fetch-stage
// structure of the document: the selection logic is shared and only the
// PC register is multiplied. Because the target chosen in ID is fetched in
// the same cycle, a taken branch costs no cycle and there is no branch delay
// slot (a departure from MIPS32 that follows from that structure). Reset
// gives sCPU i the start address i * RESET_STRIDE, this design's choice.
module if_stage #(
  parameter int          NR_TASKS     = 8,
  parameter logic [31:0] RESET_STRIDE = 32'h0000_0400,
  localparam int TW = (NR_TASKS > 1) ? $clog2(NR_TASKS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [TW-1:0] task_sel,       // nHSE_Task_Select
  input  logic          advance,        // the selected sCPU fetches this cycle
  input  logic          pc_src,         // take the ID-stage target
  input  logic [31:0]   id_target,
  input  logic          exception_sel,  // PC_Exception
  input  logic [31:0]   exception_pc,
  input  logic          pc_nhse_sel,    // PC_nHSE_Sel
  input  logic [31:0]   pc_nhse_out,    // PC_nHSE_Out
  output logic [31:0]   fetch_pc,       // PC_sCPUi: address sent to instruction memory
  output logic [31:0]   fetch_pc_plus4  // PC_IF_sCPUi
);
  logic [31:0] pc [NR_TASKS];
  logic [31:0] pc_cur;

  always_comb begin
    pc_cur = pc[task_sel];
    fetch_pc = pc_src ? id_target : pc_cur;
    if (exception_sel) fetch_pc = exception_pc;
    if (pc_nhse_sel)   fetch_pc = pc_nhse_out;
    fetch_pc_plus4 = fetch_pc + 32'd4;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NR_TASKS; i++) pc[i] <= 32'(i) * RESET_STRIDE;
    end else if (advance) begin
      pc[task_sel] <= fetch_pc_plus4;
    end
  end
endmodule
