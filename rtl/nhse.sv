// nhse: output stage of the nHSE hardware scheduler.
//
// It registers the decision of register_file_nhse on the rising clock edge
// and drives the signals that steer the multiplied processor resources:
// nHSE_Task_Select (which sCPU's PC, pipeline registers and register bank
// are used), nHSE_EN_sCPUi (a sCPU is scheduled at all), and the one-cycle
// PC_nHSE_Sel / PC_nHSE_Out pair that makes the newly selected sCPU fetch
// from a loaded address. A new selection takes effect one cycle after the
// decision, so the shared datapath changes context at a clock edge, as in the
// document's context-switch waveform. After reset no sCPU is enabled; the
// first decision enables the highest-priority ready one.
module nhse #(
  parameter int NR_TASKS = 8,
  localparam int TW = (NR_TASKS > 1) ? $clog2(NR_TASKS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [TW-1:0] sel_in,        // nHSE_sCPUi_Select
  input  logic          en_in,         // nHSE_EN_sCPUi1
  input  logic          pc_sel_in,     // PC_nHSE_Sel1
  input  logic [31:0]   pc_in,         // PC_nHSE_Out1
  output logic [TW-1:0] task_select,   // nHSE_Task_Select
  output logic          en_scpu,       // nHSE_EN_sCPUi
  output logic          pc_nhse_sel,   // PC_nHSE_Sel
  output logic [31:0]   pc_nhse_out    // PC_nHSE_Out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      task_select <= '0;
      en_scpu     <= 1'b0;
      pc_nhse_sel <= 1'b0;
      pc_nhse_out <= '0;
    end else begin
      task_select <= sel_in;
      en_scpu     <= en_in;
      pc_nhse_sel <= pc_sel_in;
      pc_nhse_out <= pc_in;
    end
  end
endmodule
