// gpr_bank: general-purpose register file multiplied per semiprocessor.
//
// It holds NR_TASKS banks of 32 registers of 32 bits (NR_TASKS x 32 words),
// one bank per sCPU, so a context switch needs no register save or restore.
// The bank is chosen by nHSE_Task_Select for both read ports (Read_Reg1_Rs,
// Read_Reg2_Rt) and the write port (Write_Reg_RtRd, Write_Data_WB), as the
// register file organisation of the document shows. Reads are combinational,
// the write happens on the rising clock edge, and register 0 of every bank
// reads as zero. A read of the register being written in the same cycle
// returns the old value; the forwarding unit supplies the new one. Reset
// clears all banks (this design's choice).
module gpr_bank #(
  parameter int NR_TASKS = 8,
  localparam int TW = (NR_TASKS > 1) ? $clog2(NR_TASKS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [TW-1:0] bank_sel,
  input  logic [4:0]    read_reg1_rs,
  input  logic [4:0]    read_reg2_rt,
  output logic [31:0]   read_data1_rs,
  output logic [31:0]   read_data2_rt,
  input  logic          reg_write,
  input  logic [4:0]    write_reg_rtrd,
  input  logic [31:0]   write_data_wb
);
  logic [31:0] regs [NR_TASKS][32];

  assign read_data1_rs = (read_reg1_rs == 5'd0) ? 32'd0 : regs[bank_sel][read_reg1_rs];
  assign read_data2_rt = (read_reg2_rt == 5'd0) ? 32'd0 : regs[bank_sel][read_reg2_rt];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < NR_TASKS; t++)
        for (int r = 0; r < 32; r++) regs[t][r] <= 32'd0;
    end else if (reg_write && write_reg_rtrd != 5'd0) begin
      regs[bank_sel][write_reg_rtrd] <= write_data_wb;
    end
  end
endmodule
