// instr_mem: on-chip instruction memory shared by all semiprocessors.
//
// WORDS 32-bit words, addressed by the byte address PC_sCPUi (the low two
// bits are ignored, addresses wrap modulo the size). The read is
// combinational so the instruction fetched in a cycle reaches the IF/ID
// register at the next edge. A write port lets a host load the program
// before the processor runs. The document does not give the size; 4096
// words is this design's choice. The document clocks its memory at twice the
// processor frequency so that a synchronous read completes within one CPU
// cycle; here the read is simply combinational in the single clock domain.
module instr_mem #(
  parameter int WORDS = 4096,
  localparam int AW = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);
  logic [31:0] mem [WORDS];

  assign instr = mem[addr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;
  end
endmodule
