// data_mem: on-chip data memory shared by all semiprocessors.
//
// WORDS 32-bit words with word access only (lw / sw); the byte address's low
// two bits are ignored and addresses wrap modulo the size. Reads are
// combinational (the MEM stage result is available in the same cycle), writes
// happen on the rising edge. Size and access widths are not given by the
// document; 4096 words is this design's choice. Contents are not reset.
module data_mem #(
  parameter int WORDS = 4096,
  localparam int AW = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] mem [WORDS];

  assign rdata = mem[addr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end
endmodule
