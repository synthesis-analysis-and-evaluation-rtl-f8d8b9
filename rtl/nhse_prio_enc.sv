// nhse_prio_enc: the nHSE priority encoder block.
//
// Given N request lines, each with a PW-bit priority (a larger value is a
// higher priority, as for the mrPRIsCPUi task priority), it returns the index
// of the highest-priority active request and whether any request is active.
// Between requests of equal priority the lowest index wins; the document does
// not say how ties are broken, so that rule is this design's choice. The block
// is purely combinational: a linear scan that keeps the best candidate seen so
// far. The nHSE uses it twice: to pick the event a semiprocessor treats
// (priorities from crEPRi) and to pick the semiprocessor that runs
// (priorities from mrPRIsCPUi).
module nhse_prio_enc #(
  parameter int N  = 8,
  parameter int PW = 8,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]         req,
  input  logic [N-1:0][PW-1:0] prio,
  output logic                 valid,
  output logic [IW-1:0]        idx,
  output logic [PW-1:0]        best_prio
);
  always_comb begin
    valid     = 1'b0;
    idx       = '0;
    best_prio = '0;
    for (int i = 0; i < N; i++) begin
      if (req[i] && (!valid || prio[i] > best_prio)) begin
        valid     = 1'b1;
        idx       = IW'(i);
        best_prio = prio[i];
      end
    end
  end
endmodule
