// divider: multi-cycle 32-bit division unit with its HI/LO result register.
//
// A start pulse latches dividend and divisor; the unit then runs a restoring
// shift-subtract loop on the magnitudes, one quotient bit per clock, so a
// division takes 32 cycles as in the document, after which busy drops and
// LO holds the quotient and HI the remainder. Signed division corrects the
// signs at the end (quotient negative when the operand signs differ,
// remainder with the sign of the dividend). While busy is high the pipeline
// must not read or rewrite HI/LO: the hazard unit stalls such instructions,
// which removes the RAW and WAW hazards the document describes. Division by
// zero is undefined in MIPS32; here it yields quotient all ones and remainder
// equal to the dividend (the natural result of the loop). A start while busy
// is ignored. Each semiprocessor owns one instance, since the document
// multiplies the division unit with the other context registers.
module divider (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        is_signed,
  input  logic [31:0] dividend,
  input  logic [31:0] divisor,
  output logic        busy,
  output logic [31:0] hi,
  output logic [31:0] lo
);
  logic [5:0]  count;
  logic [31:0] quo, rem, dvs;
  logic        neg_q, neg_r;

  logic [33:0] trial;  // bit 33 set means the subtraction borrowed
  always_comb trial = {1'b0, rem, quo[31]} - {2'b00, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      count <= '0;
      quo   <= '0;
      rem   <= '0;
      dvs   <= '0;
      neg_q <= 1'b0;
      neg_r <= 1'b0;
      hi    <= '0;
      lo    <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        count <= 6'd32;
        quo   <= (is_signed && dividend[31]) ? -dividend : dividend;
        dvs   <= (is_signed && divisor[31])  ? -divisor  : divisor;
        rem   <= '0;
        neg_q <= is_signed && (dividend[31] ^ divisor[31]) && (divisor != 32'd0);
        neg_r <= is_signed && dividend[31];
      end
    end else begin
      // one restoring step: shift the next dividend bit into the remainder
      if (!trial[33]) begin
        rem <= trial[31:0];
        quo <= {quo[30:0], 1'b1};
      end else begin
        rem <= {rem[30:0], quo[31]};
        quo <= {quo[30:0], 1'b0};
      end
      count <= count - 6'd1;
      if (count == 6'd1) begin
        busy <= 1'b0;
        if (!trial[33]) begin
          lo <= neg_q ? -{quo[30:0], 1'b1} : {quo[30:0], 1'b1};
          hi <= neg_r ? -trial[31:0] : trial[31:0];
        end else begin
          lo <= neg_q ? -{quo[30:0], 1'b0} : {quo[30:0], 1'b0};
          hi <= neg_r ? -{rem[30:0], quo[31]} : {rem[30:0], quo[31]};
        end
      end
    end
  end
endmodule
