// tb_divider: signed and unsigned divisions with random and corner operands.
// Each result is compared with the bench's own / and % and the busy time is
// checked to be exactly 32 cycles, the latency the document gives. Also
// checks division by zero (quotient all ones, remainder = dividend) and that
// a start while busy is ignored.
module tb_divider;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0, is_signed = 0;
  logic [31:0] dividend = 0, divisor = 1;
  logic busy;
  logic [31:0] hi, lo;
  int checks = 0, failures = 0;

  divider dut (.clk, .rst, .start, .is_signed, .dividend, .divisor, .busy, .hi, .lo);

  task automatic do_div(input logic s, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] eq, er;
    int cycles;
    if (y == 0) begin eq = 32'hFFFF_FFFF; er = x; end
    else if (s) begin eq = $signed(x) / $signed(y); er = $signed(x) % $signed(y); end
    else begin eq = x / y; er = x % y; end
    @(negedge clk); start = 1; is_signed = s; dividend = x; divisor = y;
    @(negedge clk); start = 1; dividend = ~x;      // ignored while busy
    @(negedge clk); start = 0;
    cycles = 1;  // busy since the edge after the start; count the cycles it stays high
    while (busy) begin @(negedge clk); cycles++; end
    checks++;
    if (lo !== eq || hi !== er) begin
      failures++; $display("FAIL %s %h / %h: q=%h r=%h exp %h %h", s ? "div" : "divu", x, y, lo, hi, eq, er);
    end
    checks++;
    if (cycles != 32) begin failures++; $display("FAIL latency %0d", cycles); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    do_div(1, 32'hFFFF_FF9C, 32'd7);        // -100 / 7 = -14 r -2
    do_div(0, 32'd100, 32'd7);
    do_div(1, 32'd100, 32'hFFFF_FFF9);      // 100 / -7 = -14 r 2
    do_div(0, 32'hFFFF_FFFF, 32'd1);
    do_div(0, 32'h1234_5678, 32'd0);
    do_div(0, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    for (int k = 0; k < 200; k++) begin
      logic [31:0] x, y;
      x = $urandom; y = ($urandom_range(0, 1) != 0) ? $urandom : 32'($urandom_range(1, 1000));
      if (y == 0) y = 3;
      if (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) y = 5;
      do_div(1'($urandom_range(0, 1)), x, y);
    end
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
