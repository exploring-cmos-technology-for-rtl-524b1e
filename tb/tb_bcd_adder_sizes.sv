// tb_bcd_adder_sizes: the multi-digit BCD adder at each evaluated width.
//
// One instance each of the 1-, 2-, 3- and 4-digit adder is driven with the
// same operands, cut down to the instance's width. The 1- and 2-digit
// adders are checked exhaustively (every pair of operands with carry in 0
// and 1); the 3- and 4-digit adders, whose operand space is too large for
// that, get the all-nines carry chain and random operands. Expected
// results come from integer addition. Combinational; a watchdog ends a run
// that hangs.
module tb_bcd_adder_sizes;

  logic [3:0]  x1, y1, r1;
  logic [7:0]  x2, y2, r2;
  logic [11:0] x3, y3, r3;
  logic [15:0] x4, y4, r4;
  logic        ci;
  logic        cn1, cn2, cn3, cn4;
  logic [1:0]  c1;
  logic [2:0]  c2;
  logic [3:0]  c3;
  logic [4:0]  c4;
  int checks   = 0;
  int failures = 0;

  bcd_adder #(.DIGITS(1)) dut1 (.x(x1), .y(y1), .c0(ci), .r(r1), .cn(cn1), .c(c1));
  bcd_adder #(.DIGITS(2)) dut2 (.x(x2), .y(y2), .c0(ci), .r(r2), .cn(cn2), .c(c2));
  bcd_adder #(.DIGITS(3)) dut3 (.x(x3), .y(y3), .c0(ci), .r(r3), .cn(cn3), .c(c3));
  bcd_adder #(.DIGITS(4)) dut4 (.x(x4), .y(y4), .c0(ci), .r(r4), .cn(cn4), .c(c4));

  // Decimal value v as four packed BCD digits.
  function automatic logic [15:0] to_bcd(input int v);
    logic [15:0] p;
    for (int d = 0; d < 4; d++) begin
      p[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return p;
  endfunction

  task automatic compare(input string name, input int xv, input int yv, input int m,
                         input logic [15:0] got_r, input logic got_cn);
    int sum;
    sum = xv + yv + int'(ci);
    checks++;
    if (got_r !== to_bcd(sum % m) || got_cn !== (sum >= m)) begin
      failures++;
      $display("FAIL %s: %0d+%0d+%0d gave r=%h cn=%b", name, xv, yv, ci, got_r, got_cn);
    end
  endtask

  // Apply xv, yv (each below 10000) to all four widths and check them.
  task automatic apply(input int xv, input int yv, input bit c, input bit narrow);
    logic [15:0] xb, yb;
    xb = to_bcd(xv);
    yb = to_bcd(yv);
    ci = c;
    x1 = xb[3:0];  y1 = yb[3:0];
    x2 = xb[7:0];  y2 = yb[7:0];
    x3 = xb[11:0]; y3 = yb[11:0];
    x4 = xb;       y4 = yb;
    #1;
    if (narrow) begin
      if (xv < 10 && yv < 10) compare("1-digit", xv, yv, 10, {12'd0, r1}, cn1);
      compare("2-digit", xv % 100, yv % 100, 100, {8'd0, r2}, cn2);
    end else begin
      compare("3-digit", xv % 1000, yv % 1000, 1000, {4'd0, r3}, cn3);
      compare("4-digit", xv, yv, 10000, r4, cn4);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= 1; c++)
      for (int xv = 0; xv < 100; xv++)
        for (int yv = 0; yv < 100; yv++)
          apply(xv, yv, 1'(c), 1'b1);
    apply(9999, 0, 1'b1, 1'b0);
    apply(9999, 9999, 1'b1, 1'b0);
    apply(0, 0, 1'b0, 1'b0);
    for (int n = 0; n < 50000; n++)
      apply(int'($urandom % 10000), int'($urandom % 10000), 1'($urandom), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
