// tb_bcd_digit_adder: exhaustive check of the one-digit BCD adder.
//
// All 200 combinations of a, b in 0..9 and cin are applied. The expected
// result comes from the classic two-step method: add in binary, and when
// the binary sum exceeds 9 add 6 and raise the decimal carry. The cases
// named in the text (5+3, 6+7, 8+9) are checked as well. Combinational;
// a watchdog ends a run that hangs.
module tb_bcd_digit_adder;
  import bcd_pkg::*;

  bcd_digit_t a, b, s;
  logic       cin, cout;
  int checks   = 0;
  int failures = 0;

  bcd_digit_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  // Reference: binary add, then +6 correction when the sum is above 9.
  function automatic logic [4:0] ref_add(input int x, input int y, input int c);
    logic [4:0] bin;
    bin = 5'(x + y + c);
    if (bin > 5'd9) return {1'b1, 4'(bin + 5'd6)};
    return {1'b0, bin[3:0]};
  endfunction

  task automatic check(input int x, input int y, input int c);
    logic [4:0] exp;
    a = 4'(x); b = 4'(y); cin = 1'(c);
    #1;
    exp = ref_add(x, y, c);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: cout=%b s=%0d expected %b", x, y, c, cout, s, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= 1; c++)
      for (int x = 0; x <= 9; x++)
        for (int y = 0; y <= 9; y++)
          check(x, y, c);
    check(5, 3, 0);   // 8, no correction
    check(6, 7, 0);   // 13: digit 3, carry
    check(8, 9, 0);   // 17: binary carry case, digit 7
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
