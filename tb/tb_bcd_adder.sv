// tb_bcd_adder: end-to-end check of the multi-digit BCD adder at its
// default size (four digits, no parameter override).
//
// Operands are drawn at random as decimal integers, packed into BCD, and
// the sum and carry out are compared with integer addition. Directed cases
// add the longest carry ripple (9999 + 0000 + 1, 9999 + 9999 + 1), zero,
// and the worked cases of the digit adder in the lowest digit. The test
// counts how often each mechanism of the adder was exercised and counts a
// failure for any that never was:
//   tens   - the first level found J + I >= 5 (2K carries by itself)
//   wrap   - the second level's units digit reached ten
//   ripple - a digit passed on a carry to the next digit
//   full   - a carry travelled from C0 all the way to Cn
//   cout   - carry out of the whole word
//   cin    - carry in of the whole word used
// The full carry chain C0..Cn is also checked against the reference.
// The digit events are worked out from the operands, not read from inside
// the adder. Combinational: each check follows a 1 ns settling delay; a watchdog ends
// a run that hangs.
module tb_bcd_adder;
  import bcd_pkg::*;

  localparam int unsigned N = DEFAULT_DIGITS;
  localparam int          NUM_RANDOM = 200000;

  logic [4*N-1:0] x, y, r;
  logic           c0, cn;
  logic [N:0]     c;
  int checks   = 0;
  int failures = 0;
  int n_tens, n_wrap, n_ripple, n_full, n_cout, n_cin;

  bcd_adder dut (.x(x), .y(y), .c0(c0), .r(r), .cn(cn), .c(c));

  function automatic logic [4*N-1:0] to_bcd(input longint v);
    logic [4*N-1:0] p;
    for (int d = 0; d < int'(N); d++) begin
      p[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return p;
  endfunction

  longint modulus;

  task automatic check(input longint xv, input longint yv, input bit ci);
    longint     sum;
    logic [N:0] exp_c;
    x  = to_bcd(xv);
    y  = to_bcd(yv);
    c0 = ci;
    #1;
    sum = xv + yv + longint'(ci);
    // Expected carry into each digit: the carry out of the lower digits.
    exp_c[0] = ci;
    for (int d = 1; d <= int'(N); d++) begin
      longint m = 1;
      for (int e = 0; e < d; e++) m = m * 10;
      exp_c[d] = ((xv % m) + (yv % m) + longint'(ci)) >= m;
    end
    checks++;
    if (r !== to_bcd(sum % modulus) || cn !== (sum >= modulus) || c !== exp_c) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: r=%h cn=%b c=%b expected sum %0d c=%b",
               xv, yv, ci, r, cn, c, sum, exp_c);
    end
    // Mechanism counters.
    if (ci) n_cin++;
    if (cn) n_cout++;
    if (c[N-1:1] != '0) n_ripple++;
    if (&c) n_full++;
    // Digit-level events, worked out from each digit's operands and the
    // carry it received: tens when J + I >= 5, wrap when the second level's
    // units digit 2*((J+I) mod 5) + A0 + B0 + Cin reaches ten.
    begin
      bit any_tens = 0, any_wrap = 0;
      for (int d = 0; d < int'(N); d++) begin
        int jv, iv, t;
        jv = int'(x[4*d+1 +: 3]);
        iv = int'(y[4*d+1 +: 3]);
        t  = int'(x[4*d]) + int'(y[4*d]) + int'(exp_c[d]);
        if (jv + iv >= 5) any_tens = 1;
        if (2 * ((jv + iv) % 5) + t >= 10) any_wrap = 1;
      end
      if (any_tens) n_tens++;
      if (any_wrap) n_wrap++;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xv, yv;
    {n_tens, n_wrap, n_ripple, n_full, n_cout, n_cin} = '0;
    modulus = 1;
    for (int d = 0; d < int'(N); d++) modulus = modulus * 10;
    check(0, 0, 0);
    check(modulus - 1, 0, 1);
    check(modulus - 1, modulus - 1, 1);
    check(modulus - 1, modulus - 1, 0);
    check(5, 3, 0);
    check(6, 7, 0);
    check(8, 9, 0);
    for (int n = 0; n < NUM_RANDOM; n++) begin
      xv = longint'($urandom) % modulus;
      yv = longint'($urandom) % modulus;
      check(xv, yv, 1'($urandom));
    end
    $display("mechanisms: tens=%0d wrap=%0d ripple=%0d full=%0d cout=%0d cin=%0d",
             n_tens, n_wrap, n_ripple, n_full, n_cout, n_cin);
    if (n_tens == 0)   begin failures++; $display("FAIL mechanism tens never seen");   end
    if (n_wrap == 0)   begin failures++; $display("FAIL mechanism wrap never seen");   end
    if (n_ripple == 0) begin failures++; $display("FAIL mechanism ripple never seen"); end
    if (n_full == 0)   begin failures++; $display("FAIL mechanism full never seen");   end
    if (n_cout == 0)   begin failures++; $display("FAIL mechanism cout never seen");   end
    if (n_cin == 0)    begin failures++; $display("FAIL mechanism cin never seen");    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
