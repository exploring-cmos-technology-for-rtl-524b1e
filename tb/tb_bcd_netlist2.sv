// tb_bcd_netlist2: exhaustive check of the second level of the digit adder.
//
// Every input code the first level can produce (K3 = 0 with K2K1K0 in
// 0..4, K3 = 1 with K2K1K0 in 0..3) is combined with all eight values of
// A0, B0 and Cin. The expected result is worked out as a plain integer,
// 10*K3 + 2*K2K1K0 + A0 + B0 + Cin, split into a carry and a digit. The
// worked example (2K = 12 plus 2 gives carry 1, digit 4) is checked by
// name. Combinational; a watchdog ends a run that hangs.
module tb_bcd_netlist2;

  logic [3:0] k;
  logic       a0, b0, cin;
  logic [3:0] s;
  logic       cout;
  int checks   = 0;
  int failures = 0;

  bcd_netlist2 dut (.k(k), .a0(a0), .b0(b0), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int k3 = 0; k3 <= 1; k3++) begin
      for (int h = 0; h <= ((k3 != 0) ? 3 : 4); h++) begin
        for (int v = 0; v < 8; v++) begin
          k   = {1'(k3), 3'(h)};
          {a0, b0, cin} = 3'(v);
          #1;
          total = 10 * k3 + 2 * h + v[2] + v[1] + v[0];
          checks++;
          if (cout !== (total >= 10) || s !== 4'(total % 10)) begin
            failures++;
            $display("FAIL k=%b a0b0cin=%b: cout=%b s=%0d expected total %0d", k, v[2:0], cout, s, total);
          end
        end
      end
    end
    k = 4'b1001; a0 = 1'b1; b0 = 1'b1; cin = 1'b0; #1;
    checks++;
    if ({cout, s} !== 5'b1_0100) begin
      failures++;
      $display("FAIL worked example: cout=%b s=%b", cout, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
