// tb_bcd_netlist1: exhaustive check of the first level of the digit adder.
//
// Every pair J, I in 0..4 (all pairs that two BCD digits can produce) is
// applied; the expected tens digit and halved units digit of 2*(J+I) are
// worked out by integer division and remainder. The block is combinational,
// so each check follows a 1 ns settling delay. A watchdog ends the run with
// a failure if it does not finish.
module tb_bcd_netlist1;

  logic [2:0] j, i;
  logic [3:0] k;
  int checks   = 0;
  int failures = 0;

  bcd_netlist1 dut (.j(j), .i(i), .k(k));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int twice, exp_tens, exp_half;
    for (int jj = 0; jj <= 4; jj++) begin
      for (int ii = 0; ii <= 4; ii++) begin
        j = 3'(jj);
        i = 3'(ii);
        #1;
        twice    = 2 * (jj + ii);
        exp_tens = twice / 10;
        exp_half = (twice % 10) / 2;
        checks++;
        if (k !== {1'(exp_tens), 3'(exp_half)}) begin
          failures++;
          $display("FAIL j=%0d i=%0d k=%b expected %0d,%0d", jj, ii, k, exp_tens, exp_half);
        end
      end
    end
    // Worked example: 2*K = 12 is coded K3..K0 = 1,0,0,1.
    j = 3'd4; i = 3'd2; #1;
    checks++;
    if (k !== 4'b1001) begin
      failures++;
      $display("FAIL example 2K=12: k=%b", k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
