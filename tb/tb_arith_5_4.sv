// tb_arith_5_4: exhaustive check of the 5-4 arithmetic unit over all 128
// values of a1..a7. Expected outputs are worked out by counting:
//   So1 = parity of a1..a7,
//   Co2 = at least two of a1..a3, Co3 = at least two of a4..a6,
//   Co1 = at least two of (parity a1..a3, parity a4..a6, a7),
// and the weights must add up: popcount = So1 + 2*(Co1 + Co2 + Co3).
module tb_arith_5_4;
  import comp72_pkg::*;
  int checks = 0, failures = 0;
  col_in_t a;
  logic so1, co1, co2, co3;

  arith_5_4 dut (.a(a), .so1(so1), .co1(co1), .co2(co2), .co3(co3));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a7..a1=%b got=%b exp=%b", what, a, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int n_lo, n_hi, n_all, n_co1;
      a = col_in_t'(v);
      #1;
      n_lo  = int'(a[0]) + int'(a[1]) + int'(a[2]);
      n_hi  = int'(a[3]) + int'(a[4]) + int'(a[5]);
      n_all = n_lo + n_hi + int'(a[6]);
      n_co1 = (n_lo % 2) + (n_hi % 2) + int'(a[6]);
      check("So1", so1, n_all % 2 == 1);
      check("Co1", co1, n_co1 >= 2);
      check("Co2", co2, n_lo >= 2);
      check("Co3", co3, n_hi >= 2);
      checks++;
      if (n_all != int'(so1) + 2 * (int'(co1) + int'(co2) + int'(co3))) begin
        failures++;
        $display("FAIL weights a7..a1=%b", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
