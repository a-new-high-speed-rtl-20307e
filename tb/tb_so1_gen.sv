// tb_so1_gen: check of the So1 multiplexer tree.
// Part 1 drives the tree as the 5-4 unit does, from a1 and the control
// signals (E = ~(a1^X), F = a1^X), and expects the truth-table value
// So1 = a1 ^ X ^ Y ^ Z for all 16 combinations.
// Part 2 drives E and F independently (all 16 combinations of E, F, Z, Y)
// and expects ~So1 = F when Y != Z and E when Y == Z, which checks that every
// transmission-gate path is routed to the right data input.
module tb_so1_gen;
  int checks = 0, failures = 0;
  logic e, f, z, z_n, y, y_n, so1;

  so1_gen dut (.e(e), .f(f), .z(z), .z_n(z_n), .y(y), .y_n(y_n), .so1(so1));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a1, x, exp;
    for (int v = 0; v < 16; v++) begin
      {y, z, x, a1} = 4'(v);
      z_n = ~z;
      y_n = ~y;
      f = a1 ^ x;
      e = ~(a1 ^ x);
      #1;
      // Table: rows with an even number of ones among Y, Z, X give a1.
      exp = ((int'(y) + int'(z) + int'(x)) % 2 == 0) ? a1 : ~a1;
      checks++;
      if (so1 !== exp) begin
        failures++;
        $display("FAIL table Y=%b Z=%b X=%b a1=%b so1=%b", y, z, x, a1, so1);
      end
    end
    for (int v = 0; v < 16; v++) begin
      {y, z, e, f} = 4'(v);
      z_n = ~z;
      y_n = ~y;
      #1;
      exp = (y != z) ? ~f : ~e;
      checks++;
      if (so1 !== exp) begin
        failures++;
        $display("FAIL paths Y=%b Z=%b E=%b F=%b so1=%b", y, z, e, f, so1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
