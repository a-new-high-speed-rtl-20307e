// tb_co1_gen: check of the Co1 multiplexer tree.
// Part 1 sweeps all 128 values of a1..a7, forms the tree's inputs as the
// 5-4 unit does (X = a2^a3, Z = a4^a5, Y = a6^a7, E = ~(a1^X), ~a7) and
// expects Co1 = majority(a1^a2^a3, a4^a5^a6, a7), worked out by counting.
// Part 2 drives E and ~a7 independently and expects ~Co1 = E when Y != Z and
// ~a7 when Y == Z.
module tb_co1_gen;
  int checks = 0, failures = 0;
  logic e, a7_n, z, z_n, y, y_n, co1;

  co1_gen dut (.e(e), .a7_n(a7_n), .z(z), .z_n(z_n), .y(y), .y_n(y_n), .co1(co1));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] av;   // av[0] = a1 ... av[6] = a7
    logic exp, s1, s2;
    for (int v = 0; v < 128; v++) begin
      av   = 7'(v);
      z    = av[3] ^ av[4];
      z_n  = ~z;
      y    = av[5] ^ av[6];
      y_n  = ~y;
      e    = ~(av[0] ^ av[1] ^ av[2]);
      a7_n = ~av[6];
      #1;
      s1  = 1'((int'(av[0]) + int'(av[1]) + int'(av[2])) % 2);
      s2  = 1'((int'(av[3]) + int'(av[4]) + int'(av[5])) % 2);
      exp = (int'(s1) + int'(s2) + int'(av[6])) >= 2;
      checks++;
      if (co1 !== exp) begin
        failures++;
        $display("FAIL a7..a1=%b co1=%b exp=%b", av, co1, exp);
      end
    end
    for (int v = 0; v < 16; v++) begin
      {y, z, e, a7_n} = 4'(v);
      z_n = ~z;
      y_n = ~y;
      #1;
      exp = (y != z) ? ~e : ~a7_n;
      checks++;
      if (co1 !== exp) begin
        failures++;
        $display("FAIL paths Y=%b Z=%b E=%b a7_n=%b co1=%b", y, z, e, a7_n, co1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
