// tb_ctrl_gen: exhaustive check of the X, Z, Y control-signal generator over
// all 64 values of a2..a7. X/Z/Y must be high when their two bits differ and
// the complement outputs must be their inverses.
module tb_ctrl_gen;
  int checks = 0, failures = 0;
  logic [5:0] v6;   // v6[0] = a2 ... v6[5] = a7
  logic x, z, z_n, y, y_n;

  ctrl_gen dut (
    .a2(v6[0]), .a3(v6[1]), .a4(v6[2]), .a5(v6[3]), .a6(v6[4]), .a7(v6[5]),
    .x(x), .z(z), .z_n(z_n), .y(y), .y_n(y_n)
  );

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a2..a7=%b got=%b exp=%b", what, v6, got, exp);
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
    for (int v = 0; v < 64; v++) begin
      v6 = 6'(v);
      #1;
      check("X",   x,   v6[0] != v6[1]);
      check("Z",   z,   v6[2] != v6[3]);
      check("Z_n", z_n, v6[2] == v6[3]);
      check("Y",   y,   v6[4] != v6[5]);
      check("Y_n", y_n, v6[4] == v6[5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
