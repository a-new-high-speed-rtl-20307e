// tb_maj3_carry: exhaustive check of the majority gate used for Co2/Co3:
// the output must be high when at least two of the three inputs are high.
module tb_maj3_carry;
  int checks = 0, failures = 0;
  logic a, b, c, co;

  maj3_carry dut (.a(a), .b(b), .c(c), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (co !== ((int'(a) + int'(b) + int'(c)) >= 2)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b co=%b", a, b, c, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
