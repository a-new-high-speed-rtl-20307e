// tb_xor_xnor: exhaustive check of the complementary XOR-XNOR cell.
// All four input pairs are applied; each output is compared with the value
// worked out from the input count (odd count -> XOR high).
module tb_xor_xnor;
  int checks = 0, failures = 0;
  logic a, b, x_or, x_nor;

  xor_xnor dut (.a(a), .b(b), .x_or(x_or), .x_nor(x_nor));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int ones;
      {a, b} = 2'(v);
      #1;
      ones = int'(a) + int'(b);
      checks++;
      if (x_or !== (ones == 1)) begin
        failures++;
        $display("FAIL a=%b b=%b xor=%b", a, b, x_or);
      end
      checks++;
      if (x_nor !== (ones != 1)) begin
        failures++;
        $display("FAIL a=%b b=%b xnor=%b", a, b, x_nor);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
