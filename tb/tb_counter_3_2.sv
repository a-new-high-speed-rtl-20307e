// tb_counter_3_2: exhaustive check of the 3-2 counter: for every input
// triple, a + b + c must equal sum + 2*carry.
module tb_counter_3_2;
  int checks = 0, failures = 0;
  logic a, b, c, sum, carry;

  counter_3_2 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (int'(sum) != total % 2) begin
        failures++;
        $display("FAIL sum a=%b b=%b c=%b sum=%b", a, b, c, sum);
      end
      checks++;
      if (int'(carry) != total / 2) begin
        failures++;
        $display("FAIL carry a=%b b=%b c=%b carry=%b", a, b, c, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
