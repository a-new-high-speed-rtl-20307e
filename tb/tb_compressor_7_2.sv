// tb_compressor_7_2: exhaustive check of one 7-2 compressor over all 512
// values of a1..a7, cin1, cin2.
//   - weights: a1+..+a7+cin1+cin2 = sum + 2*(carry + cout1) + 4*cout2
//   - sum is the parity of all nine inputs
//   - cout1/cout2 follow from a1..a7 alone: for each a1..a7 they must not
//     change over the four cin1/cin2 values, and cout1 + 2*cout2 must equal
//     floor(n/2) for n ones among a1..a7 (the operands' weight-2 bits all
//     leave through cout1/cout2; carry only absorbs So1 + cin1 + cin2).
module tb_compressor_7_2;
  import comp72_pkg::*;
  int checks = 0, failures = 0;
  col_in_t a;
  logic cin1, cin2, sum, carry, cout1, cout2;

  compressor_7_2 dut (.a(a), .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry),
                      .cout1(cout1), .cout2(cout2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 128; va++) begin
      logic ref_c1, ref_c2;
      for (int vc = 0; vc < 4; vc++) begin
        int n_a, n_all;
        a = col_in_t'(va);
        {cin1, cin2} = 2'(vc);
        #1;
        n_a   = $countones(a);
        n_all = n_a + int'(cin1) + int'(cin2);
        checks++;
        if (n_all != int'(sum) + 2 * (int'(carry) + int'(cout1)) + 4 * int'(cout2)) begin
          failures++;
          $display("FAIL weights a=%b cin=%b%b -> s=%b c=%b co1=%b co2=%b",
                   a, cin1, cin2, sum, carry, cout1, cout2);
        end
        checks++;
        if (int'(sum) != n_all % 2) begin
          failures++;
          $display("FAIL sum parity a=%b cin=%b%b", a, cin1, cin2);
        end
        checks++;
        if (int'(cout1) + 2 * int'(cout2) != n_a / 2) begin
          failures++;
          $display("FAIL cout value a=%b cin=%b%b co1=%b co2=%b", a, cin1, cin2, cout1, cout2);
        end
        if (vc == 0) begin
          ref_c1 = cout1;
          ref_c2 = cout2;
        end else begin
          checks++;
          if (cout1 !== ref_c1 || cout2 !== ref_c2) begin
            failures++;
            $display("FAIL cout depends on cin a=%b cin=%b%b", a, cin1, cin2);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
