// compressor_7_2: 7-2 compressor built from a 5-4 arithmetic unit and two
// 3-2 counters.
//
// Seven operand bits a1..a7 and two carries cin1, cin2 from less significant
// columns, all of weight 1, are added:
//   a1+...+a7 + cin1 + cin2 = sum + 2*(carry + cout1) + 4*cout2.
// The 5-4 unit gives So1 (weight 1) and Co1, Co2, Co3 (weight 2).
// One 3-2 counter adds Co2, Co3 and Co1 into cout1 (weight 2) and cout2
// (weight 4). These depend on a1..a7 only, never on cin1/cin2, so a row of
// compressors has no carry ripple: cout1/cout2 of one column feed cin1/cin2
// of the more significant columns without lengthening their paths.
// The other 3-2 counter adds cin1, cin2 and So1 into sum and carry.
// Critical path (a -> So1 -> sum): three gate delays and two transmission
// gates plus two already-open transmission gates. Combinational.
// Structure and counter input assignment follow the original design; the
// packed operand port and its bit order are this implementation's choice.
module compressor_7_2 (
  input  comp72_pkg::col_in_t a,  // a[0] = a1 ... a[6] = a7
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);

  logic so1, co1, co2, co3;

  arith_5_4 u_54 (.a(a), .so1(so1), .co1(co1), .co2(co2), .co3(co3));

  counter_3_2 u_cout (.a(co2),  .b(co3),  .c(co1), .sum(cout1), .carry(cout2));
  counter_3_2 u_out  (.a(cin1), .b(cin2), .c(so1), .sum(sum),   .carry(carry));

endmodule
