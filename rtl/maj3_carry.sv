// maj3_carry: three-input majority, used for Co2 (a1,a2,a3) and Co3
// (a4,a5,a6) of the 5-4 arithmetic unit.
//
// The circuit is the mirror-adder carry gate: a static complex gate that
// computes the inverted carry ~(a&b | c&(a|b)) in one stage, followed by an
// inverter that buffers the output and gives the true carry. The inverter
// drives the following 3-2 counter with full swing.
// Ports: a, b, c inputs; co = a&b | c&(a|b). Combinational, one gate delay.
// Gate structure and equation follow the original design; one module serves
// both Co2 and Co3.
module maj3_carry (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic co
);

  logic co_n;  // internal node of the complex gate

  always_comb begin
    co_n = ~((a & b) | (c & (a | b)));
    co   = ~co_n;
  end

endmodule
