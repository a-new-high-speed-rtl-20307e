// counter_3_2: 3-2 counter (full adder) used twice in the 7-2 compressor.
//
// Inputs a and b enter an XOR-XNOR cell, which gives a^b and ~(a^b) with
// full swing. Input c is the late-arriving or third operand.
//   carry: a transmission-gate multiplexer steered by the XOR-XNOR pair
//          passes c when a != b and a when a == b.
//   sum:   a two-transistor pass XOR steered by c passes a^b when c = 0 and
//          ~(a^b) when c = 1; a transmission gate that passes c when a == b
//          drives the same node with the same value and restores full swing.
// sum = a ^ b ^ c, carry = majority(a, b, c). Combinational: one gate delay
// for the XOR-XNOR cell, then one transmission gate (carry) or one pass
// transistor (sum).
// In the compressor the first instance takes a = Co2, b = Co3, c = Co1 and
// the second takes a = Cin1, b = Cin2, c = So1.
// The structure follows the original 18-transistor counter; modelling its two
// sum paths as one select expression is this implementation's choice.
module counter_3_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic ab_xor, ab_xnor;

  xor_xnor u_xx (.a(a), .b(b), .x_or(ab_xor), .x_nor(ab_xnor));

  tg_mux2 u_carry (.sel(ab_xor), .sel_n(ab_xnor), .a(c), .b(a), .out(carry));

  // Pass-transistor XOR; the reinforcing transmission gate (c when a == b)
  // agrees with it whenever it conducts, so it adds no separate term.
  always_comb sum = c ? ab_xnor : ab_xor;

endmodule
