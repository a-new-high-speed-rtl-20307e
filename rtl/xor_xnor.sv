// xor_xnor: two-input XOR and XNOR produced at the same time.
//
// The cell is the complementary-output XOR-XNOR circuit that every stage of
// the compressor uses: X, Z and Y control signals, the E/F pair and the front
// end of both 3-2 counters. In silicon it is a pass-transistor pair with a
// PMOS/NMOS feedback pair that restores full swing on both outputs; here it is
// modelled by its logic function. It is combinational and counts as one gate
// delay in the compressor's critical path.
// Only the cell's function is taken from the original design; the transistor
// circuit is not modelled.
//
// Ports: a, b inputs; x_or = a ^ b; x_nor = ~(a ^ b).
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x_or,
  output logic x_nor
);

  always_comb begin
    x_or  = a ^ b;
    x_nor = ~(a ^ b);
  end

endmodule
