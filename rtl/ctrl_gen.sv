// ctrl_gen: control signals of the 5-4 arithmetic unit.
//
// Three XOR cells work in parallel on operand bits a2..a7:
//   X = a2 ^ a3            (true polarity only; it feeds the E/F cell)
//   Z = a4 ^ a5, z_n       (both polarities; they steer transmission gates)
//   Y = a6 ^ a7, y_n       (both polarities; they steer transmission gates)
// Z and Y are ready one gate delay before E and F, so the multiplexer
// channels they steer are already open when the data arrive.
// Y is taken from a6 and a7, as in the original circuit; this makes
// So1 the parity of all seven operands, which the compressor needs.
// Z and Y use the complementary XOR-XNOR cell; X is a plain XOR because only
// its true polarity is consumed. Combinational, one gate delay.
module ctrl_gen (
  input  logic a2,
  input  logic a3,
  input  logic a4,
  input  logic a5,
  input  logic a6,
  input  logic a7,
  output logic x,
  output logic z,
  output logic z_n,
  output logic y,
  output logic y_n
);

  always_comb x = a2 ^ a3;

  xor_xnor u_z (.a(a4), .b(a5), .x_or(z), .x_nor(z_n));
  xor_xnor u_y (.a(a6), .b(a7), .x_or(y), .x_nor(y_n));

endmodule
