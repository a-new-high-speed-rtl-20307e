// arith_5_4: the 5-4 arithmetic unit, front end of the 7-2 compressor.
//
// Seven operand bits a1..a7 of equal weight are reduced to
//   So1 (weight 1) = a1 ^ a2 ^ ... ^ a7
//   Co1 (weight 2) = majority(a1^a2^a3, a4^a5^a6, a7)
//   Co2 (weight 2) = majority(a1, a2, a3)
//   Co3 (weight 2) = majority(a4, a5, a6)
// so that a1 + ... + a7 = So1 + 2*(Co1 + Co2 + Co3).
// So1 and Co1 are the slow outputs. Instead of chaining XOR stages they use a
// truth table indexed by three control signals X = a2^a3, Z = a4^a5,
// Y = a6^a7 and by a1:
//   Y Z X | So1  Co1
//   0 0 0 | a1   a7
//   0 0 1 | ~a1  a7
//   0 1 0 | ~a1  a1
//   0 1 1 | a1   ~a1
//   1 0 0 | ~a1  a1
//   1 0 1 | a1   ~a1
//   1 1 0 | a1   a7
//   1 1 1 | ~a1  a7
// An XOR-XNOR cell forms F = a1^X and E = ~F; transmission-gate trees
// steered by Z and Y (ready one gate earlier) select among E, F and ~a7, and
// output inverters buffer So1 and Co1. Co2 and Co3 come from one-stage
// majority gates. Critical path: two gate delays (X, then E/F) plus two
// already-open transmission gates and the output inverter.
// Combinational. Ports: a[0] = a1 ... a[6] = a7.
// Equations, truth table and circuit structure follow the original design.
// Y comes from a6/a7 as in the original circuit, Co1's select term is the
// complemented (multiplexer) form that the truth table implies, and ~a7 is
// made by a local inverter; the bit order of port a is this implementation's.
module arith_5_4 (
  input  comp72_pkg::col_in_t a,
  output logic so1,
  output logic co1,
  output logic co2,
  output logic co3
);

  logic x, z, z_n, y, y_n;
  logic e, f;
  logic a7_n;

  ctrl_gen u_ctrl (
    .a2(a[1]), .a3(a[2]), .a4(a[3]), .a5(a[4]), .a6(a[5]), .a7(a[6]),
    .x(x), .z(z), .z_n(z_n), .y(y), .y_n(y_n)
  );

  // E/F cell: F = a1 ^ X, E = ~(a1 ^ X).
  xor_xnor u_ef (.a(a[0]), .b(x), .x_or(f), .x_nor(e));

  always_comb a7_n = ~a[6];

  so1_gen u_so1 (.e(e), .f(f), .z(z), .z_n(z_n), .y(y), .y_n(y_n), .so1(so1));
  co1_gen u_co1 (.e(e), .a7_n(a7_n), .z(z), .z_n(z_n), .y(y), .y_n(y_n), .co1(co1));

  maj3_carry u_co2 (.a(a[0]), .b(a[1]), .c(a[2]), .co(co2));
  maj3_carry u_co3 (.a(a[3]), .b(a[4]), .c(a[5]), .co(co3));

endmodule
