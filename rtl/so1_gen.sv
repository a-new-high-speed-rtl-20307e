// so1_gen: sum output So1 of the 5-4 arithmetic unit.
//
// So1 is the parity of a1..a7. With X = a2^a3, Z = a4^a5, Y = a6^a7 and the
// E/F pair from the XOR-XNOR cell (F = a1^X, E = ~F) the inverted sum is
//   ~So1 = (Y ^ Z) ? F : E.
// It is built, as in the original circuit, from three transmission-gate
// multiplexers: two first-level muxes steered by Z
//   m0 = Z ? F : E      (right when Y = 0)
//   m1 = Z ? E : F      (right when Y = 1)
// and a second-level mux steered by Y that picks m0 for Y = 0 and m1 for
// Y = 1. An output inverter restores drive and gives So1 in true polarity.
// Because Z and Y settle one gate delay before E and F, the delay from E/F to
// So1 is two already-open transmission gates plus the inverter.
// Combinational.
// Mux tree, select wiring and output inverter follow the original circuit.
module so1_gen (
  input  logic e,
  input  logic f,
  input  logic z,
  input  logic z_n,
  input  logic y,
  input  logic y_n,
  output logic so1
);

  logic m0, m1, so1_n;

  tg_mux2 u_m0 (.sel(z),   .sel_n(z_n), .a(f),  .b(e),  .out(m0));
  tg_mux2 u_m1 (.sel(z_n), .sel_n(z),   .a(f),  .b(e),  .out(m1));
  tg_mux2 u_m2 (.sel(y_n), .sel_n(y),   .a(m0), .b(m1), .out(so1_n));

  always_comb so1 = ~so1_n;

endmodule
