// co1_gen: carry output Co1 of the 5-4 arithmetic unit.
//
// Co1 is the majority of (a1^a2^a3), (a4^a5^a6) and a7. In terms of the
// control signals and the E cell output (E = ~(a1^a2^a3)) it is
//   Co1 = (Y ^ Z) ? (a1^a2^a3) : a7, so ~Co1 = (Y ^ Z) ? E : ~a7.
// Same three-mux tree as so1_gen, with E and ~a7 as data:
//   m0 = Z ? E : ~a7    (right when Y = 0)
//   m1 = Z ? ~a7 : E    (right when Y = 1)
//   ~Co1 = Y ? m1 : m0
// followed by an output inverter. Combinational; two already-open
// transmission gates plus the inverter from E to Co1.
// Mux tree, select wiring and output inverter follow the original circuit.
module co1_gen (
  input  logic e,
  input  logic a7_n,
  input  logic z,
  input  logic z_n,
  input  logic y,
  input  logic y_n,
  output logic co1
);

  logic m0, m1, co1_n;

  tg_mux2 u_m0 (.sel(z),   .sel_n(z_n), .a(e),  .b(a7_n), .out(m0));
  tg_mux2 u_m1 (.sel(z_n), .sel_n(z),   .a(e),  .b(a7_n), .out(m1));
  tg_mux2 u_m2 (.sel(y_n), .sel_n(y),   .a(m0), .b(m1),   .out(co1_n));

  always_comb co1 = ~co1_n;

endmodule
