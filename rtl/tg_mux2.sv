// tg_mux2: 2-to-1 multiplexer made of two transmission gates.
//
// One transmission gate passes input a when sel is high, the other passes
// input b when sel is low. Each gate needs the select and its complement, so
// both are ports: the circuits that drive a tg_mux2 (XOR-XNOR cells) already
// produce both polarities, and no local inverter is spent. The output is full
// swing because both NMOS and PMOS devices conduct.
//
// Ports: sel and sel_n must be complements (an assertion checks this);
// out = sel ? a : b. The circuit and its select pair follow the original
// design; the complement assertion is an addition of this implementation. Combinational; once the select has settled the path from
// a or b to out is a single open transmission gate.
module tg_mux2 (
  input  logic sel,
  input  logic sel_n,
  input  logic a,
  input  logic b,
  output logic out
);

  always_comb begin
    out = sel ? a : b;
    // Both gates open (short between a and b) or both closed (floating
    // output) cannot happen when the select pair is complementary.
    assert (sel_n == ~sel)
      else $error("tg_mux2: select pair not complementary (sel=%b sel_n=%b)", sel, sel_n);
  end

endmodule
