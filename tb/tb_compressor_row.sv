// tb_compressor_row: end-to-end test of the compressor row at its default
// size (three columns, as in the arrangement the compressor was measured in).
//
// All 2^24 combinations of the 21 operand bits and the three external carry
// inputs are applied. A bit-exact reference model, written from arithmetic
// only, predicts every output of every column:
//   n = ones among the column's seven operands, k = floor(n/2) (0..3);
//   cout1 = k mod 2, cout2 = k div 2      (the weight-2 bits of the operands)
//   cin1/cin2 = external inputs or the reference couts of columns i-1 / i-2;
//   sum, carry = the two-bit count of (n mod 2) + cin1 + cin2.
// The weighted totals of inputs and outputs are compared as well.
// Mechanisms that must each be seen at least once, counted per column:
//   - all eight rows of the (Y, Z, X) truth table that steers So1 and Co1
//   - Co1 taken from the a1^a2^a3 path and from the a7 path
//   - a carry passed on inside the row through cin1 and through cin2
//   - a carry leaving the row, and a column with all nine inputs high
//   - external carry inputs changing with every cout bit held (no ripple)
module tb_compressor_row;
  import comp72_pkg::*;

  localparam int C = 3;                 // default COLUMNS of compressor_row
  localparam int NBITS = 7 * C + 3;

  int checks = 0, failures = 0;

  col_in_t  [C-1:0] a;
  logic             cin1_in;
  logic     [1:0]   cin2_in;
  c72_out_t [C-1:0] col_out;

  compressor_row dut (.a(a), .cin1_in(cin1_in), .cin2_in(cin2_in), .col_out(col_out));

  int unsigned table_row [8];
  int unsigned co1_from_s1 = 0, co1_from_a7 = 0;
  int unsigned pass_cin1 = 0, pass_cin2 = 0, carry_out_row = 0, full_column = 0;
  int unsigned held_couts = 0;

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of the whole row; returns the expected col_out.
  function automatic logic [4*C-1:0] ref_row(col_in_t [C-1:0] av, logic c1, logic [1:0] c2);
    c72_out_t [C-1:0] r;
    for (int i = 0; i < C; i++) begin
      int n, k, t;
      logic ci1, ci2;
      n   = $countones(av[i]);
      k   = n / 2;
      r[i].cout1 = 1'(k % 2);
      r[i].cout2 = 1'(k / 2);
      ci1 = (i == 0) ? c1 : r[i-1].cout1;
      ci2 = (i < 2) ? c2[i] : r[i-2].cout2;
      t   = (n % 2) + int'(ci1) + int'(ci2);
      r[i].sum   = 1'(t % 2);
      r[i].carry = 1'(t / 2);
    end
    return r;
  endfunction

  function automatic bit couts_equal(c72_out_t [C-1:0] p, c72_out_t [C-1:0] q);
    for (int i = 0; i < C; i++)
      if (p[i].cout1 !== q[i].cout1 || p[i].cout2 !== q[i].cout2) return 1'b0;
    return 1'b1;
  endfunction

  task automatic apply_and_check(logic [NBITS-1:0] v);
    c72_out_t [C-1:0] exp;
    longint in_total, out_total;
    a       = v[7*C-1:0];
    cin1_in = v[7*C];
    cin2_in = v[7*C+2:7*C+1];
    #1;
    exp = ref_row(a, cin1_in, cin2_in);
    checks++;
    if (col_out !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL v=%h got=%h exp=%h", v, col_out, exp);
    end
    in_total  = longint'(cin1_in) + longint'(cin2_in[0]) + 2 * longint'(cin2_in[1]);
    out_total = 0;
    for (int i = 0; i < C; i++) begin
      in_total  += longint'($countones(a[i])) << i;
      out_total += (longint'(col_out[i].sum) + 2 * longint'(col_out[i].carry)) << i;
    end
    out_total += (longint'(col_out[C-1].cout1) + longint'(col_out[C-2].cout2)) << C;
    out_total += longint'(col_out[C-1].cout2) << (C + 1);
    checks++;
    if (in_total != out_total) begin
      failures++;
      if (failures < 10) $display("FAIL totals v=%h in=%0d out=%0d", v, in_total, out_total);
    end
    // Mechanism coverage, from the inputs and the row's outputs.
    for (int i = 0; i < C; i++) begin
      logic xs, zs, ys;
      xs = a[i][1] ^ a[i][2];
      zs = a[i][3] ^ a[i][4];
      ys = a[i][5] ^ a[i][6];
      table_row[{ys, zs, xs}]++;
      if (ys ^ zs) co1_from_s1++;
      else         co1_from_a7++;
      if (i < C - 1 && col_out[i].cout1) pass_cin1++;
      if (i < C - 2 && col_out[i].cout2) pass_cin2++;
      if (&a[i] && (i > 0 ? col_out[i-1].cout1 : cin1_in)
                && (i > 1 ? col_out[i-2].cout2 : cin2_in[i])) full_column++;
    end
    if (col_out[C-1].cout1 || col_out[C-1].cout2 || col_out[C-2].cout2) carry_out_row++;
  endtask

  initial begin
    for (longint v = 0; v < (longint'(1) << NBITS); v++) begin
      c72_out_t [C-1:0] held;
      apply_and_check(NBITS'(v));
      // Every eighth vector, flip the external carries and check that no
      // cout bit moves.
      if (v % 8 == 0) begin
        held = col_out;
        {cin2_in, cin1_in} = ~{cin2_in, cin1_in};
        #1;
        checks++;
        if (!couts_equal(col_out, held)) begin
          failures++;
          if (failures < 10) $display("FAIL cout moved with carry inputs v=%h", v);
        end else begin
          held_couts++;
        end
      end
    end

    for (int r = 0; r < 8; r++) begin
      $display("truth-table row Y,Z,X=%03b hit %0d times", r, table_row[r]);
      if (table_row[r] == 0) failures++;
    end
    $display("Co1 from a1^a2^a3 path %0d, from a7 path %0d", co1_from_s1, co1_from_a7);
    $display("carries passed via cin1 %0d, via cin2 %0d, leaving row %0d",
             pass_cin1, pass_cin2, carry_out_row);
    $display("full columns %0d, carry-input flips with couts held %0d", full_column, held_couts);
    if (co1_from_s1 == 0 || co1_from_a7 == 0) failures++;
    if (pass_cin1 == 0 || pass_cin2 == 0 || carry_out_row == 0) failures++;
    if (full_column == 0 || held_couts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
