// compressor_row: a row of 7-2 compressors on adjacent columns, as they sit
// in one stage of a multiplier's partial-product reduction tree.
//
// Column i (i = 0 is the least significant) compresses seven operand bits of
// weight 2^i. Its cout1 (weight 2^(i+1)) drives cin1 of column i+1 and its
// cout2 (weight 2^(i+2)) drives cin2 of column i+2. Because a compressor's
// cout1/cout2 never depend on its own carry inputs, every column settles in
// one compressor delay no matter how wide the row is: the carries move at
// most two columns and stop.
// Carry inputs with no neighbour inside the row come from outside:
// cin1_in is cin1 of column 0, cin2_in[0] and cin2_in[1] are cin2 of columns
// 0 and 1. The carries that leave the row are col_out[COLUMNS-1].cout1,
// col_out[COLUMNS-2].cout2 and col_out[COLUMNS-1].cout2; the other cout bits
// in col_out are consumed inside the row and are brought out for observation.
// Arithmetic: sum over i of 2^i*(popcount(a[i])) + cin1_in + cin2_in[0]
//   + 2*cin2_in[1] = sum over i of 2^i*(sum + 2*carry) of column i
//   + 2^COLUMNS*(cout1[C-1] + cout2[C-2]) + 2^(COLUMNS+1)*cout2[C-1].
// The default of three columns is the arrangement the compressor was
// characterised in. Taking the uncovered carry inputs from
// ports and bringing every column's couts out are choices of this
// implementation. Combinational. COLUMNS must be at least 2.
module compressor_row #(
  parameter int unsigned COLUMNS = 3
) (
  input  comp72_pkg::col_in_t  [COLUMNS-1:0] a,
  input  logic                               cin1_in,
  input  logic                 [1:0]         cin2_in,
  output comp72_pkg::c72_out_t [COLUMNS-1:0] col_out
);

  if (COLUMNS < 2) begin : g_bad_size
    $error("compressor_row: COLUMNS must be at least 2");
  end

  logic [COLUMNS-1:0] cin1, cin2;

  for (genvar i = 0; i < COLUMNS; i++) begin : g_col
    if (i == 0) begin : g_c1_ext
      assign cin1[i] = cin1_in;
    end else begin : g_c1_int
      assign cin1[i] = col_out[i-1].cout1;
    end

    if (i < 2) begin : g_c2_ext
      assign cin2[i] = cin2_in[i];
    end else begin : g_c2_int
      assign cin2[i] = col_out[i-2].cout2;
    end

    compressor_7_2 u_c72 (
      .a    (a[i]),
      .cin1 (cin1[i]),
      .cin2 (cin2[i]),
      .sum  (col_out[i].sum),
      .carry(col_out[i].carry),
      .cout1(col_out[i].cout1),
      .cout2(col_out[i].cout2)
    );
  end

endmodule
