// comp72_pkg: types and constants shared by the 7-2 compressor modules.
//
// A column of a carry-save reduction tree feeds a 7-2 compressor with seven
// bits of equal weight. They travel as one vector, col_in_t, with a1 in bit 0
// and a7 in bit 6. c72_out_t bundles the four outputs of one compressor with
// their weights relative to the column: sum (1), carry (2), cout1 (2) and
// cout2 (4).
package comp72_pkg;

  // Number of same-weight operand bits taken by one compressor.
  localparam int unsigned N_IN = 7;

  // Operand bits of one column: bit k holds a(k+1).
  typedef logic [N_IN-1:0] col_in_t;

  // Outputs of one compressor.
  typedef struct packed {
    logic cout2;  // weight 4, goes two columns up
    logic cout1;  // weight 2, goes one column up
    logic carry;  // weight 2, stays in the column's carry-save result
    logic sum;    // weight 1
  } c72_out_t;

endpackage
