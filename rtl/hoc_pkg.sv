// hoc_pkg -- shared sizes and types of the compressor-based 8 x 8 multiplier.
//
// The partial-product matrix is carried as a packed 8 x 8 array,
// pp[i][j] = a[j] & b[i], whose bit sits at weight i + j.
package hoc_pkg;
  localparam int HOC_N  = 8;            // operand width
  localparam int HOC_PW = 2 * HOC_N;    // product width

  typedef logic [HOC_N-1:0][HOC_N-1:0] pp_matrix_t;
  typedef logic [HOC_PW-1:0]           hoc_row_t;
endpackage
