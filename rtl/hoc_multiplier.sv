// hoc_multiplier -- approximate unsigned 8 x 8 multiplier with high-order
// compressors.
//
// Three parts, as in a conventional multiplier: an AND array forms the 64
// partial products pp[i][j] = a[j] & b[i]; ppm_reduction squeezes the matrix to
// two rows, exactly in the higher weights and approximately in the middle
// (high-order n:2 compressors) and lower (OR-trees) weights; a carry-propagate
// adder adds the two rows. The carry-propagate adder is written as a plain
// addition and left to synthesis, since no particular adder is prescribed for
// it; the sum is kept to 16 bits.
//
// Interface: a, b unsigned 8-bit in; p 16-bit approximate product out.
// Purely combinational; LOWER_W sets how many low weights use OR-trees (4..8).
module hoc_multiplier
  import hoc_pkg::*;
#(
  parameter int LOWER_W = 4
) (
  input  logic [HOC_N-1:0] a,
  input  logic [HOC_N-1:0] b,
  output hoc_row_t         p
);
  pp_matrix_t pp;
  hoc_row_t   row0, row1;

  always_comb begin
    for (int i = 0; i < HOC_N; i++)
      pp[i] = a & {HOC_N{b[i]}};
  end

  ppm_reduction #(.LOWER_W(LOWER_W)) u_ppm (.pp(pp), .row0(row0), .row1(row1));

  assign p = row0 + row1;
endmodule
