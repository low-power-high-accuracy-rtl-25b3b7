// approx_mult_top -- the two approximate multipliers side by side.
//
// hoc_*  : unsigned 8 x 8 multiplier whose partial-product reduction uses exact
//          4:2 compressors in the high weights, approximate high-order n:2
//          compressors in the middle weights and OR-trees in the low weights.
// mrsa_* : rounding-based multiplier (MRSA) that rounds both operands to powers
//          of two and replaces the multiplication by shifts, one addition and
//          one power-of-two subtraction; signed S-MRSA by default.
// The two share no logic and have separate ports. Both are purely
// combinational: a product is valid one propagation delay after its operands.
module approx_mult_top
  import mrsa_pkg::*;
#(
  parameter int            HOC_LOWER_W  = 4,
  parameter int            MRSA_N       = 8,
  parameter mrsa_variant_e MRSA_VARIANT = S_MRSA
) (
  input  logic [7:0]          hoc_a,
  input  logic [7:0]          hoc_b,
  output logic [15:0]         hoc_p,
  input  logic [MRSA_N-1:0]   mrsa_a,
  input  logic [MRSA_N-1:0]   mrsa_b,
  output logic [2*MRSA_N-1:0] mrsa_p
);
  hoc_multiplier #(.LOWER_W(HOC_LOWER_W)) u_hoc (
    .a(hoc_a), .b(hoc_b), .p(hoc_p)
  );

  mrsa_multiplier #(.N(MRSA_N), .VARIANT(MRSA_VARIANT)) u_mrsa (
    .a(mrsa_a), .b(mrsa_b), .p(mrsa_p)
  );
endmodule
