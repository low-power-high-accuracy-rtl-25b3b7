// mrsa_multiplier -- rounding-based approximate multiplier (MRSA).
//
// Idea: with Ar and Br the operands rounded to the nearest power of two,
//   A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br.
// The first term is small and is dropped; the other three are products with a
// power of two, i.e. shifts. So the multiplier computes
//   |P| = Ar*|B| + Br*|A| - Ar*Br
// with three barrel shifters, one Kogge-Stone adder and a power-of-two
// subtractor, and no partial-product array at all.
//
// Datapath (left to right): sign detector (absolute values, product sign) ->
// rounding of both magnitudes -> shifters forming Br*A, Ar*B and Ar*Br ->
// Kogge-Stone adder (Ar*B + Br*A) -> subtractor (minus Ar*Br) -> sign set.
//
// VARIANT selects the published variants: S_MRSA (signed, exact negation, the
// default), AS_MRSA (signed, the +1 of the negation skipped) and U_MRSA
// (unsigned; sign detector and sign set omitted). For signed operands the
// magnitudes have N bits and the adder is 2N bits wide. For U_MRSA an
// operand may have both top bits set and round up to 2^N, so the magnitudes
// are zero-extended to N+1 bits and the internal width grows to 2N+1; the
// result itself always fits in 2N bits. This widening is this design's
// choice.
//
// Interface: a, b (N bits, two's complement or unsigned per VARIANT) in;
// p (2N bits) out. Purely combinational.
module mrsa_multiplier
  import mrsa_pkg::*;
#(
  parameter int            N       = 8,
  parameter mrsa_variant_e VARIANT = S_MRSA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam bit SIGNED = (VARIANT != U_MRSA);
  localparam int RW     = SIGNED ? N : N + 1;          // magnitude / rounded width
  localparam int PW     = SIGNED ? 2 * N : 2 * N + 1;  // internal product width

  logic [RW-1:0] abs_a, abs_b, ar, br;
  logic          neg;

  if (SIGNED) begin : g_sdet
    mrsa_sign_detector #(.N(N)) u_sdet (
      .a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .neg(neg)
    );
  end else begin : g_nosdet
    assign abs_a = {1'b0, a};
    assign abs_b = {1'b0, b};
    assign neg   = 1'b0;
  end

  mrsa_rounding #(.W(RW)) u_rnd_a (.a(abs_a), .ar(ar));
  mrsa_rounding #(.W(RW)) u_rnd_b (.a(abs_b), .ar(br));

  logic [PW-1:0] br_x_a, ar_x_b, ar_x_br;
  mrsa_shifter #(.WX(RW), .WS(RW), .WO(PW)) u_sh_bra  (.x(abs_a), .sel(br), .y(br_x_a));
  mrsa_shifter #(.WX(RW), .WS(RW), .WO(PW)) u_sh_arb  (.x(abs_b), .sel(ar), .y(ar_x_b));
  mrsa_shifter #(.WX(RW), .WS(RW), .WO(PW)) u_sh_arbr (.x(br),    .sel(ar), .y(ar_x_br));

  logic [PW-1:0] psum, mag;
  kogge_stone_adder #(.W(PW)) u_ks (.a(ar_x_b), .b(br_x_a), .sum(psum));  // Ar*B + Br*A < 2^PW

  mrsa_subtractor #(.W(PW)) u_sub (.p(psum), .z(ar_x_br), .d(mag));

  if (SIGNED) begin : g_sset
    mrsa_sign_set #(.W(2 * N), .APPROX(VARIANT == AS_MRSA)) u_sset (
      .x(mag[2*N-1:0]), .neg(neg), .y(p)
    );
  end else begin : g_nosset
    assign p = mag[2*N-1:0];
  end
endmodule
