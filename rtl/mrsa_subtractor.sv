// mrsa_subtractor -- subtracts a power of two: d = p - z.
//
// z = Ar * Br is one-hot (or zero), so no general subtractor is needed: the
// bits of p below the one of z are unchanged, and from that bit upward a
// borrow runs until the first 1 of p, flipping every bit it passes, that 1
// included. With m[i] = z[i] | (m[i-1] & ~p[i-1]) marking the bits the borrow
// reaches, d = p ^ m. The caller guarantees p >= z (true for the MRSA terms,
// whose approximate product is never negative). The borrow-chain form is this
// design's choice for the reduced subtractor. Purely combinational.
module mrsa_subtractor #(
  parameter int W = 16
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] z,
  output logic [W-1:0] d
);
  logic [W-1:0] m;
  assign m[0] = z[0];
  for (genvar i = 1; i < W; i++) begin : g_brw
    assign m[i] = z[i] | (m[i-1] & ~p[i-1]);
  end
  assign d = p ^ m;
endmodule
