// mrsa_sign_set -- applies the product sign to the unsigned MRSA result.
//
// When neg is set the magnitude x is negated: exactly as ~x + 1 (APPROX = 0,
// S-MRSA) or approximately as ~x (APPROX = 1, AS-MRSA), which skips the
// increment: a negative result comes out as ~x = -x - 1, one larger in
// magnitude than exact. When neg is clear x passes unchanged.
// Purely combinational.
module mrsa_sign_set #(
  parameter int W      = 16,
  parameter bit APPROX = 1'b0
) (
  input  logic [W-1:0] x,
  input  logic         neg,
  output logic [W-1:0] y
);
  if (APPROX) begin : g_approx
    assign y = neg ? ~x : x;
  end else begin : g_exact
    assign y = neg ? (~x + 1'b1) : x;
  end
endmodule
