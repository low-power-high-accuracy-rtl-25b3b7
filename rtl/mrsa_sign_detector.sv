// mrsa_sign_detector -- sign detector of the MRSA multiplier.
//
// Takes the two's-complement operands a and b, returns their absolute values
// as N-bit unsigned numbers and the sign of the product (sign of a XOR sign of
// b). The most negative input, -2^(N-1), gives the unsigned magnitude 2^(N-1),
// which still fits in N bits. The absolute value is formed exactly as
// ~x + 1 for a negative x; that circuit is this design's choice.
// Purely combinational.
module mrsa_sign_detector #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] abs_a,
  output logic [N-1:0] abs_b,
  output logic         neg
);
  assign abs_a = a[N-1] ? (~a + 1'b1) : a;
  assign abs_b = b[N-1] ? (~b + 1'b1) : b;
  assign neg   = a[N-1] ^ b[N-1];
endmodule
