// mrsa_rounding -- rounds an unsigned W-bit value to the nearest power of two.
//
// The output ar is one-hot (or zero for a zero input). Bit i of ar is set when
//   - a[i] is the leading one of a and a[i-1] is 0 (round down to 2^i), or
//   - all bits from i upward are 0 and a[i-1], a[i-2] are both 1 (the leading
//     one is at i-1 and the value is at least 3 * 2^(i-2): round up to 2^i).
// A value exactly halfway, 3 * 2^(p-2), therefore rounds up, except 3, which
// rounds down to 2: the three lowest output bits use the shortened terms
//   ar[2] = a[2] & ~a[1] & (no higher bit set)
//   ar[1] = a[1] & (no higher bit set)
//   ar[0] = a[0] & (no higher bit set).
// These are the published bit equations of the rounding block. The top output
// bit uses the same general term with nothing above it, so a value whose two
// top bits are both set rounds to 2^W and gives ar = 0; callers keep the top
// input bit of a signed magnitude at zero (or zero-extend an unsigned value by
// one bit) so that this never happens. W >= 4. Purely combinational.
module mrsa_rounding #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] ar
);
  if (W < 4) begin : g_bad
    $error("mrsa_rounding: W must be at least 4");
  end

  // none_above[i] = 1 when a[W-1:i+1] are all zero
  logic [W-1:0] none_above;
  assign none_above[W-1] = 1'b1;
  for (genvar i = W - 2; i >= 0; i--) begin : g_na
    assign none_above[i] = none_above[i+1] & ~a[i+1];
  end

  for (genvar i = 3; i < W; i++) begin : g_gen
    assign ar[i] = ((~a[i] & a[i-1] & a[i-2]) | (a[i] & ~a[i-1])) & none_above[i];
  end
  assign ar[2] = a[2] & ~a[1] & none_above[2];
  assign ar[1] = a[1] & none_above[1];
  assign ar[0] = a[0] & none_above[0];
endmodule
