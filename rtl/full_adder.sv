// full_adder -- exact one-bit full adder.
//
// s + 2*c = a + b + cin. Used as the building block of the exact 4:2
// compressor and as the three-input slices of the exact (higher-weight) part of
// the partial-product reduction. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic c
);
  assign s = a ^ b ^ cin;
  assign c = (a & b) | (a & cin) | (b & cin);
endmodule
