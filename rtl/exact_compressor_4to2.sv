// exact_compressor_4to2 -- accurate 4:2 compressor with carry chain.
//
// Reduces four bits of one weight plus a carry-in from the slice below to a
// Sum bit (same weight), a Carry bit and a Cout bit (both one weight up), with
//   x0 + x1 + x2 + x3 + cin = sum + 2*(carry + cout).
// Cout depends only on x0..x2, never on cin, so a row of these slices chained
// cout -> cin has no rippling carry. The port list follows the usual accurate
// 4:2 compressor block (four inputs, Cin, Cout, Carry, Sum); the two-full-adder
// inside is the standard construction and is this design's choice.
// Purely combinational.
module exact_compressor_4to2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .cin(x[2]), .s(s1),  .c(cout));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .cin(cin),  .s(sum), .c(carry));
endmodule
