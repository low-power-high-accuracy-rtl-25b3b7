// mod_full_adder -- carry-only full adder.
//
// Produces only the carry of a full adder, Cf = X0.X1 + X0.X2 + X1.X2, built as
// three AND gates feeding one OR gate (the majority of the three inputs). It is
// the building block the approximate compressors use for a group of three
// input bits. Purely combinational, no clock.
module mod_full_adder (
  input  logic x0,
  input  logic x1,
  input  logic x2,
  output logic cf
);
  assign cf = (x0 & x1) | (x0 & x2) | (x1 & x2);
endmodule
