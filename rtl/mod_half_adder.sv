// mod_half_adder -- carry-only half adder.
//
// Produces only the carry of a half adder, Ch = X0 & X1 (a single AND gate).
// It is the building block the approximate compressors use for a group of two
// input bits; no sum output is produced because the approximate compressor
// builds its sum separately. Purely combinational, no clock.
module mod_half_adder (
  input  logic x0,
  input  logic x1,
  output logic ch
);
  assign ch = x0 & x1;
endmodule
