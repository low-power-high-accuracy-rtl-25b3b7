// approx_compressor -- high-order approximate N:2 compressor (N = 5..8).
//
// Reduces the N bits of one weight to a Sum bit (same weight) and a Carry bit
// (next weight). There is no carry-in and no carry-out: the carry chain of an
// exact compressor is dropped to save logic.
//
// Carry: the inputs are split into groups of three, x[0..2], x[3..5], ..., the
// last group holding what is left (two bits, or one). Each group of three gives
// a majority carry (mod_full_adder), a group of two an AND carry
// (mod_half_adder), a single bit none. A second level forms the OR of each
// group and takes the carry of those OR values (half-adder carry for two
// groups, full-adder carry for three). Carry is the OR of all of these. For
// N = 5 this is Cf(x0,x1,x2) + Ch(x3,x4) + Ch(x0+x1+x2, x3+x4) and for N = 8 it
// is Cf(x0..x2) + Cf(x3..x5) + Ch(x6,x7) + Cf(x0+x1+x2, x3+x4+x5, x6+x7), as
// published for this compressor. N = 6 and N = 7 follow the same grouping rule,
// which is this design's extension.
//
// Sum: no XOR gates. Every block of four inputs is reduced by two XNOR gates
// and a NOR of their outputs (so a block gives (x0^x1)&(x2^x3)); the block
// outputs and the inputs left over after the last whole block of four are ORed
// together. For N = 5 this is the published XNOR/NOR/OR tree; N = 8 uses two
// such blocks and one OR; the treatment of the leftover bits for N = 6 and 7 is
// this design's choice.
//
// Purely combinational.
module approx_compressor #(
  parameter int N = 5
) (
  input  logic [N-1:0] x,
  output logic         sum,
  output logic         carry
);
  localparam int NG = (N + 2) / 3;  // carry groups
  localparam int NB = N / 4;        // XNOR/NOR sum blocks

  if (N < 5 || N > 8) begin : g_bad_n
    $error("approx_compressor: N must be 5..8");
  end

  // ---------------- carry ----------------
  logic [NG-1:0] grp_c;   // carry of each group
  logic [NG-1:0] grp_or;  // OR of each group
  logic          top_c;   // carry of the group ORs

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LO = 3 * g;
    localparam int SZ = (N - LO) >= 3 ? 3 : (N - LO);
    if (SZ == 3) begin : g_fa
      mod_full_adder u_mfa (.x0(x[LO]), .x1(x[LO+1]), .x2(x[LO+2]), .cf(grp_c[g]));
      assign grp_or[g] = x[LO] | x[LO+1] | x[LO+2];
    end else if (SZ == 2) begin : g_ha
      mod_half_adder u_mha (.x0(x[LO]), .x1(x[LO+1]), .ch(grp_c[g]));
      assign grp_or[g] = x[LO] | x[LO+1];
    end else begin : g_one
      assign grp_c[g]  = 1'b0;
      assign grp_or[g] = x[LO];
    end
  end

  if (NG == 3) begin : g_top3
    mod_full_adder u_top (.x0(grp_or[0]), .x1(grp_or[1]), .x2(grp_or[2]), .cf(top_c));
  end else begin : g_top2
    mod_half_adder u_top (.x0(grp_or[0]), .x1(grp_or[1]), .ch(top_c));
  end

  assign carry = (|grp_c) | top_c;

  // ---------------- sum ----------------
  logic [NB-1:0] blk;
  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic xn0, xn1;
    assign xn0    = ~(x[4*k]   ^ x[4*k+1]);
    assign xn1    = ~(x[4*k+2] ^ x[4*k+3]);
    assign blk[k] = ~(xn0 | xn1);
  end

  if (N > 4 * NB) begin : g_rest
    assign sum = (|blk) | (|x[N-1:4*NB]);
  end else begin : g_norest
    assign sum = |blk;
  end
endmodule
