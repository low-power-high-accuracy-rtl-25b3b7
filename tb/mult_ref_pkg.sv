// mult_ref_pkg -- reference models used by the testbenches.
//
// Written from the arithmetic definitions, not from the RTL structure:
//   hoc_ref   : value of the compressor-based multiplier, column by column
//               (exact popcount in the higher weights, the approximate
//               compressor equations in the middle, OR-trees in the lower).
//   ac_ref    : Sum and Carry of the approximate n:2 compressor, written out
//               per n as XOR/AND/majority expressions.
//   round_ref : nearest power of two, halfway values rounded up except 3.
//   mrsa_ref  : Ar*B + Br*A - Ar*Br with signs applied per variant.
package mult_ref_pkg;
  import mrsa_pkg::*;

  function automatic logic maj(logic a, logic b, logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  // Sum and Carry of the approximate n:2 compressor for n = 5..8.
  function automatic void ac_ref(input logic [7:0] x, input int n,
                                 output logic s, output logic c);
    logic o012, o345;
    o012 = x[0] | x[1] | x[2];
    o345 = x[3] | x[4] | x[5];
    case (n)
      5: begin
        c = maj(x[0], x[1], x[2]) | (x[3] & x[4]) | (o012 & (x[3] | x[4]));
        s = ((x[0] ^ x[1]) & (x[2] ^ x[3])) | x[4];
      end
      6: begin
        c = maj(x[0], x[1], x[2]) | maj(x[3], x[4], x[5]) | (o012 & o345);
        s = ((x[0] ^ x[1]) & (x[2] ^ x[3])) | x[4] | x[5];
      end
      7: begin
        c = maj(x[0], x[1], x[2]) | maj(x[3], x[4], x[5]) | maj(o012, o345, x[6]);
        s = ((x[0] ^ x[1]) & (x[2] ^ x[3])) | x[4] | x[5] | x[6];
      end
      default: begin
        c = maj(x[0], x[1], x[2]) | maj(x[3], x[4], x[5]) | (x[6] & x[7])
          | maj(o012, o345, x[6] | x[7]);
        s = ((x[0] ^ x[1]) & (x[2] ^ x[3])) | ((x[4] ^ x[5]) & (x[6] ^ x[7]));
      end
    endcase
  endfunction

  // k-th bit of weight w of the partial-product matrix: a[w-i] & b[i], i rising.
  function automatic logic pp_bit(logic [7:0] a, logic [7:0] b, int w, int k);
    int i;
    i = ((w > 7) ? w - 7 : 0) + k;
    return a[w-i] & b[i];
  endfunction

  function automatic int col_height(int w);
    return (w < 8) ? w + 1 : 15 - w;
  endfunction

  function automatic logic [15:0] hoc_ref(logic [7:0] a, logic [7:0] b, int lower_w);
    longint total;
    logic [7:0] x;
    logic s, c;
    int h;
    total = 0;
    for (int w = 0; w < 15; w++) begin
      h = col_height(w);
      x = '0;
      for (int k = 0; k < h; k++) x[k] = pp_bit(a, b, w, k);
      if (w < lower_w) begin
        if (h <= 2) total += (longint'(x[0]) + longint'(x[1])) << w;
        else begin
          logic o;
          o = 1'b0;
          for (int k = 0; k < h - 1; k++) o |= x[k];
          total += (longint'(o) + longint'(x[h-1])) << w;
        end
      end else if (w <= 7) begin
        ac_ref(x, h, s, c);
        total += (longint'(s) << w) + (longint'(c) << (w + 1));
      end else begin
        total += longint'($countones(x)) << w;
      end
    end
    return total[15:0];
  endfunction

  // Nearest power of two; ties (3 * 2^(p-2)) go up, except 3 -> 2. 0 -> 0.
  function automatic int round_ref(int x);
    int k;
    if (x == 0) return 0;
    k = 0;
    while ((1 << (k + 1)) <= x) k++;
    if (x != 3 && k >= 1 && x >= 3 * (1 << (k - 1))) return 1 << (k + 1);
    return 1 << k;
  endfunction

  function automatic int mrsa_ref(int a, int b, mrsa_variant_e v);
    int aa, bb, ar, br, m;
    bit neg;
    aa = (a < 0) ? -a : a;
    bb = (b < 0) ? -b : b;
    neg = (a < 0) != (b < 0);
    ar = round_ref(aa);
    br = round_ref(bb);
    m = ar * bb + br * aa - ar * br;
    if (neg) return (v == AS_MRSA) ? -m - 1 : -m;
    return m;
  endfunction
endpackage
