// ppm_reduction -- significance-driven reduction of the 8 x 8 partial-product
// matrix (PPM) to two rows.
//
// The 15 weights of the PPM are split in three bands. With the default
// LOWER_W = 4 these are the higher weights 8..14, the middle weights 4..7 and
// the lower weights 0..3, as in the published reduction diagram.
//
//   Lower weights (w < LOWER_W): inaccurate OR-tree. A column of height h > 2
//     keeps one bit and replaces the other h-1 bits by their OR; columns of one
//     or two bits pass. No carry leaves this band.
//   Middle weights (LOWER_W <= w <= 7): one approximate (w+1):2 compressor per
//     column (approx_compressor, N = 5..8). Its Sum stays, its Carry goes one
//     weight up; the Carry of weight 7 enters the higher band at weight 8.
//   Higher weights (8..14): exact. Stage 1 uses accurate 4:2 compressors and
//     three-input slices (full adders) chained Cout -> Cin:
//       w8 : C8a = {pp,pp,pp, middle carry}, C8b = {pp x4}
//       w9 : C9a = {pp x4, cin C8a.cout},    F9  = {pp, pp, cin C8b.cout}
//       w10: C10 = {pp x4, cin C9a.cout},    one pp passes
//       w11: F11 = {pp, pp, cin C10.cout},   two pp pass
//     which leaves at most four bits in weights 9..12. Stage 2 (higher band
//     only) is a chain of accurate 4:2 compressors on weights 9..12 followed by
//     a full adder at weight 13 that takes the two bits the weight-12
//     compressor sends up, so every weight ends with at most two bits.
//
// The band split, the OR-trees, the n:2 compressors in the middle, the 4:2
// compressor placement and carry chains of both stages follow the published
// diagram. Which bits of a column go into which compressor, the three-input
// slices being full adders, and the closing full adder at weight 13 (the
// diagram leaves those two bits unaccounted for) are this design's choices.
// LOWER_W may be raised to 8 to move middle weights into the OR-tree band; the
// higher band is fixed.
//
// Interface: pp in, row0/row1 out; the product is row0 + row1 (mod 2^16).
// Purely combinational.
module ppm_reduction
  import hoc_pkg::*;
#(
  parameter int LOWER_W = 4
) (
  input  pp_matrix_t pp,
  output hoc_row_t   row0,
  output hoc_row_t   row1
);
  if (LOWER_W < 4 || LOWER_W > 8) begin : g_bad
    $error("ppm_reduction: LOWER_W must be 4..8");
  end

  // col[w][k]: k-th bit of weight w, taken from pp[i][w-i] with i rising.
  logic [7:0] col [15];
  for (genvar w = 0; w < 15; w++) begin : g_col
    localparam int ILO = (w > 7) ? w - 7 : 0;
    localparam int H   = (w < 8) ? w + 1 : 15 - w;
    for (genvar k = 0; k < 8; k++) begin : g_bit
      if (k < H) begin : g_on
        assign col[w][k] = pp[ILO+k][w-ILO-k];
      end else begin : g_off
        assign col[w][k] = 1'b0;
      end
    end
  end

  // ---------------- lower band: OR-trees ----------------
  for (genvar w = 0; w < LOWER_W; w++) begin : g_low
    localparam int H = w + 1;
    if (H == 1) begin : g_h1
      assign row0[w] = col[w][0];
      assign row1[w] = 1'b0;
    end else if (H == 2) begin : g_h2
      assign row0[w] = col[w][0];
      assign row1[w] = col[w][1];
    end else begin : g_or
      assign row0[w] = |col[w][H-2:0];
      assign row1[w] = col[w][H-1];
    end
  end

  // ---------------- middle band: approximate n:2 compressors ----------------
  // mcar[w]: carry out of the middle compressor at weight w; the entry just
  // below the band is the (absent) carry into its lowest weight.
  logic [7:LOWER_W-1] mcar;
  logic               mid_c8;  // carry from weight 7 into weight 8

  assign mcar[LOWER_W-1] = 1'b0;
  for (genvar w = LOWER_W; w <= 7; w++) begin : g_mid
    approx_compressor #(.N(w + 1)) u_ac (
      .x(col[w][w:0]), .sum(row0[w]), .carry(mcar[w])
    );
    assign row1[w] = mcar[w-1];
  end
  assign mid_c8 = mcar[7];

  // ---------------- higher band, stage 1 ----------------
  logic s8a, y8a, co8a, s8b, y8b, co8b;
  logic s9a, y9a, co9a, s9b, y9b;
  logic s10, y10, co10;
  logic s11, y11;

  exact_compressor_4to2 u_c8a (.x({mid_c8, col[8][2:0]}), .cin(1'b0),
                               .sum(s8a), .carry(y8a), .cout(co8a));
  exact_compressor_4to2 u_c8b (.x(col[8][6:3]), .cin(1'b0),
                               .sum(s8b), .carry(y8b), .cout(co8b));
  exact_compressor_4to2 u_c9a (.x(col[9][3:0]), .cin(co8a),
                               .sum(s9a), .carry(y9a), .cout(co9a));
  full_adder            u_f9  (.a(col[9][4]), .b(col[9][5]), .cin(co8b),
                               .s(s9b), .c(y9b));
  exact_compressor_4to2 u_c10 (.x(col[10][3:0]), .cin(co9a),
                               .sum(s10), .carry(y10), .cout(co10));
  full_adder            u_f11 (.a(col[11][0]), .b(col[11][1]), .cin(co10),
                               .s(s11), .c(y11));

  // bits per weight after stage 1
  logic [3:0] st1_w9, st1_w10, st1_w11, st1_w12;
  assign st1_w9  = {y8b, y8a, s9b, s9a};
  assign st1_w10 = {y9b, y9a, col[10][4], s10};
  assign st1_w11 = {y10, col[11][3], col[11][2], s11};
  assign st1_w12 = {y11, col[12][2], col[12][1], col[12][0]};

  // ---------------- higher band, stage 2 ----------------
  logic t9, z9, k9, t10, z10, k10, t11, z11, k11, t12, z12, k12;
  logic t13, z13;

  exact_compressor_4to2 u_d9  (.x(st1_w9),  .cin(1'b0), .sum(t9),  .carry(z9),  .cout(k9));
  exact_compressor_4to2 u_d10 (.x(st1_w10), .cin(k9),   .sum(t10), .carry(z10), .cout(k10));
  exact_compressor_4to2 u_d11 (.x(st1_w11), .cin(k10),  .sum(t11), .carry(z11), .cout(k11));
  exact_compressor_4to2 u_d12 (.x(st1_w12), .cin(k11),  .sum(t12), .carry(z12), .cout(k12));
  full_adder            u_f13 (.a(z12), .b(k12), .cin(col[13][0]), .s(t13), .c(z13));

  // ---------------- final two rows, higher band ----------------
  assign row0[8]  = s8a;        assign row1[8]  = s8b;
  assign row0[9]  = t9;         assign row1[9]  = 1'b0;
  assign row0[10] = t10;        assign row1[10] = z9;
  assign row0[11] = t11;        assign row1[11] = z10;
  assign row0[12] = t12;        assign row1[12] = z11;
  assign row0[13] = t13;        assign row1[13] = col[13][1];
  assign row0[14] = col[14][0]; assign row1[14] = z13;
  assign row0[15] = 1'b0;       assign row1[15] = 1'b0;
endmodule
