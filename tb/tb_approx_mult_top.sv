// tb_approx_mult_top -- end-to-end test of both multipliers at their default
// parameters (8 x 8 compressor multiplier with LOWER_W = 4, signed 8-bit
// S-MRSA). Every one of the 65536 operand pairs is applied to both
// multipliers and compared with the reference models.
//
// It also counts how often each mechanism of the two designs is exercised and
// counts a failure for any that never occurs:
//   compressor multiplier: an OR-tree merging two or more ones (lossy), a
//   middle n:2 compressor giving an inexact count, the weight-7 carry entering
//   the exact band, the Cout -> Cin chain of the exact 4:2 compressors, and an
//   exact overall product;
//   MRSA: an operand rounded up, rounded down, left unchanged (power of two),
//   a negative product negated in the sign-set stage, a zero operand, the
//   most negative operand, and results above and below the exact product.
module tb_approx_mult_top;
  import mrsa_pkg::*;
  import mult_ref_pkg::*;

  logic [7:0]  hoc_a, hoc_b, mrsa_a, mrsa_b;
  logic [15:0] hoc_p, mrsa_p;
  int checks = 0, failures = 0;

  localparam int NM = 13;
  int    cnt [NM];
  string names [NM] = '{"or_tree_lossy", "mid_compressor_inexact", "mid_carry_into_high",
                        "exact_cout_chain", "hoc_exact_product", "round_up", "round_down",
                        "round_exact", "negate", "zero_operand", "most_negative",
                        "mrsa_above_exact", "mrsa_below_exact"};

  approx_mult_top u_dut (
    .hoc_a(hoc_a), .hoc_b(hoc_b), .hoc_p(hoc_p),
    .mrsa_a(mrsa_a), .mrsa_b(mrsa_b), .mrsa_p(mrsa_p)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x;
    logic s, c;
    int h, sa, sb, ra, ref_m;
    for (int i = 0; i < NM; i++) cnt[i] = 0;
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        hoc_a = 8'(va);  hoc_b = 8'(vb);
        mrsa_a = 8'(va); mrsa_b = 8'(vb);
        #1;
        // ---- compressor multiplier ----
        checks++;
        if (hoc_p !== hoc_ref(hoc_a, hoc_b, 4)) begin
          failures++;
          if (failures < 10) $display("FAIL hoc a=%0d b=%0d p=%0d ref=%0d", va, vb, hoc_p, hoc_ref(hoc_a, hoc_b, 4));
        end
        for (int w = 2; w < 4; w++) begin
          int ones;
          ones = 0;
          for (int k = 0; k < w; k++) ones += int'(pp_bit(hoc_a, hoc_b, w, k));
          if (ones >= 2) begin cnt[0]++; break; end
        end
        for (int w = 4; w < 8; w++) begin
          h = w + 1;
          x = '0;
          for (int k = 0; k < h; k++) x[k] = pp_bit(hoc_a, hoc_b, w, k);
          ac_ref(x, h, s, c);
          if (2 * int'(c) + int'(s) != $countones(x)) begin cnt[1]++; break; end
        end
        if (u_dut.u_hoc.u_ppm.mid_c8) cnt[2]++;
        if (u_dut.u_hoc.u_ppm.co8a & u_dut.u_hoc.u_ppm.k9) cnt[3]++;
        if (int'(hoc_p) == va * vb) cnt[4]++;
        // ---- MRSA ----
        sa = int'($signed(mrsa_a));
        sb = int'($signed(mrsa_b));
        ref_m = mrsa_ref(sa, sb, S_MRSA);
        checks++;
        if (int'($signed(mrsa_p)) != ref_m) begin
          failures++;
          if (failures < 10) $display("FAIL mrsa a=%0d b=%0d p=%0d ref=%0d", sa, sb, $signed(mrsa_p), ref_m);
        end
        ra = round_ref(sa < 0 ? -sa : sa);
        if (ra > (sa < 0 ? -sa : sa)) cnt[5]++;
        if (ra < (sa < 0 ? -sa : sa)) cnt[6]++;
        if (ra == (sa < 0 ? -sa : sa) && sa != 0) cnt[7]++;
        if ((sa < 0) != (sb < 0) && sa != 0 && sb != 0) cnt[8]++;
        if (sa == 0 || sb == 0) cnt[9]++;
        if (sa == -128 || sb == -128) cnt[10]++;
        if (int'($signed(mrsa_p)) > (sa * sb) && sa * sb >= 0) cnt[11]++;
        if (int'($signed(mrsa_p)) < (sa * sb) && sa * sb >= 0) cnt[12]++;
      end
    end
    for (int i = 0; i < NM; i++) begin
      $display("mechanism %-24s occurred %0d times", names[i], cnt[i]);
      checks++;
      if (cnt[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", names[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
