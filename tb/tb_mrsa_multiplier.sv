// tb_mrsa_multiplier -- exhaustive test of the three MRSA variants at N = 8.
// S-MRSA and AS-MRSA take every pair of signed operands, U-MRSA every pair of
// unsigned operands; each result is compared with the reference
// Ar*B + Br*A - Ar*Br (sign applied, exact or approximate negation). Also
// checks that the approximate product is exact when both operands are powers
// of two, and reports the mean relative error of each variant.
module tb_mrsa_multiplier;
  import mrsa_pkg::*;
  import mult_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] ps, pas, pu;
  int checks = 0, failures = 0;
  real red_s = 0.0, red_as = 0.0, red_u = 0.0;
  int  exact, got;

  mrsa_multiplier #(.N(8), .VARIANT(S_MRSA))  dut_s  (.a(a), .b(b), .p(ps));
  mrsa_multiplier #(.N(8), .VARIANT(AS_MRSA)) dut_as (.a(a), .b(b), .p(pas));
  mrsa_multiplier #(.N(8), .VARIANT(U_MRSA))  dut_u  (.a(a), .b(b), .p(pu));

  function automatic real rel(int got_v, int exact_v);
    int d;
    d = got_v - exact_v;
    if (exact_v == 0) return 0.0;
    return real'(d < 0 ? -d : d) / real'(exact_v < 0 ? -exact_v : exact_v);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        int sa, sb;
        a = 8'(va);
        b = 8'(vb);
        sa = int'($signed(a));
        sb = int'($signed(b));
        #1;
        checks++;
        if (int'($signed(ps)) != mrsa_ref(sa, sb, S_MRSA)) begin
          failures++;
          if (failures < 10) $display("FAIL S  a=%0d b=%0d p=%0d ref=%0d", sa, sb, $signed(ps), mrsa_ref(sa, sb, S_MRSA));
        end
        checks++;
        if (int'($signed(pas)) != mrsa_ref(sa, sb, AS_MRSA)) begin
          failures++;
          if (failures < 10) $display("FAIL AS a=%0d b=%0d p=%0d ref=%0d", sa, sb, $signed(pas), mrsa_ref(sa, sb, AS_MRSA));
        end
        checks++;
        if (int'(pu) != mrsa_ref(va, vb, U_MRSA)) begin
          failures++;
          if (failures < 10) $display("FAIL U  a=%0d b=%0d p=%0d ref=%0d", va, vb, pu, mrsa_ref(va, vb, U_MRSA));
        end
        if ($countones(a) == 1 && $countones(b) == 1 && va < 128 && vb < 128) begin
          checks++;
          if (int'(pu) != va * vb || int'($signed(ps)) != sa * sb) begin
            failures++;
            $display("FAIL powers of two not exact: a=%0d b=%0d", va, vb);
          end
        end
        red_s  += rel(int'($signed(ps)), sa * sb);
        red_as += rel(int'($signed(pas)), sa * sb);
        red_u  += rel(int'(pu), va * vb);
      end
    end
    $display("mean relative error: S-MRSA %0.3f%%, AS-MRSA %0.3f%%, U-MRSA %0.3f%%",
             100.0 * red_s / 65025.0, 100.0 * red_as / 65025.0, 100.0 * red_u / 65025.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
