// tb_mrsa_sign_detector -- exhaustive test of the sign detector for 8-bit
// two's-complement operands: magnitudes (including 128 for -128) and the
// product sign.
module tb_mrsa_sign_detector;
  logic [7:0] a, b, abs_a, abs_b;
  logic       neg;
  int checks = 0, failures = 0;

  mrsa_sign_detector #(.N(8)) dut (.a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .neg(neg));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = -128; va < 128; va++) begin
      for (int vb = -128; vb < 128; vb++) begin
        a = 8'(va);
        b = 8'(vb);
        #1;
        checks++;
        if (int'(abs_a) != (va < 0 ? -va : va) || int'(abs_b) != (vb < 0 ? -vb : vb)
            || neg != ((va < 0) != (vb < 0))) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d |a|=%0d |b|=%0d neg=%b", va, vb, abs_a, abs_b, neg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
