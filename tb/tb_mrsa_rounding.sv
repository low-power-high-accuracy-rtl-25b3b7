// tb_mrsa_rounding -- exhaustive test of the power-of-two rounding for W = 8
// and W = 9 against the arithmetic rule (nearest power of two, halfway values
// rounded up except 3, which rounds to 2). The output must be one-hot or zero.
module tb_mrsa_rounding;
  import mult_ref_pkg::*;

  logic [8:0] a;
  logic [7:0] r8;
  logic [8:0] r9;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0;

  mrsa_rounding #(.W(8)) dut8 (.a(a[7:0]), .ar(r8));
  mrsa_rounding #(.W(9)) dut9 (.a(a),      .ar(r9));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = 0; v < 512; v++) begin
      a = 9'(v);
      #1;
      e = round_ref(v);
      if (v < 256) begin
        checks++;
        // a value that would round to 2^8 has no 8-bit code: the block gives 0
        if (int'(r8) != ((e == 256) ? 0 : e)) begin
          failures++;
          $display("FAIL W=8 a=%0d ar=%0d expected %0d", v, r8, e);
        end
      end
      checks++;
      if (int'(r9) != ((e == 512) ? 0 : e)) begin
        failures++;
        $display("FAIL W=9 a=%0d ar=%0d expected %0d", v, r9, e);
      end
      checks++;
      if ($countones(r9) > 1) begin
        failures++;
        $display("FAIL W=9 a=%0d ar=%b not one-hot", v, r9);
      end
      if (v < 256 && int'(r9) > v) n_up++;
      if (v < 256 && int'(r9) < v) n_down++;
    end
    $display("8-bit values rounded up: %0d, down: %0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
