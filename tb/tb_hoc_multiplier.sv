// tb_hoc_multiplier -- exhaustive test of the approximate 8 x 8 multiplier.
// Every product is compared with the reference model; the error against the
// exact product is also accumulated and reported (error rate, mean relative
// error, largest absolute error). Products of operands with an empty low
// nibble involve only the exact higher band and must be exact.
module tb_hoc_multiplier;
  import mult_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int  n_err = 0, max_err = 0, exact, e;
  real sum_red = 0.0;

  hoc_multiplier dut (.a(a), .b(b), .p(p));

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
        a = 8'(va);
        b = 8'(vb);
        #1;
        checks++;
        if (p !== hoc_ref(a, b, 4)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d ref=%0d", va, vb, p, hoc_ref(a, b, 4));
        end
        exact = va * vb;
        e = int'(p) - exact;
        if (e != 0) n_err++;
        if ((e < 0 ? -e : e) > max_err) max_err = (e < 0 ? -e : e);
        if (exact != 0) sum_red += real'(e < 0 ? -e : e) / real'(exact);
        if (a[3:0] == 0 && b[3:0] == 0) begin
          checks++;
          if (int'(p) != exact) begin
            failures++;
            $display("FAIL not exact: a=%0d b=%0d p=%0d", va, vb, p);
          end
        end
      end
    end
    $display("error rate %0.2f%%, mean relative error %0.3f%%, max |error| %0d",
             100.0 * n_err / 65536.0, 100.0 * sum_red / 65025.0, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
