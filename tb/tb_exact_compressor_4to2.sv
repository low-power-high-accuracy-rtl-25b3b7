// tb_exact_compressor_4to2 -- exhaustive test of the accurate 4:2 compressor.
// For all 32 input combinations: x0+x1+x2+x3+cin == sum + 2*(carry+cout), and
// cout does not depend on cin (so a chain of slices does not ripple).
module tb_exact_compressor_4to2;
  logic [3:0] x;
  logic       cin, sum, carry, cout, cout0;
  int checks = 0, failures = 0;

  exact_compressor_4to2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      cin = 1'b0;
      #1;
      cout0 = cout;
      for (int c = 0; c < 2; c++) begin
        cin = 1'(c);
        #1;
        checks++;
        if ($countones(x) + c != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> sum=%b carry=%b cout=%b", x, c, sum, carry, cout);
        end
        checks++;
        if (cout !== cout0) begin
          failures++;
          $display("FAIL cout depends on cin for x=%b", x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
