// tb_approx_compressor -- exhaustive test of the approximate n:2 compressor for
// n = 5, 6, 7 and 8 against the Sum and Carry equations of the reference
// model. Also reports how often 2*Carry + Sum equals the true bit count.
module tb_approx_compressor;
  import mult_ref_pkg::*;

  logic [7:0] x;
  logic [3:0] s, c;
  int checks = 0, failures = 0;
  int exact [4];

  approx_compressor #(.N(5)) dut5 (.x(x[4:0]), .sum(s[0]), .carry(c[0]));
  approx_compressor #(.N(6)) dut6 (.x(x[5:0]), .sum(s[1]), .carry(c[1]));
  approx_compressor #(.N(7)) dut7 (.x(x[6:0]), .sum(s[2]), .carry(c[2]));
  approx_compressor #(.N(8)) dut8 (.x(x[7:0]), .sum(s[3]), .carry(c[3]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic rs, rc;
    logic [7:0] xm;
    for (int n = 0; n < 4; n++) exact[n] = 0;
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      for (int n = 5; n <= 8; n++) begin
        xm = x & 8'((1 << n) - 1);
        ac_ref(xm, n, rs, rc);
        checks++;
        if (s[n-5] !== rs || c[n-5] !== rc) begin
          failures++;
          $display("FAIL n=%0d x=%b: sum=%b carry=%b expected %b %b",
                   n, xm, s[n-5], c[n-5], rs, rc);
        end
        if (v < (1 << n) && 2 * int'(rc) + int'(rs) == $countones(xm)) exact[n-5]++;
      end
    end
    for (int n = 5; n <= 8; n++)
      $display("n=%0d: %0d of %0d inputs compressed exactly", n, exact[n-5], 1 << n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
