// tb_ppm_reduction -- exhaustive test of the partial-product reduction.
// For every 8-bit a, b the two output rows must add up (mod 2^16) to the
// reference value of the approximate product; this is checked for the default
// split (LOWER_W = 4) and for an all-OR-tree lower half (LOWER_W = 8). It also
// checks that each final weight of the higher band carries its bits exactly:
// when a and b have no bits in their low nibble the low weights are empty and
// the rows must sum to the exact product.
module tb_ppm_reduction;
  import hoc_pkg::*;
  import mult_ref_pkg::*;

  logic [7:0] a, b;
  pp_matrix_t pp;
  hoc_row_t   r0, r1, q0, q1;
  logic [15:0] sum4, sum8;
  int checks = 0, failures = 0;

  always_comb
    for (int i = 0; i < 8; i++) pp[i] = a & {8{b[i]}};

  ppm_reduction                dut4 (.pp(pp), .row0(r0), .row1(r1));
  ppm_reduction #(.LOWER_W(8)) dut8 (.pp(pp), .row0(q0), .row1(q1));

  assign sum4 = r0 + r1;
  assign sum8 = q0 + q1;

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
        if (sum4 !== hoc_ref(a, b, 4)) begin
          failures++;
          if (failures < 10) $display("FAIL L4 a=%0d b=%0d rows=%0d ref=%0d", a, b, sum4, hoc_ref(a, b, 4));
        end
        checks++;
        if (sum8 !== hoc_ref(a, b, 8)) begin
          failures++;
          if (failures < 10) $display("FAIL L8 a=%0d b=%0d rows=%0d ref=%0d", a, b, sum8, hoc_ref(a, b, 8));
        end
        if (a[3:0] == 0 && b[3:0] == 0) begin
          checks++;
          if (sum4 !== 16'(va * vb)) begin
            failures++;
            $display("FAIL exact high part a=%0d b=%0d rows=%0d", a, b, sum4);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
