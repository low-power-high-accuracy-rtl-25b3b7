// tb_mod_full_adder -- exhaustive test of the carry-only full adder:
// cf must equal x0 + x1 + x2 >= 2 for all eight input triples.
module tb_mod_full_adder;
  logic x0, x1, x2, cf;
  int checks = 0, failures = 0;

  mod_full_adder dut (.x0(x0), .x1(x1), .x2(x2), .cf(cf));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x2, x1, x0} = 3'(v);
      #1;
      checks++;
      if (cf !== ((int'(x0) + int'(x1) + int'(x2)) >= 2)) begin
        failures++;
        $display("FAIL x=%b cf=%b", {x2, x1, x0}, cf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
