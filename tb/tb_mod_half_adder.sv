// tb_mod_half_adder -- exhaustive test of the carry-only half adder:
// ch must equal x0 + x1 >= 2 for all four input pairs.
module tb_mod_half_adder;
  logic x0, x1, ch;
  int checks = 0, failures = 0;

  mod_half_adder dut (.x0(x0), .x1(x1), .ch(ch));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x1, x0} = 2'(v);
      #1;
      checks++;
      if (ch !== ((int'(x0) + int'(x1)) >= 2)) begin
        failures++;
        $display("FAIL x1x0=%b ch=%b", {x1, x0}, ch);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
