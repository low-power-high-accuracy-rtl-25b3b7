// tb_mrsa_sign_set -- checks the sign-set stage with exact (~x + 1) and
// approximate (~x) negation, for random and corner-case magnitudes.
module tb_mrsa_sign_set;
  logic [15:0] x, ye, ya;
  logic        neg;
  int checks = 0, failures = 0;

  mrsa_sign_set #(.W(16), .APPROX(1'b0)) dut_e (.x(x), .neg(neg), .y(ye));
  mrsa_sign_set #(.W(16), .APPROX(1'b1)) dut_a (.x(x), .neg(neg), .y(ya));

  task automatic check();
    #1;
    checks++;
    if (neg ? (int'($signed(ye)) != -int'(x) || int'($signed(ya)) != -int'(x) - 1)
            : (ye !== x || ya !== x)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d neg=%b exact=%h approx=%h", x, neg, ye, ya);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2; n++) begin
      neg = 1'(n);
      x = 16'd0;    check();
      x = 16'd1;    check();
      x = 16'd16384; check();
      for (int i = 0; i < 5000; i++) begin
        x = 16'($urandom_range(0, 32767));
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
