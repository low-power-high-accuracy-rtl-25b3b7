// tb_mrsa_subtractor -- checks d = p - z for every power of two z with random
// and corner-case p >= z, at W = 16.
module tb_mrsa_subtractor;
  logic [15:0] p, z, d;
  int checks = 0, failures = 0;

  mrsa_subtractor #(.W(16)) dut (.p(p), .z(z), .d(d));

  task automatic check();
    #1;
    checks++;
    if (d !== 16'(p - z)) begin
      failures++;
      if (failures < 10) $display("FAIL p=%h z=%h d=%h", p, z, d);
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
    for (int k = -1; k < 16; k++) begin
      z = (k < 0) ? 16'd0 : 16'(1 << k);
      p = z;            check();
      p = 16'hffff;     check();
      if (k >= 0) begin
        p = 16'(1 << k) | 16'((1 << k) - 1); check();
      end
      for (int i = 0; i < 2000; i++) begin
        p = 16'($urandom);
        if (p < z) p = p | z;
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
