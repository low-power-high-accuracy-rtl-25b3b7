// tb_kogge_stone_adder -- checks the Kogge-Stone adder at W = 16 and 17 with
// random operands plus carry-chain corner cases, and exhaustively at W = 5.
module tb_kogge_stone_adder;
  logic [16:0] a, b;
  logic [15:0] s16;
  logic [16:0] s17;
  logic [4:0]  s5;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.W(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .sum(s16));
  kogge_stone_adder #(.W(17)) dut17 (.a(a),       .b(b),       .sum(s17));
  kogge_stone_adder #(.W(5))  dut5  (.a(a[4:0]),  .b(b[4:0]),  .sum(s5));

  task automatic check();
    #1;
    checks++;
    if (s16 !== 16'(a[15:0] + b[15:0]) || s17 !== 17'(a + b) || s5 !== 5'(a[4:0] + b[4:0])) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h s16=%h s17=%h s5=%h", a, b, s16, s17, s5);
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
    for (int i = 0; i < 1024; i++) begin
      a = 17'(i & 31);
      b = 17'(i >> 5);
      check();
    end
    for (int i = 0; i < 17; i++) begin
      a = 17'h1ffff >> i;
      b = 17'd1;
      check();
      a = 17'h1ffff;
      b = 17'(1 << i);
      check();
    end
    for (int i = 0; i < 20000; i++) begin
      a = 17'($urandom);
      b = 17'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
