// tb_mrsa_shifter -- exhaustive test of the barrel shifter: every 8-bit x
// with every one-hot sel and with sel = 0, for an 8-bit and a 9-bit select.
module tb_mrsa_shifter;
  logic [8:0]  x, sel;
  logic [15:0] y8;
  logic [16:0] y9;
  int checks = 0, failures = 0;

  mrsa_shifter #(.WX(8), .WS(8), .WO(16)) dut8 (.x(x[7:0]), .sel(sel[7:0]), .y(y8));
  mrsa_shifter #(.WX(9), .WS(9), .WO(17)) dut9 (.x(x),      .sel(sel),      .y(y9));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      for (int k = -1; k < 9; k++) begin
        x = 9'(v);
        sel = (k < 0) ? 9'd0 : 9'(1 << k);
        #1;
        checks++;
        if (longint'(y9) != longint'(v) * longint'(sel)) begin
          failures++;
          if (failures < 10) $display("FAIL W9 x=%0d sel=%b y=%0d", v, sel, y9);
        end
        if (v < 256 && k < 8) begin
          checks++;
          if (longint'(y8) != longint'(v) * longint'(sel)) begin
            failures++;
            if (failures < 10) $display("FAIL W8 x=%0d sel=%b y=%0d", v, sel, y8);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
