// mrsa_shifter -- barrel shifter that multiplies by a power of two.
//
// y = x * sel, where sel is one-hot (a rounded operand 2^k) or zero. The
// one-hot sel is first encoded to the shift amount k = log2(sel) with an OR
// encoder (no priority logic is needed for a one-hot input), then x, widened
// to WO bits, passes through log2(WS) shift stages, stage s shifting by 2^s
// when bit s of k is set. A zero sel forces y to zero. For 8-bit operands the
// shift amount has three bits, so the shifter has three stages.
// Interface: x (WX bits), sel (WS bits) in; y (WO bits) out. Purely
// combinational.
module mrsa_shifter #(
  parameter int WX = 8,
  parameter int WS = 8,
  parameter int WO = 16
) (
  input  logic [WX-1:0] x,
  input  logic [WS-1:0] sel,
  output logic [WO-1:0] y
);
  localparam int KW = (WS > 1) ? $clog2(WS) : 1;

  logic [KW-1:0] k;
  always_comb begin
    k = '0;
    for (int i = 0; i < WS; i++)
      if (sel[i]) k = k | KW'(i);
  end

  logic [WO-1:0] stage [KW+1];
  assign stage[0] = WO'(x);
  for (genvar s = 0; s < KW; s++) begin : g_stage
    assign stage[s+1] = k[s] ? (stage[s] << (1 << s)) : stage[s];
  end

  assign y = (|sel) ? stage[KW] : '0;
endmodule
