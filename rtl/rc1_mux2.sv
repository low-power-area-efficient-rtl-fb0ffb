// rc1_mux2: W-bit 2:1 multiplexer made only of RC-1 gates.
//
// Per bit three gates are used:
//   g_inv : A=0,   B=x1,   C=1      -> Q = ~x1
//   g_and : A=sel, B=~x1,  C=0      -> R = sel & x1
//   g_mux : A=sel, B=x0,   C=sel&x1 -> Q = (~sel & x0) ^ (sel & x1)
// The two terms of the last XOR can never both be 1, so the XOR is the
// multiplexer y = sel ? x1 : x0. Unused gate outputs are the garbage
// outputs that reversible circuits carry.
//
// Interface: sel, x0[W-1:0], x1[W-1:0] in, y[W-1:0] out. Timing:
// combinational. That RC-1 gates can form a multiplexer is the stated
// property of the gate; this particular three-gate circuit is this
// design's own.
module rc1_mux2 #(
  parameter int unsigned W = 8
) (
  input  logic         sel,
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  output logic [W-1:0] y
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic nx1, sel_x1;
    rc1_gate u_inv (.a(1'b0), .b(x1[i]),  .c(1'b1),   .p(), .q(nx1),  .r());
    rc1_gate u_and (.a(sel),  .b(nx1),    .c(1'b0),   .p(), .q(),     .r(sel_x1));
    rc1_gate u_mux (.a(sel),  .b(x0[i]),  .c(sel_x1), .p(), .q(y[i]), .r());
  end

endmodule
