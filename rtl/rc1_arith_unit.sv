// rc1_arith_unit: W-bit arithmetic unit made only of RC-1 gates.
//
// Six operations, three per value of the control input a:
//   a = 0 : p = clear (all zeros), q = b + 1 (increment), r = ~b (1's complement)
//   a = 1 : p = set   (all ones),  q = b     (transfer),  r = ~b + 1 (2's complement)
// i.e. p = {W{a}}, q = b + ~a, r = ~b + a, each modulo 2**W (the carry out of
// the top bit is dropped).
//
// How it works, per bit i (gates named as in the generate block):
//   u_set  : A=a,   B=b[i],  C=0        -> P = a                      (p[i])
//   u_nb   : A=1,   B=b[i],  C=0        -> R = ~b[i]
//   u_qsum : A=0,   B=b[i],  C=kq[i]    -> Q = b[i] ^ kq[i]           (q[i])
//   u_qcy  : A=kq[i], B=~b[i], C=0      -> R = kq[i] & b[i]           (kq[i+1])
//   u_rsum : A=1,   B=b[i],  C=kr[i]    -> R = ~b[i] ^ kr[i]          (r[i])
//   u_rcy  : A=b[i], B=kr[i], C=0       -> Q = ~b[i] & kr[i]          (kr[i+1])
// plus one gate u_na (A=0, B=a, C=1 -> Q = ~a) giving the carry-in of the q
// chain, kq[0] = ~a; the r chain starts with kr[0] = a. Both chains are
// ripple incrementers, so the longest path is W-1 carry gates and one sum
// gate. The top bit has no carry gates (u_nb, u_qcy, u_rcy): its carry
// out would be dropped anyway.
//
// Which operation appears on which output, and at which value of a, is set
// to reproduce the published 8-bit simulation results; the gate-level
// structure is this design's own. Operand c is accepted because the block
// diagram feeds it to this unit, but no result depends on it. Unused gate
// outputs are the reversible circuit's garbage outputs and are left open.
//
// Interface: a, b[W-1:0], c[W-1:0] in; p, q, r [W-1:0] out.
// Timing: combinational, no clock.
module rc1_arith_unit #(
  parameter int unsigned W = alu_pkg::ALU_WIDTH
) (
  input  logic         a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] p,
  output logic [W-1:0] q,
  output logic [W-1:0] r
);

  logic [W-1:0] kq;  // carry into each bit of q = b + ~a
  logic [W-1:0] kr;  // carry into each bit of r = ~b + a
  logic         na;

  rc1_gate u_na (.a(1'b0), .b(a), .c(1'b1), .p(), .q(na), .r());

  assign kq[0] = na;
  assign kr[0] = a;

  for (genvar i = 0; i < W; i++) begin : g_bit
    rc1_gate u_set  (.a(a),     .b(b[i]),  .c(1'b0),  .p(p[i]), .q(),        .r());
    rc1_gate u_qsum (.a(1'b0),  .b(b[i]),  .c(kq[i]), .p(),     .q(q[i]),    .r());
    rc1_gate u_rsum (.a(1'b1),  .b(b[i]),  .c(kr[i]), .p(),     .q(),        .r(r[i]));
    // The top bit's carry out is dropped, so its carry gates are omitted.
    if (i < W - 1) begin : g_carry
      logic nb;
      rc1_gate u_nb  (.a(1'b1),  .b(b[i]),  .c(1'b0), .p(), .q(),        .r(nb));
      rc1_gate u_qcy (.a(kq[i]), .b(nb),    .c(1'b0), .p(), .q(),        .r(kq[i+1]));
      rc1_gate u_rcy (.a(b[i]),  .b(kr[i]), .c(1'b0), .p(), .q(kr[i+1]), .r());
    end
  end

  // c is part of the unit's interface in the block diagram but feeds no result.
  logic unused_c;
  assign unused_c = ^c;

endmodule
