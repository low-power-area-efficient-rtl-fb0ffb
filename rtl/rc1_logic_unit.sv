// rc1_logic_unit: W-bit logical unit made only of RC-1 gates.
//
// It computes six results at once from operands b, c and d:
//   and_bd  = b & d          xor_bc  = b ^ c          or_cd   = c | d
//   or_bnd  = b | ~d         and_bnd = b & ~d         xnor_bc = ~(b ^ c)
// These are the four logical operations AND, OR, EX-OR and EX-NOR. b|~d and
// b&~d are the OR and AND that one RC-1 gate gives directly (one input
// complemented); b&d and c|d need d inverted first by another RC-1 gate.
//
// Per bit:
//   u_nd    : A=0,    B=d[i], C=1    -> Q = ~d[i]
//   u_and   : A=b[i], B=~d[i], C=0   -> R = b[i] & d[i]
//   u_xor   : A=0,    B=b[i], C=c[i] -> Q = b[i] ^ c[i]
//   u_or    : A=c[i], B=~d[i], C=1   -> Q = c[i] | d[i]
//   u_orn   : A=d[i], B=b[i], C=1    -> R = ~d[i] | b[i]
//   u_andn  : A=d[i], B=b[i], C=0    -> Q = ~d[i] & b[i]
//   u_xnor  : A=1,    B=b[i], C=c[i] -> R = ~b[i] ^ c[i]
//
// The choice of operands for each result is fitted to the published
// simulation results (it reproduces them exactly); the gate-level circuit
// is this design's own. The logical unit does not use the control input A.
// Unused gate outputs are garbage outputs and are left open.
//
// Interface: b, c, d [W-1:0] in; six [W-1:0] results out.
// Timing: combinational, no clock.
module rc1_logic_unit #(
  parameter int unsigned W = alu_pkg::ALU_WIDTH
) (
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] and_bd,
  output logic [W-1:0] xor_bc,
  output logic [W-1:0] or_cd,
  output logic [W-1:0] or_bnd,
  output logic [W-1:0] and_bnd,
  output logic [W-1:0] xnor_bc
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic nd;
    rc1_gate u_nd   (.a(1'b0), .b(d[i]), .c(1'b1), .p(), .q(nd),         .r());
    rc1_gate u_and  (.a(b[i]), .b(nd),   .c(1'b0), .p(), .q(),           .r(and_bd[i]));
    rc1_gate u_xor  (.a(1'b0), .b(b[i]), .c(c[i]), .p(), .q(xor_bc[i]),  .r());
    rc1_gate u_or   (.a(c[i]), .b(nd),   .c(1'b1), .p(), .q(or_cd[i]),   .r());
    rc1_gate u_orn  (.a(d[i]), .b(b[i]), .c(1'b1), .p(), .q(),           .r(or_bnd[i]));
    rc1_gate u_andn (.a(d[i]), .b(b[i]), .c(1'b0), .p(), .q(and_bnd[i]), .r());
    rc1_gate u_xnor (.a(1'b1), .b(b[i]), .c(c[i]), .p(), .q(),           .r(xnor_bc[i]));
  end

endmodule
