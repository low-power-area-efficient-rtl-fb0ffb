// rc1_gate: the 3-input, 3-output reversible RC-1 gate.
//
//   P = A
//   Q = (~A & B) ^ C
//   R = (A & ~B) ^ C
//
// The eight input vectors map to eight distinct output vectors, so the
// inputs can always be recovered from the outputs. The gate is the only
// logic primitive the rest of the ALU is built from. With A used as a
// control input it acts as: A=0 -> Q = B^C, R = C; A=1 -> Q = C,
// R = ~B^C. With C tied low it gives Q = ~A&B, R = A&~B; with C tied high
// Q = A|~B, R = ~A|B.
//
// Interface: single-bit a, b, c in, p, q, r out. Timing: combinational, no
// clock. The equations and truth table are the published ones for RC-1;
// modelling it as ordinary gates (not physically reversible hardware) is
// what any RTL flow must do.
module rc1_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = (~a & b) ^ c;
  assign r = (a & ~b) ^ c;

endmodule
