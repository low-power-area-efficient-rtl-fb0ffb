// rc1_arith_logic_unit: combined arithmetic-and-logical unit.
//
// Drives all six result buses at once: the three arithmetic results on
// p, q, r and three of the six logical results on s, t, u, the three picked
// by the control input a:
//   a = 0 : p = 0,  q = b + 1, r = ~b,      s = b & d,  t = b ^ c,  u = c | d
//   a = 1 : p = ~0, q = b,     r = ~b + 1,  s = b | ~d, t = b & ~d, u = ~(b ^ c)
//
// It holds its own arithmetic unit and logical unit, as the block diagram
// draws it as a block with its own B, C and D inputs, and selects s, t, u
// with three RC-1 multiplexers, so the whole block is RC-1 gates. The
// output mapping reproduces the published simulation results for this
// mode; the internal structure is this design's own.
//
// Interface: a, b, c, d [W-1:0] in; p, q, r, s, t, u [W-1:0] out.
// Timing: combinational, no clock.
module rc1_arith_logic_unit #(
  parameter int unsigned W = alu_pkg::ALU_WIDTH
) (
  input  logic         a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] p,
  output logic [W-1:0] q,
  output logic [W-1:0] r,
  output logic [W-1:0] s,
  output logic [W-1:0] t,
  output logic [W-1:0] u
);

  logic [W-1:0] and_bd, xor_bc, or_cd, or_bnd, and_bnd, xnor_bc;

  rc1_arith_unit #(.W(W)) u_arith (
    .a(a), .b(b), .c(c), .p(p), .q(q), .r(r)
  );

  rc1_logic_unit #(.W(W)) u_logic (
    .b(b), .c(c), .d(d),
    .and_bd(and_bd), .xor_bc(xor_bc), .or_cd(or_cd),
    .or_bnd(or_bnd), .and_bnd(and_bnd), .xnor_bc(xnor_bc)
  );

  rc1_mux2 #(.W(W)) u_mux_s (.sel(a), .x0(and_bd), .x1(or_bnd),  .y(s));
  rc1_mux2 #(.W(W)) u_mux_t (.sel(a), .x0(xor_bc), .x1(and_bnd), .y(t));
  rc1_mux2 #(.W(W)) u_mux_u (.sel(a), .x0(or_cd),  .x1(xnor_bc), .y(u));

endmodule
