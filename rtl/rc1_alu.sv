// rc1_alu: W-bit (default 8) ALU built from RC-1 reversible gates.
//
// Ten operations: set, clear, increment, transfer, 1's complement and
// 2's complement (arithmetic, on operand b) and AND, OR, EX-OR, EX-NOR
// (logical, on pairs of b, c, d). Select inputs z0, z1 and control a pick:
//
//   z0 z1 a | p        q       r        s        t        u
//   0  0  0 | 0        b+1     ~b       0        0        0
//   0  0  1 | ~0       b       ~b+1     0        0        0
//   0  1  x | b&d      b^c     c|d      b|~d     b&~d     ~(b^c)
//   1  0  0 | 0        b+1     ~b       b&d      b^c      c|d
//   1  0  1 | ~0       b       ~b+1     b|~d     b&~d     ~(b^c)
//   1  1  x | as 1 0 1
//
// Structure: alu_mode_mux decodes the selects; the arithmetic unit, the
// logical unit and the combined arithmetic-and-logical unit all compute in
// parallel, and the decoded mode steers one unit's results onto p..u. The
// arithmetic, logical and combined units are made only of RC-1 gates. In
// arithmetic mode s, t and u have no result and are driven to zero (a
// choice of this design). The mapping of operations to outputs reproduces
// the published 8-bit simulation results; the z0 z1 = 1 1 row, the zeroed
// outputs and all gate-level structure are this design's own.
//
// Interface: z0, z1, a, b, c, d [W-1:0] in; p, q, r, s, t, u [W-1:0] out.
// Timing: purely combinational; there is no clock or reset.
module rc1_alu
  import alu_pkg::*;
#(
  parameter int unsigned W = ALU_WIDTH
) (
  input  logic         z0,
  input  logic         z1,
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

  alu_mode_e mode;
  logic      a_eff;

  alu_mode_mux u_mode (.z0(z0), .z1(z1), .a(a), .mode(mode), .a_eff(a_eff));

  // Arithmetic unit
  logic [W-1:0] ar_p, ar_q, ar_r;
  rc1_arith_unit #(.W(W)) u_arith (
    .a(a_eff), .b(b), .c(c), .p(ar_p), .q(ar_q), .r(ar_r)
  );

  // Logical unit
  logic [W-1:0] lg_and_bd, lg_xor_bc, lg_or_cd, lg_or_bnd, lg_and_bnd, lg_xnor_bc;
  rc1_logic_unit #(.W(W)) u_logic (
    .b(b), .c(c), .d(d),
    .and_bd(lg_and_bd), .xor_bc(lg_xor_bc), .or_cd(lg_or_cd),
    .or_bnd(lg_or_bnd), .and_bnd(lg_and_bnd), .xnor_bc(lg_xnor_bc)
  );

  // Arithmetic-and-logical unit
  logic [W-1:0] al_p, al_q, al_r, al_s, al_t, al_u;
  rc1_arith_logic_unit #(.W(W)) u_arith_logic (
    .a(a_eff), .b(b), .c(c), .d(d),
    .p(al_p), .q(al_q), .r(al_r), .s(al_s), .t(al_t), .u(al_u)
  );

  // Steer one unit's results onto the result buses.
  always_comb begin
    unique case (mode)
      MODE_ARITH: begin
        {p, q, r} = {ar_p, ar_q, ar_r};
        {s, t, u} = '0;
      end
      MODE_LOGIC: begin
        {p, q, r} = {lg_and_bd, lg_xor_bc, lg_or_cd};
        {s, t, u} = {lg_or_bnd, lg_and_bnd, lg_xnor_bc};
      end
      default: begin
        {p, q, r} = {al_p, al_q, al_r};
        {s, t, u} = {al_s, al_t, al_u};
      end
    endcase
  end

endmodule
