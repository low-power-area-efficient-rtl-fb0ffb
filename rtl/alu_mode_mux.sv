// alu_mode_mux: the ALU's select decoder (the "3 input multiplexer").
//
// Inputs Z0, Z1 and A choose which unit drives the result buses:
//   Z0 Z1 = 0 0 : arithmetic unit            (A picks its operation set)
//   Z0 Z1 = 0 1 : logical unit               (A ignored)
//   Z0 Z1 = 1 0 : arithmetic-and-logical unit (A picks its operation set)
//   Z0 Z1 = 1 1 : arithmetic-and-logical unit with A taken as 1
// The first three rows follow the published operation table. Code 11 is
// not in that table; the text describes the combined unit "when A=1" on
// that code, so here it forces the effective A to 1. Plain decode logic.
//
// Interface: z0, z1, a in; mode (alu_pkg::alu_mode_e) and a_eff out.
// Timing: combinational, no clock.
module alu_mode_mux
  import alu_pkg::*;
(
  input  logic      z0,
  input  logic      z1,
  input  logic      a,
  output alu_mode_e mode,
  output logic      a_eff
);

  always_comb begin
    unique case ({z0, z1})
      2'b00:   mode = MODE_ARITH;
      2'b01:   mode = MODE_LOGIC;
      default: mode = MODE_COMBO;
    endcase
    a_eff = a | (z0 & z1);
  end

endmodule
