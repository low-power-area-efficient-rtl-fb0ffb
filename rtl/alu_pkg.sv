// alu_pkg: types and constants shared by the RC-1 reversible-logic ALU.
//
// ALU_WIDTH is the default operand width (8 bits). alu_mode_e names the
// three ways the result buses can be driven: by the arithmetic unit, by
// the logical unit, or by the combined arithmetic-and-logical unit. The
// encoding of the enum is this design's own; the mapping from the select
// inputs Z0/Z1 to a mode is done in alu_mode_mux.
package alu_pkg;

  localparam int unsigned ALU_WIDTH = 8;

  typedef enum logic [1:0] {
    MODE_ARITH = 2'd0,  // Z0Z1 = 00
    MODE_LOGIC = 2'd1,  // Z0Z1 = 01
    MODE_COMBO = 2'd2   // Z0Z1 = 10 or 11
  } alu_mode_e;

endpackage
