// Shared definitions for the modulo 2^n +/- 1 subtractors and adders/subtractors.
//
// mode_e is the operation-select input M of every combined adder/subtractor:
// M = 0 adds, M = 1 subtracts, the encoding used throughout this design.
// N_DEFAULT is the default operand width n of all units (n = 8, the width of
// the worked examples; the units were also evaluated at n = 4 and n = 16).
package modpm1_pkg;

  localparam int unsigned N_DEFAULT = 8;

  typedef enum logic {
    MODE_ADD = 1'b0,
    MODE_SUB = 1'b1
  } mode_e;

endpackage
