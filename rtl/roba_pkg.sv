// Shared definitions of the RoBA (rounding-based approximate) multiplier.
//
// The multiplier comes in three architectures that share one datapath and
// differ only in how they treat the sign of the operands:
//   S_ROBA  - signed operands, negation done exactly (two's complement, ~X + 1)
//   AS_ROBA - signed operands, negation done approximately (ones' complement,
//             ~X, the increment is skipped for speed at the price of an error)
//   U_ROBA  - unsigned operands; the sign detector and sign set blocks are left out
// The three architectures are the ones the design is built around; which one is
// the default of the top module is a choice recorded there.
package roba_pkg;

  typedef enum logic [1:0] {
    S_ROBA  = 2'd0,
    AS_ROBA = 2'd1,
    U_ROBA  = 2'd2
  } roba_mode_e;

endpackage
