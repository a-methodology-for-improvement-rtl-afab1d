// Shared types for the rounding-based approximate (RoBA) multiplier.
//
// roba_variant_e selects one of the three multiplier architectures:
//   ROBA_SIGNED        S-RoBA: two's complement operands, exact negation (~X + 1)
//                      of the unsigned result in the sign-set stage.
//   ROBA_APPROX_SIGNED AS-RoBA: as S-RoBA, but the sign-set stage only inverts
//                      (~X), dropping the increment and accepting an error of one.
//   ROBA_UNSIGNED      U-RoBA: unsigned operands; sign detector and sign set are
//                      left out of the datapath.
// The three variants follow the description of the multiplier; the enum encoding
// is a choice of this design.
package roba_pkg;

  typedef enum logic [1:0] {
    ROBA_SIGNED        = 2'd0,
    ROBA_APPROX_SIGNED = 2'd1,
    ROBA_UNSIGNED      = 2'd2
  } roba_variant_e;

endpackage
