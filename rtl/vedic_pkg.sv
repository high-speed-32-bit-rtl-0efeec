// Shared definitions for the Vedic multiplier family.
//
// The multipliers come in three flavours that differ only in the adders used
// in the stage that joins four half-width products: carry-save, carry-lookahead
// or ripple-carry. adder_kind_e selects the flavour; every multiplier and adder
// stage carries it down as a parameter so one design elaborates a single kind.
package vedic_pkg;

  typedef enum logic [1:0] {
    ADDER_RCA = 2'd0,   // ripple-carry: smallest, slowest
    ADDER_CLA = 2'd1,   // carry-lookahead: fastest
    ADDER_CSA = 2'd2    // carry-save row followed by a carry-propagate row
  } adder_kind_e;

  // Width of a CLA lookahead group. Carries are fully looked ahead inside a
  // group and ripple from one group to the next.
  localparam int unsigned CLA_GROUP = 4;

endpackage
