// SG-Multi arbiter unit (one per master slot of a slave wrapper).
//
// Purely combinational. Arbitration compares one-hot priority levels in two
// stages. In each stage the unit turns its own one-hot level p into a mask of
// all bit positions above its '1' - shift p left by one, add an all-ones
// word (carry dropped), invert - and ANDs that mask with the OR of the levels
// of all competing units (the "common arbiter interconnect", formed in the
// slave wrapper). An empty result means nobody competing ranks higher.
//   1. Dynamic stage: every requesting unit puts its dynamic level on
//      dyn_contrib. A unit survives if no competitor has a higher dynamic level.
//   2. Static stage: every survivor puts its static level on stat_contrib.
//      The survivor with the highest static level is granted.
// Static levels are unique within a slave wrapper, so at most one grant is
// produced per round.
//
// Interface: req is the (already timing-filtered) request of this slot;
// dyn_level and stat_level are one-hot; dyn_common / stat_common are the ORs
// of all units' dyn_contrib / stat_contrib. grant is valid in the same cycle.
//
// The two-stage dynamic-then-static scheme, the one-hot levels and the
// shift/add/invert mask follow the SG-Multi arbiter description. How the two
// stages are gated against each other is this implementation's own reading.
module sgm_arbiter #(
  parameter int unsigned NUM_SLOTS  = 4,  // width of the static level
  parameter int unsigned DYN_LEVELS = 4   // width of the dynamic level
) (
  input  logic                  req,
  input  logic [DYN_LEVELS-1:0] dyn_level,
  input  logic [NUM_SLOTS-1:0]  stat_level,
  input  logic [DYN_LEVELS-1:0] dyn_common,
  input  logic [NUM_SLOTS-1:0]  stat_common,
  output logic [DYN_LEVELS-1:0] dyn_contrib,
  output logic [NUM_SLOTS-1:0]  stat_contrib,
  output logic                  grant
);

  logic [DYN_LEVELS-1:0] dyn_mask;
  logic [NUM_SLOTS-1:0]  stat_mask;
  logic                  dyn_win;

  // Mask transformation: ~((p << 1) + 1...1), carry out discarded.
  always_comb begin
    dyn_mask  = ~((dyn_level  << 1) + {DYN_LEVELS{1'b1}});
    stat_mask = ~((stat_level << 1) + {NUM_SLOTS{1'b1}});
  end

  assign dyn_contrib  = req ? dyn_level : '0;
  assign dyn_win      = req && ((dyn_common & dyn_mask) == '0);
  assign stat_contrib = dyn_win ? stat_level : '0;
  assign grant        = dyn_win && ((stat_common & stat_mask) == '0);

endmodule
