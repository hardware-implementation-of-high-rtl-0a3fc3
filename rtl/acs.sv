// acs -- add-compare-select unit for one trellis state.
//
// Two adders form the candidate metrics Xu = PMu + BMu (upper branch, from
// the predecessor whose oldest bit is 1) and Xl = PMl + BMl (lower branch).
// A comparator drives the select of a 2:1 multiplexer, input 1 = Xu and
// input 0 = Xl, and the same select leaves the unit as the survivor-path
// bit, as in the design description's ACS diagram. On equal metrics the
// description allows either choice; this unit keeps the lower branch
// (sp = 0), which makes the result deterministic.
//
// Interface: combinational. sp = 1 when the upper branch survives.
module acs
  import vit_pkg::*;
#(
  parameter int unsigned W  = PMW,   // path-metric width
  parameter int unsigned BW = BMW    // branch-metric width
) (
  input  logic [W-1:0]  pm_u,
  input  logic [BW-1:0] bm_u,
  input  logic [W-1:0]  pm_l,
  input  logic [BW-1:0] bm_l,
  output logic [W-1:0]  pm_out,
  output logic          sp
);

  logic [W-1:0] xu, xl;

  always_comb begin
    xu     = pm_u + W'(bm_u);
    xl     = pm_l + W'(bm_l);
    sp     = (xu < xl);
    pm_out = sp ? xu : xl;
  end

endmodule
