// tbu_cell -- one stage of the trace-back chain (a "C" block).
//
// Given the state the survivor path occupies after stage t, the cell emits
// the decoded input of stage t, which is the newest state bit state[0],
// and the state after stage t-1: the survivor bit of the current state
// tells whether the path came from the upper predecessor (oldest bit 1) or
// the lower one, so the previous state is {sp[state], state[5:1]}.
// Combinational.
module tbu_cell
  import vit_pkg::*;
#(
  parameter int unsigned NSTATE = NS
) (
  input  logic [NSTATE-1:0]          sp,         // survivor bits of stage t
  input  logic [$clog2(NSTATE)-1:0]  state_in,   // state after stage t
  output logic [$clog2(NSTATE)-1:0]  state_prev, // state after stage t-1
  output logic                       out_bit     // decoded input of stage t
);

  localparam int unsigned SW = $clog2(NSTATE);

  always_comb begin
    out_bit    = state_in[0];
    state_prev = {sp[state_in], state_in[SW-1:1]};
  end

endmodule
