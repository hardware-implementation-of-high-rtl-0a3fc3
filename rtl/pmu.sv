// pmu -- path metric unit: 64 ACS units and 64 path-metric buffers.
//
// Each clock with en high, the unit advances the trellis by one stage.
// State ns is reached from the two predecessors {1, ns[5:1]} (upper) and
// {0, ns[5:1]} (lower), both with input bit ns[0]; the expected symbols on
// the two branches are encode_sym({1, ns}) and encode_sym({0, ns}). ACS
// unit ns adds the branch metrics of those symbols to the buffered metrics
// of its predecessors, and its winning metric is written back to buffer ns
// (the loop from the ACS outputs to the buffers in the description's PMU
// diagram). The survivor bits sp[ns] leave the unit combinationally, for
// the survivor memory to store on the same edge.
//
// Frames are decoded independently, as in the description: on the first
// stage of a frame (first = 1) the ACS units read the start metrics (0 for
// S00, PM_INF for every other state) instead of the buffers, because the
// encoder always starts a frame in S00. Metric width and PM_INF are this
// design's choice; within one 30-stage frame no metric can overflow, so no
// normalisation is needed.
//
// Interface: bm[e] from the BMU; sp[ns] = 1 when the upper branch into ns
// survives; pm[ns] is the buffered metric after the last stage.
module pmu
  import vit_pkg::*;
#(
  parameter int unsigned NSTATE = NS,
  parameter int unsigned W      = PMW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,      // a received symbol is present
  input  logic                      first,   // it is the first stage of a frame
  input  bm_t   [3:0]               bm,
  output logic  [NSTATE-1:0]        sp,
  output logic  [NSTATE-1:0][W-1:0] pm
);

  localparam int unsigned SW = $clog2(NSTATE);
  localparam logic [W-1:0] INF = W'(PM_INF);

  logic [NSTATE-1:0][W-1:0] pm_src;   // metrics the ACS units read
  logic [NSTATE-1:0][W-1:0] pm_new;   // ACS results

  always_comb begin
    for (int s = 0; s < int'(NSTATE); s++)
      pm_src[s] = first ? ((s == 0) ? '0 : INF) : pm[s];
  end

  for (genvar ns = 0; ns < int'(NSTATE); ns++) begin : g_acs
    localparam logic [SW-1:0] PL = SW'(ns >> 1);
    localparam logic [SW-1:0] PU = PL | SW'(1 << (SW - 1));
    localparam sym_t EXP_U = encode_sym({1'b1, SW'(ns)});
    localparam sym_t EXP_L = encode_sym({1'b0, SW'(ns)});

    acs #(.W(W), .BW(BMW)) u_acs (
      .pm_u   (pm_src[PU]),
      .bm_u   (bm[EXP_U]),
      .pm_l   (pm_src[PL]),
      .bm_l   (bm[EXP_L]),
      .pm_out (pm_new[ns]),
      .sp     (sp[ns])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(NSTATE); s++) pm[s] <= (s == 0) ? '0 : INF;
    end else if (en) begin
      pm <= pm_new;
    end
  end

endmodule
