// viterbi_decoder -- frame-based hard-decision Viterbi decoder for the
// K = 7, rate-1/2 (171, 133) convolutional code.
//
// Data path (BMU -> PMU -> SMU -> TBU, as in the design description):
//   * bmu: Hamming distances of the received symbol from 00, 01, 10, 11;
//   * pmu: 64 add-compare-select units update 64 path metrics, one trellis
//     stage per accepted symbol;
//   * smu: survivor bits of stages 7..30 go to 24 registers, one register
//     written per clock; stages 1..6 are never stored because their
//     survivor bits are always 0 when the frame starts in S00;
//   * tbu: after the last stage of a frame, a 30-cell combinational chain
//     traces back from S00 and yields all 30 decoded bits at once. It is
//     given 6 clock cycles (the first six of the next frame, while the
//     survivor memory is idle), which is what lets the decoder clock about
//     six times faster than a single-cycle trace back would allow.
//   * out_serializer: shifts the decoded frame out on sout.
//
// Framing: frames are L = 30 symbols back to back, starting with the first
// symbol after reset. The sender ends every frame with M = 6 zero bits, so
// bits 25..30 of each decoded frame are 0 and bits 1..24 are data.
//
// Timing: one symbol per clock when in_valid is high (gaps are allowed).
// dec_frame/dec_valid appear TB_CYC + 1 = 7 cycles after the edge that
// accepts the last symbol of a frame (dec_valid is high in the 7th cycle);
// sout then delivers bit 1..30 in the following 30 cycles.
//
// The four units, the 24-register survivor memory and the 6-cycle trace
// back follow the design description. The in_valid gaps, the serial
// output, the pm_s00 output and the metric width are this design's
// choices.
module viterbi_decoder
  import vit_pkg::*;
#(
  parameter int unsigned NSTAGE = L,
  parameter int unsigned NSKIP  = M,
  parameter int unsigned TBC    = TB_CYC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  sym_t              rx_sym,
  output logic [NSTAGE-1:0] dec_frame,   // dec_frame[t-1] = decoded bit of stage t
  output logic              dec_valid,
  output logic              sout,
  output logic              sout_valid,
  output pm_t               pm_s00       // final metric of S00 (bits found in error)
);

  localparam int unsigned IW = 5;

  bm_t [3:0]                    bm;
  logic [NS-1:0]                sp;
  logic [NS-1:0][PMW-1:0]       pm;
  logic [NSTAGE-NSKIP-1:0][NS-1:0] mem;
  logic                         first, smu_wr_en, frame_end, tb_en, tb_load;
  logic [IW-1:0]                smu_idx;

  vit_ctrl #(.NSTAGE(NSTAGE), .NSKIP(NSKIP), .TBC(TBC), .IW(IW)) u_ctrl (
    .clk, .rst_n, .in_valid,
    .first, .smu_wr_en, .smu_idx, .frame_end, .tb_en, .load(tb_load)
  );

  bmu u_bmu (.rx_sym, .bm);

  pmu #(.NSTATE(NS), .W(PMW)) u_pmu (
    .clk, .rst_n, .en(in_valid), .first, .bm, .sp, .pm
  );

  smu #(.NSTATE(NS), .NR(NSTAGE - NSKIP), .IW(IW)) u_smu (
    .clk, .wr_en(smu_wr_en), .wr_idx(smu_idx), .sp, .mem
  );

  tbu #(.NSTATE(NS), .NSTAGE(NSTAGE), .NSKIP(NSKIP)) u_tbu (
    .clk, .rst_n, .tb_en, .load(tb_load), .mem, .dec(dec_frame), .dec_valid
  );

  out_serializer #(.N(NSTAGE)) u_ser (
    .clk, .rst_n, .load(dec_valid), .din(dec_frame), .sout, .sout_valid
  );

  // Metric of S00 after the last stage of a frame, held until the next
  // frame ends: the number of received bits the decoded path disagrees with.
  logic frame_end_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_end_q <= 1'b0;
      pm_s00      <= '0;
    end else begin
      frame_end_q <= frame_end;
      if (frame_end_q) pm_s00 <= pm[0];
    end
  end

endmodule
