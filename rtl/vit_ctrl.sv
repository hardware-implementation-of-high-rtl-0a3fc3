// vit_ctrl -- frame and trace-back timing of the Viterbi decoder.
//
// A 5-bit stage counter runs 0..L-1 over the received symbols of a frame
// (it advances only on in_valid). From it the controller derives:
//   * first      - the symbol is stage 1 of a frame (path metrics restart);
//   * smu_wr_en  - the symbol's survivor bits are stored; true from stage
//                  M+1 on, so the first M stages never clock the memory;
//   * smu_idx    - which survivor register is written (stage - M - 1,
//                  counting stages from 1), the demultiplexer select;
//   * tb_en/load - the trace-back window: tb_en is high for TB_CYC clock
//                  cycles after the edge that stores the last stage, and
//                  load is high in the last of them.
// The window counts clock cycles, not symbols, so a frame is decoded even
// if no further symbols arrive. The next frame cannot overwrite the
// survivor memory before stage M+1, at least M+1 cycles after the window
// opens, so with TB_CYC <= M the trace back always sees a stable memory.
// This is the timing the design description proposes (trace back during
// the first 6 cycles of the next frame); the exact counters are this
// design's own.
module vit_ctrl
  import vit_pkg::*;
#(
  parameter int unsigned NSTAGE = L,
  parameter int unsigned NSKIP  = M,
  parameter int unsigned TBC    = TB_CYC,
  parameter int unsigned IW     = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          first,
  output logic          smu_wr_en,
  output logic [IW-1:0] smu_idx,
  output logic          frame_end,   // this symbol is the last of its frame
  output logic          tb_en,
  output logic          load
);

  localparam int unsigned CW = $clog2(TBC + 1);

  logic [IW-1:0] stage;    // 0-based stage of the next symbol
  logic [CW-1:0] tb_cnt;   // 0 = idle, 1..TBC = cycle of the window

  always_comb begin
    first     = (stage == '0);
    smu_wr_en = in_valid && (stage >= IW'(NSKIP));
    smu_idx   = stage - IW'(NSKIP);
    frame_end = in_valid && (stage == IW'(NSTAGE - 1));
    tb_en     = (tb_cnt != '0);
    load      = (tb_cnt == CW'(TBC));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage  <= '0;
      tb_cnt <= '0;
    end else begin
      if (in_valid) stage <= frame_end ? '0 : stage + 1'b1;
      if (frame_end)    tb_cnt <= CW'(1);
      else if (load)    tb_cnt <= '0;
      else if (tb_en)   tb_cnt <= tb_cnt + 1'b1;
    end
  end

  // A new frame may not end while the previous trace back is still open.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 frame_end |-> !tb_en || load);

endmodule
