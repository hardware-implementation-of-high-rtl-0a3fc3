// smu -- survivor path memory unit with one-register-per-clock writes.
//
// The memory holds one 64-bit register of survivor bits per stored trellis
// stage. In the first M = 6 stages of a frame the encoder can only have
// come through lower branches, so every survivor bit there is 0 and those
// stages are not stored: the default holds NREG = 24 registers for stages
// 7..30 instead of 30, as the design description proposes.
//
// A write-select demultiplexer driven by the stage counter enables exactly
// one register per clock; no other register is clocked. The description
// draws this as an AND of the clock with each demultiplexer output. Here
// it is written as a per-register enable, which synthesis maps to a
// clock-enable or to an integrated clock-gating cell; an AND gate on the
// clock would glitch.
//
// Interface: on a rising edge with wr_en high, register wr_idx takes sp.
// mem[j] holds the survivor bits of stage j + M + 1 (stages numbered from
// 1). The registers have no reset: each is written before it is read.
module smu
  import vit_pkg::*;
#(
  parameter int unsigned NSTATE = NS,
  parameter int unsigned NR     = NREG,
  parameter int unsigned IW     = 5      // width of the write select
) (
  input  logic                        clk,
  input  logic                        wr_en,
  input  logic [IW-1:0]               wr_idx,
  input  logic [NSTATE-1:0]           sp,
  output logic [NR-1:0][NSTATE-1:0]   mem
);

  logic [NR-1:0] sel;   // demultiplexer outputs, one-hot or zero

  always_comb begin
    for (int j = 0; j < int'(NR); j++) sel[j] = wr_en && (wr_idx == IW'(j));
  end

  for (genvar j = 0; j < int'(NR); j++) begin : g_reg
    always_ff @(posedge clk) begin
      if (sel[j]) mem[j] <= sp;
    end
  end

endmodule
