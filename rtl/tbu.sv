// tbu -- trace-back unit: a chain of L combinational cells.
//
// The chain starts at the last stage of the frame in state S00, where the
// zero tail bits have left the encoder, and walks back one cell per stage
// to stage 1; cell t gives decoded bit t. Cells for stages M+1..L read the
// survivor memory. Cells for the first M stages read all-zero survivor
// bits, because the path into those stages can only use lower branches;
// they are the stages the survivor memory does not store.
//
// The chain is long (it is the slowest path in the decoder), so the
// decoder gives it TB_CYC = 6 clock cycles: tb_en is high for the six
// cycles after the last stage of a frame and load is high in the last of
// them, when the decoded bits are registered. Outside that window the
// survivor bits into the chain are forced to zero (toggle filtering), so
// the chain does not switch while the survivor memory is written. The
// result register therefore must be timed as a 6-cycle path.
//
// Interface: mem[j] = survivor bits of stage j + M + 1. dec[t-1] is the
// decoded input of stage t, valid from the edge after load; dec_valid
// pulses for one cycle with it.
module tbu
  import vit_pkg::*;
#(
  parameter int unsigned NSTATE = NS,
  parameter int unsigned NSTAGE = L,
  parameter int unsigned NSKIP  = M      // leading stages not stored
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   tb_en,
  input  logic                                   load,
  input  logic [NSTAGE-NSKIP-1:0][NSTATE-1:0]    mem,
  output logic [NSTAGE-1:0]                      dec,
  output logic                                   dec_valid
);

  localparam int unsigned SW = $clog2(NSTATE);

  logic [NSTAGE:0][SW-1:0]      st;      // st[t] = state after stage t
  logic [NSTAGE-1:0][NSTATE-1:0] sp_in;   // survivor bits per stage, isolated
  logic [NSTAGE-1:0]            dec_c;

  for (genvar t = 0; t < int'(NSTAGE); t++) begin : g_iso
    if (t < int'(NSKIP)) begin : g_zero
      assign sp_in[t] = '0;
    end else begin : g_mem
      assign sp_in[t] = tb_en ? mem[t - int'(NSKIP)] : '0;
    end
  end

  assign st[NSTAGE] = '0;

  for (genvar t = NSTAGE; t >= 1; t--) begin : g_cell
    tbu_cell #(.NSTATE(NSTATE)) u_cell (
      .sp        (sp_in[t-1]),
      .state_in  (st[t]),
      .state_prev(st[t-1]),
      .out_bit   (dec_c[t-1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec       <= '0;
      dec_valid <= 1'b0;
    end else begin
      dec_valid <= load;
      if (load) dec <= dec_c;
    end
  end

endmodule
