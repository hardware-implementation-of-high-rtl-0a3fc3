// out_serializer -- sends a decoded frame out one bit per clock.
//
// When load is high the L decoded bits are captured; over the next L
// clock cycles sout presents them in stage order, stage 1 first, with
// sout_valid high. The trace back delivers a frame at most once every L
// symbols, so a frame is always fully sent before the next is loaded (a
// load during sending restarts with the new frame). The serial output
// matches the single-bit decoder output of the description's simulation;
// the serialiser itself is this design's choice.
module out_serializer
  import vit_pkg::*;
#(
  parameter int unsigned N = L
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [N-1:0]  din,
  output logic          sout,
  output logic          sout_valid
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  sh;
  logic [CW-1:0] left;   // bits still to send

  assign sout       = sh[0];
  assign sout_valid = (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (load) begin
      sh   <= din;
      left <= CW'(N);
    end else if (left != '0) begin
      sh   <= sh >> 1;
      left <= left - 1'b1;
    end
  end

endmodule
