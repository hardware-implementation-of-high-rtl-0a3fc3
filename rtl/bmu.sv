// bmu -- branch metric unit.
//
// Four distance units (BM00, BM01, BM10, BM11) compare the received 2-bit
// symbol with each of the four symbols the encoder can send and give the
// Hamming distance (0, 1 or 2). The structure of four parallel units
// follows the design description; the received symbol is a hard-decision
// pair of bits, one per code output.
//
// Interface: rx_sym is the received symbol; bm[e] is the distance from
// expected symbol e. Purely combinational, no clock.
module bmu
  import vit_pkg::*;
(
  input  sym_t           rx_sym,
  output bm_t [3:0]      bm
);

  always_comb begin
    for (int e = 0; e < 4; e++) begin
      sym_t d;
      d = rx_sym ^ sym_t'(e);
      bm[e] = bm_t'(d[0]) + bm_t'(d[1]);
    end
  end

endmodule
