// serial_input_gen -- random test data for the self-test set-up.
//
// A 10-stage linear feedback shift register Q9..Q0 shifts towards Q0 on
// every advance; the new Q9 is Q6 xor Q0 (feedback polynomial
// x^10 + x^6 + 1 as printed in the description's LFSR figure) and the
// serial bit is Q0. This polynomial is not primitive: the sequence from
// the default seed repeats every 62 bits.
//
// The generator is frame-aware: in the first L - M positions of each
// L-bit frame it sends LFSR bits, in the last M positions zero tail bits
// that return the encoder to state 0. The LFSR holds during the tail. The
// framing and the seed are this design's choice.
//
// Interface: when en is high, u holds the next bit and is consumed on the
// rising edge; u_valid equals en. tail is high on tail positions.
module serial_input_gen
  import vit_pkg::*;
#(
  parameter int unsigned   N     = L,
  parameter int unsigned   NTAIL = M,
  parameter logic [9:0]    SEED  = 10'h001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic u,
  output logic u_valid,
  output logic tail
);

  localparam int unsigned CW = $clog2(N);

  logic [9:0]    q;
  logic [CW-1:0] pos;

  assign tail    = (pos >= CW'(N - NTAIL));
  assign u       = tail ? 1'b0 : q[0];
  assign u_valid = en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= SEED;
      pos <= '0;
    end else if (en) begin
      pos <= (pos == CW'(N - 1)) ? '0 : pos + 1'b1;
      if (!tail) q <= {q[6] ^ q[0], q[9:1]};
    end
  end

endmodule
