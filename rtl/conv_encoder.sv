// conv_encoder -- K = 7, rate-1/2 convolutional encoder, polynomials
// 171 and 133 (octal).
//
// Six flip-flops hold the last six input bits; each input bit produces the
// 2-bit code symbol encode_sym({state, u}) (see vit_pkg for the bit
// order) and is shifted into the state. The symbol is registered, so it
// appears one cycle after the bit is accepted, with sym_valid.
// The code and the flip-flop/XOR structure follow the design description;
// the bit ordering and the output register are this design's choice.
module conv_encoder
  import vit_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   u,
  output sym_t   sym,
  output logic   sym_valid
);

  state_t st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= '0;
      sym       <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= en;
      if (en) begin
        sym <= encode_sym({st, u});
        st  <= {st[M-2:0], u};
      end
    end
  end

endmodule
