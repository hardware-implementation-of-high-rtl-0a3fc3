// noise_gen -- channel error injection of the self-test set-up.
//
// Each code symbol is XORed with a 2-bit error pattern: a 1 in the
// pattern flips that bit, as a hard-decision channel error would. The
// pattern comes from the noise input, so a test can place errors exactly
// (the description's simulation applies such a pattern, noiser[1:0]). The
// output is registered: one cycle of latency, valid follows.
module noise_gen
  import vit_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  sym_t in_sym,
  input  sym_t noise,
  output sym_t out_sym,
  output logic out_valid,
  output logic flipped     // at least one bit of out_sym was flipped
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_sym   <= '0;
      out_valid <= 1'b0;
      flipped   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= in_sym ^ noise;
        flipped <= (noise != '0);
      end
    end
  end

endmodule
