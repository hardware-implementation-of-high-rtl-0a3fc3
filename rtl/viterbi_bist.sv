// viterbi_bist -- the decoder inside its built-in self-test set-up.
//
// Chain: serial_input_gen (LFSR data plus 6 zero tail bits per 30-bit
// frame) -> conv_encoder -> noise_gen (XORs the noise pattern onto the
// code symbols) -> viterbi_decoder -> error_counter, which compares the
// decoder's serial output with the generated bits. This is the self-test
// arrangement of the design description. The description drives the
// blocks from three clock generators whose rates it does not give; here a
// single clock runs everything and run enables the data source.
//
// Interface: while run is high one bit per clock enters the chain. noise
// is applied to the symbol that passes the noise stage in the same cycle,
// which is the symbol of the bit the generator issued one cycle earlier.
// All decoder outputs are brought out. err_count counts decoded bits that
// differ from the sent ones, bit_count the bits compared.
//
// Latency from a frame's last generated bit to dec_valid: 2 cycles of
// encoder and noise stages, then the decoder's 7.
module viterbi_bist
  import vit_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  sym_t         noise,
  output logic [L-1:0] dec_frame,
  output logic         dec_valid,
  output logic         sout,
  output logic         sout_valid,
  output pm_t          pm_s00,
  output logic         noise_hit,     // the symbol entering the decoder carries an error
  output logic [31:0]  err_count,
  output logic [31:0]  bit_count,
  output logic         ref_overflow
);

  logic u, u_valid, tail;
  sym_t enc_sym, rx_sym;
  logic enc_valid, rx_valid;

  serial_input_gen u_gen (
    .clk, .rst_n, .en(run), .u, .u_valid, .tail
  );

  conv_encoder u_enc (
    .clk, .rst_n, .en(u_valid), .u, .sym(enc_sym), .sym_valid(enc_valid)
  );

  noise_gen u_noise (
    .clk, .rst_n, .in_valid(enc_valid), .in_sym(enc_sym), .noise,
    .out_sym(rx_sym), .out_valid(rx_valid), .flipped(noise_hit)
  );

  viterbi_decoder u_dec (
    .clk, .rst_n, .in_valid(rx_valid), .rx_sym,
    .dec_frame, .dec_valid, .sout, .sout_valid, .pm_s00
  );

  error_counter #(.DEPTH(128), .CW(32)) u_err (
    .clk, .rst_n,
    .ref_valid(u_valid), .ref_bit(u),
    .dec_valid(sout_valid), .dec_bit(sout),
    .err_count, .bit_count, .overflow(ref_overflow)
  );

endmodule
