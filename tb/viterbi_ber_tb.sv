// viterbi_ber_tb -- bit-error-rate run of the self-test set-up: the
// document's 100000 random frames, each 30-symbol frame sent through a
// binary symmetric channel (every code bit flipped independently with
// probability p; p cycles over 1 %, 2 %, 4 % and 6 % frame by frame).
//
// Every decoded frame is compared with the reference decoder run on the
// same received symbols, and the error counter's total with the sum of
// the reference's residual errors. The residual bit-error rate per
// channel error rate is printed. The random channel replaces the AWGN /
// BPSK soft channel of the original study, which a hard-decision decoder
// cannot use.
module viterbi_ber_tb;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  localparam int NF   = 100000;
  localparam int NP   = 4;
  localparam int P_PERMILLE[NP] = '{10, 20, 40, 60};

  logic clk = 0, rst_n = 0, run = 0;
  sym_t noise = '0;
  logic [29:0] dec_frame;
  logic dec_valid, sout, sout_valid, noise_hit, ref_overflow;
  pm_t pm_s00;
  logic [31:0] err_count, bit_count;
  int checks = 0, failures = 0;

  viterbi_bist dut (.clk, .rst_n, .run, .noise, .dec_frame, .dec_valid, .sout,
                    .sout_valid, .pm_s00, .noise_hit, .err_count, .bit_count,
                    .ref_overflow);

  always #5 clk = ~clk;

  logic [29:0] exp_q[$];
  int n_dec = 0, exp_err_total = 0, mism = 0;
  longint ch_err[NP], res_err[NP], ch_bits[NP], data_bits[NP];

  initial begin
    repeat (NF * 30 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && dec_valid) begin
    logic [29:0] e;
    checks++;
    e = exp_q.pop_front();
    if (dec_frame != e) begin
      failures++;
      if (mism++ < 10) $display("FAIL frame %0d dec=%h exp=%h", n_dec, dec_frame, e);
    end
    n_dec++;
  end

  initial begin
    bit [9:0] lfsr;
    sym_t prev_pat;
    lfsr = 10'h001;
    prev_pat = '0;
    foreach (ch_err[i]) begin ch_err[i] = 0; res_err[i] = 0; ch_bits[i] = 0; data_bits[i] = 0; end
    #12 rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      bit data[], dbits[];
      bit [1:0] syms[], rx[], pat[];
      int pm0, pi;
      logic [29:0] e;
      pi = f % NP;
      data = new[30];
      pat = new[30];
      for (int i = 0; i < 30; i++) begin
        if (i < 24) begin
          data[i] = lfsr[0];
          lfsr = {lfsr[6] ^ lfsr[0], lfsr[9:1]};
        end else data[i] = 0;
      end
      ref_encode(data, syms);
      rx = syms;
      foreach (pat[t]) begin
        for (int b = 0; b < 2; b++)
          pat[t][b] = ($urandom_range(0, 999) < P_PERMILLE[pi]);
        rx[t] ^= pat[t];
        ch_err[pi] += int'(pat[t][0]) + int'(pat[t][1]);
      end
      ch_bits[pi] += 60;
      ref_decode(rx, dbits, pm0);
      foreach (dbits[i]) begin
        e[i] = dbits[i];
        if (dbits[i] != data[i]) begin
          exp_err_total++;
          if (i < 24) res_err[pi]++;
        end
      end
      data_bits[pi] += 24;
      exp_q.push_back(e);
      // drive the frame; noise follows its bit by one cycle
      for (int t = 0; t < 30; t++) begin
        noise = prev_pat;
        run = 1;
        prev_pat = pat[t];
        @(negedge clk);
      end
    end
    run = 0;
    noise = prev_pat;
    @(negedge clk);
    noise = '0;
    repeat (80) @(negedge clk);
    checks++;
    if (n_dec != NF) begin failures++; $display("FAIL decoded %0d of %0d", n_dec, NF); end
    checks++;
    if (int'(err_count) != exp_err_total || int'(bit_count) != NF * 30) begin
      failures++;
      $display("FAIL err_count=%0d exp=%0d bit_count=%0d", err_count, exp_err_total, bit_count);
    end
    for (int i = 0; i < NP; i++)
      $display("channel p=%0d/1000: channel BER=%f decoded data BER=%e (%0d errors in %0d bits)",
               P_PERMILLE[i], real'(ch_err[i]) / real'(ch_bits[i]),
               real'(res_err[i]) / real'(data_bits[i]), res_err[i], data_bits[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
