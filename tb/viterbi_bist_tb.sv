// viterbi_bist_tb -- end-to-end test of the self-test set-up at its
// default size: LFSR data, encoder, error injection, decoder, error
// counter.
//
// The testbench predicts the generated data with its own LFSR model,
// encodes it with the reference encoder, chooses an error pattern per
// frame (none, a few random errors, or nine errors the reference decoder
// corrects completely) and decodes the result with the reference
// decoder. It checks every decoded frame, the serial output through the
// error counter's totals, and that the survivor memory is never written
// while a trace back is open. It pauses the data source now and then.
//
// Mechanisms counted (each must occur): frames decoded, six-cycle trace
// back windows, clock cycles in which the first 6 stages skip the
// survivor memory, cycles in which the trace-back inputs are isolated
// while the memory is written (toggle filtering), trace backs overlapping
// the next frame's first stages, source pauses, corrected noisy frames
// and corrected nine-error frames.
module viterbi_bist_tb;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  localparam int NF = 45;

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

  // mechanism counters
  int n_dec = 0, n_tb_win = 0, n_skip = 0, n_iso = 0, n_overlap = 0;
  int n_pause = 0, n_noisy_ok = 0, n_nine_ok = 0, n_errs_injected = 0;

  logic [29:0] exp_frames[NF];
  bit          frame_ok[NF];
  int          frame_kind[NF];
  int          exp_err_total = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Internal observation of the decoder's timing signals.
  always @(negedge clk) if (rst_n) begin
    if (dut.u_dec.tb_load) n_tb_win++;
    if (dut.u_dec.in_valid && !dut.u_dec.smu_wr_en) n_skip++;
    if (dut.u_dec.smu_wr_en && !dut.u_dec.tb_en) n_iso++;
    if (dut.u_dec.tb_en && dut.u_dec.in_valid) n_overlap++;
    check(!(dut.u_dec.tb_en && dut.u_dec.smu_wr_en), "survivor memory written during trace back");
    if (dec_valid) begin
      if (n_dec < NF) begin
        check(dec_frame == exp_frames[n_dec],
              $sformatf("frame %0d dec=%h exp=%h", n_dec, dec_frame, exp_frames[n_dec]));
        if (dec_frame == exp_frames[n_dec] && frame_ok[n_dec]) begin
          if (frame_kind[n_dec] == 1) n_noisy_ok++;
          if (frame_kind[n_dec] == 2) n_nine_ok++;
        end
      end else check(0, "extra frame");
      n_dec++;
    end
  end

  initial begin
    bit [9:0] lfsr;
    bit [1:0] pattern[NF][30];
    lfsr = 10'h001;
    // plan every frame
    for (int f = 0; f < NF; f++) begin
      bit data[], dbits[];
      bit [1:0] syms[], rx[];
      int pm0;
      data = new[30];
      for (int i = 0; i < 30; i++) begin
        if (i < 24) begin
          data[i] = lfsr[0];
          lfsr = {lfsr[6] ^ lfsr[0], lfsr[9:1]};
        end else data[i] = 0;
      end
      ref_encode(data, syms);
      frame_kind[f] = f % 3;
      for (int t = 0; t < 30; t++) pattern[f][t] = '0;
      if (frame_kind[f] == 1) begin
        repeat ($urandom_range(1, 3)) pattern[f][$urandom_range(0, 29)] = 2'($urandom_range(1, 3));
      end else if (frame_kind[f] == 2) begin
        for (int tries = 0; tries < 300; tries++) begin
          bit [59:0] mask;
          int cnt;
          bit ok;
          mask = '0; cnt = 0;
          while (cnt < 9) begin
            int p;
            p = $urandom_range(0, 59);
            if (!mask[p]) begin mask[p] = 1; cnt++; end
          end
          foreach (syms[t]) pattern[f][t] = {mask[2*t+1], mask[2*t]};
          rx = syms;
          foreach (rx[t]) rx[t] ^= pattern[f][t];
          ref_decode(rx, dbits, pm0);
          ok = 1;
          foreach (dbits[i]) if (dbits[i] != data[i]) ok = 0;
          if (ok) break;
        end
      end
      rx = syms;
      foreach (rx[t]) begin
        rx[t] ^= pattern[f][t];
        n_errs_injected += int'(pattern[f][t][0]) + int'(pattern[f][t][1]);
      end
      ref_decode(rx, dbits, pm0);
      frame_ok[f] = 1;
      foreach (dbits[i]) begin
        exp_frames[f][i] = dbits[i];
        if (dbits[i] != data[i]) begin frame_ok[f] = 0; exp_err_total++; end
      end
    end

    // drive: run with occasional pauses; noise follows the bit issued
    // one cycle before
    #12 rst_n = 1;
    begin
      int f, t;
      bit prev_run;
      sym_t prev_pat;
      f = 0; t = 0; prev_run = 0; prev_pat = '0;
      while (f < NF || prev_run) begin
        @(negedge clk);
        noise = prev_run ? prev_pat : '0;
        if (f < NF && !(f % 4 == 3 && $urandom_range(0, 3) == 0)) begin
          run = 1;
          prev_pat = pattern[f][t];
          prev_run = 1;
          if (t == 29) begin t = 0; f++; end else t++;
        end else begin
          if (f < NF) n_pause++;
          run = 0;
          prev_run = 0;
        end
      end
      @(negedge clk);
      run = 0; noise = '0;
    end
    repeat (80) @(negedge clk);

    check(n_dec == NF, $sformatf("decoded %0d of %0d frames", n_dec, NF));
    check(int'(bit_count) == NF * 30, $sformatf("bit_count=%0d", bit_count));
    check(int'(err_count) == exp_err_total,
          $sformatf("err_count=%0d exp=%0d", err_count, exp_err_total));
    check(!ref_overflow, "reference FIFO overflow");
    check(n_tb_win == NF, "trace-back windows");
    check(n_skip >= NF * 6, "survivor memory skipped the first stages");
    check(n_iso > 0, "toggle filtering never active");
    check(n_overlap > 0, "trace back never overlapped the next frame");
    check(n_pause > 0, "source never paused");
    check(n_noisy_ok > 0, "no noisy frame corrected");
    check(n_nine_ok > 0, "no nine-error frame corrected");
    $display("frames=%0d tb_windows=%0d skipped_stage_cycles=%0d isolated_cycles=%0d overlap_cycles=%0d pauses=%0d",
             n_dec, n_tb_win, n_skip, n_iso, n_overlap, n_pause);
    $display("errors injected=%0d noisy frames corrected=%0d nine-error frames corrected=%0d residual bit errors=%0d",
             n_errs_injected, n_noisy_ok, n_nine_ok, err_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
