// viterbi_decoder_tb -- feeds the decoder encoded frames with channel
// errors and checks every decoded frame against the reference decoder.
//
// Frame kinds: error-free (must decode to the sent data), random errors
// (must match the reference maximum-likelihood result and its final S00
// metric), and nine-error frames that the reference corrects completely
// (the decoder must correct them too). Frames are sent back to back, and
// some with random gaps in in_valid. Also checked: dec_valid comes
// exactly 6 clock edges after the edge that accepts a frame's last
// symbol (the 6-cycle trace back), and sout repeats each decoded frame,
// bit 1 first.
module viterbi_decoder_tb;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  localparam int NFRAMES = 60;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sym_t rx_sym = '0;
  logic [29:0] dec_frame;
  logic dec_valid, sout, sout_valid;
  pm_t pm_s00;
  int checks = 0, failures = 0;
  int cycle = 0;

  logic [29:0] exp_q[$];
  int          exp_pm_q[$];
  int          end_cycle_q[$];
  bit          ser_q[$];
  int n_clean = 0, n_noisy = 0, n_nine = 0, n_gap = 0, n_out = 0;

  viterbi_decoder dut (.clk, .rst_n, .in_valid, .rx_sym, .dec_frame,
                       .dec_valid, .sout, .sout_valid, .pm_s00);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Output monitor
  always @(negedge clk) begin
    if (rst_n && dec_valid) begin
      logic [29:0] e;
      int ec;
      if (exp_q.size() == 0) check(0, "unexpected dec_valid");
      else begin
        e = exp_q.pop_front();
        ec = end_cycle_q.pop_front();
        check(dec_frame == e, $sformatf("frame %0d dec=%h exp=%h", n_out, dec_frame, e));
        check(cycle - ec == 6, $sformatf("latency %0d edges", cycle - ec));
        for (int i = 0; i < 30; i++) ser_q.push_back(e[i]);
        n_out++;
      end
    end
    if (rst_n && sout_valid) begin
      if (ser_q.size() == 0) check(0, "unexpected sout_valid");
      else check(sout == ser_q.pop_front(), "sout bit");
    end
  end

  task automatic send_frame(bit [1:0] rx[], bit gaps);
    for (int t = 0; t < 30; t++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin
        in_valid = 0; @(negedge clk);
      end
      in_valid = 1; rx_sym = rx[t];
      @(negedge clk);
      if (t == 29) end_cycle_q.push_back(cycle);
    end
    in_valid = 0;
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      bit data[], dbits[];
      bit [1:0] syms[], rx[];
      int pm0, kind;
      logic [29:0] e;
      bit gaps;
      data = new[30];
      foreach (data[i]) data[i] = (i < 24) ? bit'($urandom_range(0, 1)) : 1'b0;
      ref_encode(data, syms);
      rx = syms;
      kind = f % 3;
      if (kind == 1) begin
        repeat ($urandom_range(1, 8)) rx[$urandom_range(0, 29)] ^= 2'($urandom_range(1, 3));
        n_noisy++;
      end else if (kind == 2) begin
        // nine single-bit errors at distinct positions the reference corrects
        for (int tries = 0; tries < 200; tries++) begin
          bit [59:0] mask;
          int cnt;
          bit ok;
          mask = '0; cnt = 0;
          while (cnt < 9) begin
            int p;
            p = $urandom_range(0, 59);
            if (!mask[p]) begin mask[p] = 1; cnt++; end
          end
          rx = syms;
          foreach (rx[t]) rx[t] ^= {mask[2*t+1], mask[2*t]};
          ref_decode(rx, dbits, pm0);
          ok = 1;
          foreach (dbits[i]) if (dbits[i] != data[i]) ok = 0;
          if (ok) break;
        end
        n_nine++;
      end else n_clean++;
      ref_decode(rx, dbits, pm0);
      foreach (dbits[i]) e[i] = dbits[i];
      if (kind != 1) begin
        logic [29:0] d;
        foreach (data[i]) d[i] = data[i];
        check(e == d, "reference failed to correct a chosen frame");
      end
      exp_q.push_back(e);
      exp_pm_q.push_back(pm0);
      gaps = (f % 5 == 4);
      if (gaps) n_gap++;
      send_frame(rx, gaps);
      // final S00 metric is visible two edges after the last symbol
      fork begin
        int p;
        p = exp_pm_q.pop_front();
        @(negedge clk); @(negedge clk);
        check(int'(pm_s00) == p, $sformatf("pm_s00=%0d exp=%0d", pm_s00, p));
      end join_none
    end
    repeat (60) @(negedge clk);
    check(n_out == NFRAMES, $sformatf("decoded %0d of %0d frames", n_out, NFRAMES));
    check(ser_q.size() == 0, "serial output incomplete");
    $display("frames: clean=%0d noisy=%0d nine-error=%0d with gaps=%0d",
             n_clean, n_noisy, n_nine, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
