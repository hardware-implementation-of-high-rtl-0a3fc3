// tbu_tb -- fills the survivor inputs with the decisions of random noisy
// frames (from the reference decoder) and with random words, and checks
// the registered trace-back result against a reference trace back. Also
// checks that the result register only changes on load, that dec_valid
// follows load by one cycle, and that with tb_en low (toggle filtering)
// the chain sees all-zero survivor bits.
module tbu_tb;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  logic clk = 0, rst_n = 0, tb_en = 0, load = 0;
  logic [23:0][63:0] mem;
  logic [29:0] dec;
  logic dec_valid;
  int checks = 0, failures = 0;

  tbu dut (.clk, .rst_n, .tb_en, .load, .mem, .dec, .dec_valid);

  always #5 clk = ~clk;

  function automatic logic [29:0] trace(logic [23:0][63:0] m, bit use_mem);
    logic [29:0] r;
    int st;
    st = 0;
    for (int t = 29; t >= 0; t--) begin
      bit b;
      r[t] = st[0];
      b = (t >= 6 && use_mem) ? m[t-6][st] : 1'b0;
      st = (st >> 1) | (int'(b) << 5);
    end
    return r;
  endfunction

  task automatic run_trace(bit en_tb, logic [29:0] expv, string what);
    logic [29:0] prior;
    @(negedge clk);
    tb_en = en_tb; load = 0; prior = dec;
    repeat (3) @(negedge clk);
    checks++;
    if (dec != prior || dec_valid) begin failures++; $display("FAIL %s: output moved before load", what); end
    load = 1;
    @(negedge clk);
    load = 0; tb_en = 0;
    checks++;
    if (!dec_valid || dec != expv) begin
      failures++;
      $display("FAIL %s: dec=%h exp=%h valid=%0d", what, dec, expv, dec_valid);
    end
    @(negedge clk);
    checks++;
    if (dec_valid) begin failures++; $display("FAIL %s: dec_valid longer than a cycle", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      bit data[], rxb[];
      bit [1:0] syms[], rx[];
      bit dbits[];
      int pm0;
      int st, pmi[64], pmo[64];
      dec_row_t d;
      data = new[30];
      foreach (data[i]) data[i] = (i < 24) ? bit'($urandom_range(0, 1)) : 1'b0;
      ref_encode(data, syms);
      rx = syms;
      repeat ($urandom_range(0, 5)) rx[$urandom_range(0, 29)] ^= 2'($urandom_range(1, 3));
      // survivor decisions of this frame
      for (int s = 0; s < 64; s++) pmi[s] = (s == 0) ? 0 : 1000;
      for (int t = 0; t < 30; t++) begin
        ref_stage(pmi, rx[t], pmo, d);
        pmi = pmo;
        if (t >= 6) mem[t-6] = d;
      end
      ref_decode(rx, dbits, pm0);
      begin
        logic [29:0] e;
        foreach (dbits[i]) e[i] = dbits[i];
        checks++;
        if (e != trace(mem, 1)) begin failures++; $display("FAIL model mismatch frame %0d", f); end
        run_trace(1, e, "frame");
      end
    end
    for (int f = 0; f < 40; f++) begin
      foreach (mem[j]) mem[j] = {$urandom, $urandom};
      run_trace(1, trace(mem, 1), "random");
    end
    // toggle filtering: with tb_en low the chain reads zeros
    for (int f = 0; f < 20; f++) begin
      foreach (mem[j]) mem[j] = (f == 0) ? '1 : {$urandom, $urandom};
      run_trace(0, trace(mem, 0), "isolated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
