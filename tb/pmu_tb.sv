// pmu_tb -- drives the path metric unit through several frames of random
// received symbols and compares every survivor bit and, after each
// stage, every path metric with the reference ACS model. Also checks the
// reset values and that the metrics hold while en is low.
module pmu_tb;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  bm_t [3:0] bm;
  sym_t rx;
  logic [63:0] sp;
  logic [63:0][7:0] pm;
  int checks = 0, failures = 0;

  bmu u_bmu (.rx_sym(rx), .bm);
  pmu dut (.clk, .rst_n, .en, .first, .bm, .sp, .pm);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_pm[64], ref_next[64];
    dec_row_t ref_dec;
    rx = '0;
    #12 rst_n = 1;
    @(negedge clk);
    checks++;
    if (pm[0] != 0 || pm[1] != 8'd128) begin
      failures++; $display("FAIL reset metrics");
    end
    for (int f = 0; f < 6; f++) begin
      for (int s = 0; s < 64; s++) ref_pm[s] = (s == 0) ? 0 : 128;
      for (int t = 0; t < 30; t++) begin
        // random gaps
        if ($urandom_range(0, 3) == 0) begin
          logic [63:0][7:0] held;
          en = 0; held = pm;
          @(negedge clk);
          checks++;
          if (pm != held) begin failures++; $display("FAIL metrics moved while idle"); end
        end
        en = 1; first = (t == 0);
        rx = sym_t'($urandom_range(0, 3));
        ref_stage(ref_pm, rx, ref_next, ref_dec);
        #1;
        for (int s = 0; s < 64; s++) begin
          checks++;
          if (sp[s] != ref_dec[s]) begin
            failures++;
            $display("FAIL f%0d t%0d state %0d sp=%0d exp=%0d", f, t, s, sp[s], ref_dec[s]);
          end
        end
        @(negedge clk);
        ref_pm = ref_next;
        for (int s = 0; s < 64; s++) begin
          checks++;
          if (int'(pm[s]) != ref_pm[s]) begin
            failures++;
            $display("FAIL f%0d t%0d pm[%0d]=%0d exp=%0d", f, t, s, pm[s], ref_pm[s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
