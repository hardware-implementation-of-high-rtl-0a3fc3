// conv_encoder_tb -- compares the encoder with the reference (171, 133)
// encoder over random frames with random enable gaps, and checks the
// one-cycle symbol latency and that the state returns to zero after the
// six tail zeros (a following all-zero input must give symbol 00).
module conv_encoder_tb;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, u = 0;
  sym_t sym;
  logic sym_valid;
  int checks = 0, failures = 0;

  conv_encoder dut (.clk, .rst_n, .en, .u, .sym, .sym_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int f = 0; f < 50; f++) begin
      bit data[];
      bit [1:0] syms[];
      data = new[30];
      foreach (data[i]) data[i] = (i < 24) ? bit'($urandom_range(0, 1)) : 1'b0;
      ref_encode(data, syms);
      for (int t = 0; t < 30; t++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin
          en = 0;
          @(negedge clk);
          checks++;
          if (sym_valid) begin failures++; $display("FAIL valid without input"); end
        end
        en = 1; u = data[t];
        @(negedge clk);
        en = 0;
        checks++;
        if (!sym_valid || sym != syms[t]) begin
          failures++;
          $display("FAIL frame %0d t %0d sym=%b exp=%b", f, t, sym, syms[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
