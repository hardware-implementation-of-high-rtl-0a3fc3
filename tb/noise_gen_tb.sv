// noise_gen_tb -- checks that each symbol leaves the noise stage one
// cycle later with exactly the pattern bits flipped, that flipped marks a
// non-zero pattern, and that the output holds without in_valid.
module noise_gen_tb;
  import vit_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sym_t in_sym = '0, noise = '0, out_sym;
  logic out_valid, flipped;
  int checks = 0, failures = 0;

  noise_gen dut (.clk, .rst_n, .in_valid, .in_sym, .noise, .out_sym, .out_valid, .flipped);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t last;
    last = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      bit v;
      sym_t s, n, e;
      @(negedge clk);
      v = ($urandom_range(0, 3) != 0);
      s = sym_t'($urandom_range(0, 3));
      n = sym_t'($urandom_range(0, 3));
      in_valid = v; in_sym = s; noise = n;
      // expected symbol (bitwise: flip where the pattern has a 1)
      for (int b = 0; b < 2; b++) e[b] = n[b] ? !s[b] : s[b];
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid != v) begin failures++; $display("FAIL valid"); end
      if (v) begin
        checks++;
        if (out_sym != e || flipped != (n != 0)) begin
          failures++; $display("FAIL sym=%b noise=%b out=%b", s, n, out_sym);
        end
        last = e;
      end else begin
        checks++;
        if (out_sym != last) begin failures++; $display("FAIL output moved"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
