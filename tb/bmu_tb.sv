// bmu_tb -- exhaustive check of the branch metric unit: every received
// symbol against every expected symbol, distance counted bit by bit.
module bmu_tb;
  import vit_pkg::*;

  sym_t      rx_sym;
  bm_t [3:0] bm;
  int checks = 0, failures = 0;

  bmu dut (.rx_sym, .bm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx_sym = sym_t'(r);
      #1;
      for (int e = 0; e < 4; e++) begin
        int exp_d;
        exp_d = ((r & 1) != (e & 1) ? 1 : 0) + ((r & 2) != (e & 2) ? 1 : 0);
        checks++;
        if (int'(bm[e]) != exp_d) begin
          failures++;
          $display("FAIL rx=%0d e=%0d bm=%0d exp=%0d", r, e, bm[e], exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
