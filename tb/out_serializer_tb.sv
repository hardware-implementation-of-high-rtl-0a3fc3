// out_serializer_tb -- loads random 30-bit frames and checks that they
// come out stage 1 first, one bit per cycle, with sout_valid high for
// exactly 30 cycles, then low until the next load.
module out_serializer_tb;
  logic clk = 0, rst_n = 0, load = 0;
  logic [29:0] din = '0;
  logic sout, sout_valid;
  int checks = 0, failures = 0;

  out_serializer dut (.clk, .rst_n, .load, .din, .sout, .sout_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      logic [29:0] v;
      int gap;
      v = 30'($urandom);
      @(negedge clk);
      load = 1; din = v;
      @(negedge clk);
      load = 0; din = '0;
      for (int i = 0; i < 30; i++) begin
        checks++;
        if (!sout_valid || sout != v[i]) begin
          failures++;
          $display("FAIL frame %0d bit %0d sout=%0d exp=%0d valid=%0d", f, i, sout, v[i], sout_valid);
        end
        @(negedge clk);
      end
      gap = $urandom_range(0, 4);
      for (int i = 0; i <= gap; i++) begin
        checks++;
        if (sout_valid) begin failures++; $display("FAIL valid after frame"); end
        if (i < gap) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
