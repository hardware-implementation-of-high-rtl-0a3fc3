// serial_input_gen_tb -- checks the data source against an independent
// LFSR model (x^10 + x^6 + 1, output Q0), the six zero tail bits at the
// end of every 30-bit frame, the LFSR holding during the tail and while
// en is low, and the 62-bit period of the data sequence.
module serial_input_gen_tb;
  logic clk = 0, rst_n = 0, en = 0;
  logic u, u_valid, tail;
  int checks = 0, failures = 0;

  serial_input_gen dut (.clk, .rst_n, .en, .u, .u_valid, .tail);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [9:0] lfsr;
    bit data_seq[$];
    int pos;
    lfsr = 10'h001; pos = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (u_valid != en) begin failures++; $display("FAIL u_valid"); end
      if (en) begin
        bit exp_u, exp_tail;
        exp_tail = (pos >= 24);
        exp_u = exp_tail ? 1'b0 : lfsr[0];
        checks++;
        if (u != exp_u || tail != exp_tail) begin
          failures++;
          $display("FAIL step %0d pos %0d u=%0d exp=%0d tail=%0d", i, pos, u, exp_u, tail);
        end
        if (!exp_tail) begin
          data_seq.push_back(lfsr[0]);
          // new Q9 = Q6 ^ Q0, shift towards Q0
          lfsr = {lfsr[6] ^ lfsr[0], lfsr[9:1]};
        end
        pos = (pos + 1) % 30;
      end
    end
    // period of the data sequence
    for (int i = 0; i + 62 < data_seq.size(); i++) begin
      checks++;
      if (data_seq[i] != data_seq[i + 62]) begin failures++; $display("FAIL period at %0d", i); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
