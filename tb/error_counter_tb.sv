// error_counter_tb -- pushes reference bits and later pops decoded bits
// with chosen mismatches, with independent random timing on both sides,
// and checks the mismatch and bit counts and the overflow flag.
module error_counter_tb;
  logic clk = 0, rst_n = 0;
  logic ref_valid = 0, ref_bit = 0, dec_valid = 0, dec_bit = 0;
  logic [31:0] err_count, bit_count;
  logic overflow;
  int checks = 0, failures = 0;

  error_counter #(.DEPTH(16), .CW(32)) dut (
    .clk, .rst_n, .ref_valid, .ref_bit, .dec_valid, .dec_bit,
    .err_count, .bit_count, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sent[$];
    int exp_err, exp_bits, n_push;
    exp_err = 0; exp_bits = 0; n_push = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ref_valid = (sent.size() < 16) && ($urandom_range(0, 1) == 1) && (n_push < 1500);
      ref_bit = $urandom_range(0, 1);
      dec_valid = (sent.size() > 0) && ($urandom_range(0, 1) == 1);
      if (dec_valid) begin
        bit r, wrong;
        r = sent.pop_front();
        wrong = ($urandom_range(0, 9) == 0);
        dec_bit = wrong ? !r : r;
        exp_err += wrong;
        exp_bits++;
      end
      if (ref_valid) begin sent.push_back(ref_bit); n_push++; end
    end
    @(negedge clk);
    ref_valid = 0; dec_valid = 0;
    @(negedge clk);
    checks++;
    if (int'(err_count) != exp_err || int'(bit_count) != exp_bits) begin
      failures++; $display("FAIL err=%0d exp=%0d bits=%0d exp=%0d", err_count, exp_err, bit_count, exp_bits);
    end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow without cause"); end
    // overfill: 16 entries are allowed, the 17th is lost
    for (int i = 0; i < 17 - sent.size(); i++) begin
      ref_valid = 1; ref_bit = 0; @(negedge clk);
    end
    ref_valid = 0;
    @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    $display("errors=%0d bits=%0d", exp_err, exp_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
