// vit_ctrl_tb -- runs the controller over frames with random symbol gaps
// and checks, cycle by cycle, the stage flags, the survivor-memory write
// select (never during the first 6 stages of a frame) and the trace-back
// window: tb_en for exactly 6 cycles after each frame's last symbol,
// load in the 6th.
module vit_ctrl_tb;
  import vit_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic first, smu_wr_en, frame_end, tb_en, load;
  logic [4:0] smu_idx;
  int checks = 0, failures = 0;
  int stage = 0, since_end = -1, frames = 0, loads = 0;

  vit_ctrl dut (.clk, .rst_n, .in_valid, .first, .smu_wr_en, .smu_idx,
                .frame_end, .tb_en, .load);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d (stage %0d)", what, got, exp_v, stage);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_valid = (cyc % 97 < 60) ? 1'b1 : ($urandom_range(0, 2) == 0);
      #1;
      expect_eq("first", first, stage == 0);
      expect_eq("smu_wr_en", smu_wr_en, in_valid && stage >= 6);
      if (in_valid && stage >= 6) expect_eq("smu_idx", smu_idx, stage - 6);
      expect_eq("frame_end", frame_end, in_valid && stage == 29);
      expect_eq("tb_en", tb_en, since_end >= 1 && since_end <= 6);
      expect_eq("load", load, since_end == 6);
      @(posedge clk);
      if (load) loads++;
      if (since_end >= 0) since_end++;
      if (since_end > 6) since_end = -1;
      if (in_valid) begin
        if (stage == 29) begin stage = 0; since_end = 1; frames++; end
        else stage++;
      end
    end
    checks++;
    if (frames < 10 || loads != frames) begin
      failures++; $display("FAIL frames=%0d loads=%0d", frames, loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
