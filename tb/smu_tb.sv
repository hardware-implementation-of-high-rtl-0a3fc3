// smu_tb -- writes random survivor words into the survivor memory with
// random write selects and enables, and checks after every edge that
// exactly the selected register changed and all others held.
module smu_tb;
  import vit_pkg::*;

  logic clk = 0, wr_en = 0;
  logic [4:0] wr_idx = '0;
  logic [63:0] sp = '0;
  logic [23:0][63:0] mem;
  logic [23:0][63:0] model;
  int checks = 0, failures = 0;

  smu dut (.clk, .wr_en, .wr_idx, .sp, .mem);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every register once so the model is known
    for (int j = 0; j < 24; j++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 5'(j); sp = {$urandom, $urandom};
      model[j] = sp;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (mem != model) begin
        failures++;
        for (int j = 0; j < 24; j++)
          if (mem[j] != model[j]) $display("FAIL step %0d reg %0d", i, j);
      end
      wr_en  = ($urandom_range(0, 4) != 0);
      wr_idx = 5'($urandom_range(0, 31));   // 24..31 select no register
      sp     = {$urandom, $urandom};
      if (wr_en && wr_idx < 24) model[wr_idx] = sp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
