// acs_tb -- random and corner-case check of one add-compare-select unit:
// winning metric, survivor bit, and the lower branch kept on a tie.
module acs_tb;
  import vit_pkg::*;

  logic [7:0] pm_u, pm_l, pm_out;
  logic [1:0] bm_u, bm_l;
  logic       sp;
  int checks = 0, failures = 0;

  acs #(.W(8), .BW(2)) dut (.pm_u, .bm_u, .pm_l, .bm_l, .pm_out, .sp);

  task automatic check_one(int a, int b, int c, int d);
    int xu, xl, exp_pm;
    bit exp_sp;
    pm_u = 8'(a); bm_u = 2'(b); pm_l = 8'(c); bm_l = 2'(d);
    #1;
    xu = a + b; xl = c + d;
    exp_sp = (xu < xl);
    exp_pm = exp_sp ? xu : xl;
    checks++;
    if (sp != exp_sp || int'(pm_out) != exp_pm) begin
      failures++;
      $display("FAIL u=%0d+%0d l=%0d+%0d -> pm=%0d sp=%0d exp %0d %0d",
               a, b, c, d, pm_out, sp, exp_pm, exp_sp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(5, 1, 5, 1);      // tie: lower kept
    check_one(3, 0, 4, 0);      // upper smaller
    check_one(4, 2, 3, 2);      // lower smaller
    check_one(128, 2, 60, 2);   // unreachable upper
    for (int i = 0; i < 2000; i++)
      check_one($urandom_range(0, 140), $urandom_range(0, 2),
                $urandom_range(0, 140), $urandom_range(0, 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
