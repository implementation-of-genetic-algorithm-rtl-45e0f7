// Self-checking test of best_register: 3000 random offers (costs from a
// narrow range so ties are frequent) against a reference minimum; a tie
// must not move best_idx or best_gen, the update signal must pulse exactly
// one cycle after each strict improvement, rebase must move only best_idx,
// and clr must restore the all-ones start value.
module best_register_tb;
  import ga_pkg::*;

  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, upd = 1'b0, rebase = 1'b0;
  cost_t cost = '0;
  logic [15:0] idx = '0, rebase_idx = '0;
  gen_t gen = '0;
  cost_t best_dist;
  logic [15:0] best_idx;
  gen_t best_gen;
  logic improved;
  int checks = 0, failures = 0;

  best_register dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cost_t ref_best;
    logic [15:0] ref_idx;
    gen_t ref_gen;
    bit exp_imp;
    int n_imp = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    check(best_dist == '1, "reset value is all ones");
    ref_best = '1; ref_idx = 0; ref_gen = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      upd = $urandom_range(3) != 0;
      rebase = !upd && ($urandom_range(9) == 0);
      cost = cost_t'(1000 - t / 4 + $urandom_range(40));
      idx = 16'($urandom); gen = gen_t'(t); rebase_idx = 16'($urandom);
      exp_imp = upd && (cost < ref_best);
      if (exp_imp) begin ref_best = cost; ref_idx = idx; ref_gen = gen; n_imp++; end
      else if (rebase) ref_idx = rebase_idx;
      @(negedge clk);
      upd = 1'b0; rebase = 1'b0;
      check(improved == exp_imp, $sformatf("update signal at offer %0d", t));
      check(best_dist == ref_best && best_idx == ref_idx && best_gen == ref_gen,
            $sformatf("offer %0d: best %0d/%0d/%0d expected %0d/%0d/%0d", t,
                      best_dist, best_idx, best_gen, ref_best, ref_idx, ref_gen));
    end
    check(n_imp > 10, "improvements occurred");
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    check(best_dist == '1 && !improved, "clr restores the start value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
