// Self-checking test of elite_select at the full population (200): after a
// clear, 20 calls (the top 10 %) must return the indices of the 20 lowest
// costs in increasing cost order (lowest index first on ties), each after
// POP+1 cycles. Repeated over several random cost tables with many ties.
module elite_select_tb;
  import ga_pkg::*;

  localparam int unsigned POP = POP_SIZE_DEF;
  localparam int unsigned E   = POP / 10;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, start = 1'b0;
  logic [15:0] rd_idx, elite;
  cost_t rd_cost;
  logic busy, done;
  int checks = 0, failures = 0;
  cost_t costs [POP];

  assign rd_cost = costs[rd_idx];

  elite_select #(.POP(POP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int r = 0; r < 8; r++) begin
      bit used [POP];
      for (int i = 0; i < POP; i++) begin
        costs[i] = cost_t'($urandom_range(60, 10));
        used[i] = 1'b0;
      end
      if (r == 1) costs[POP - 1] = 0;   // minimum in the last entry
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      for (int e = 0; e < E; e++) begin
        int exp_i; int cyc;
        exp_i = -1;
        for (int i = 0; i < POP; i++)
          if (!used[i] && (exp_i < 0 || costs[i] < costs[exp_i])) exp_i = i;
        used[exp_i] = 1'b1;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cyc = 0;
        while (!done) begin @(negedge clk); cyc++; end
        check(cyc == POP, $sformatf("scan took %0d cycles", cyc));
        check(int'(elite) == exp_i, $sformatf("table %0d elite %0d: %0d expected %0d", r, e, elite, exp_i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
