// Self-checking test of tournament_select at the full population (200) and
// tournament size (5). Random words are driven every cycle; the testbench
// maps each to an index itself ((r * POP) >> 16), checks the index the
// block reads, and predicts the winner (lowest cost, earliest draw on a
// tie). `done` must come TOUR_SIZE+1 cycles after `start`.
module tournament_select_tb;
  import ga_pkg::*;

  localparam int unsigned POP = POP_SIZE_DEF;
  localparam int unsigned TS  = TOUR_SIZE_DEF;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [15:0] rnd = '0, rd_idx, winner;
  cost_t rd_cost;
  logic busy, done;
  int checks = 0, failures = 0;
  cost_t costs [POP];

  assign rd_cost = costs[rd_idx];

  tournament_select #(.POP(POP), .TOUR_SIZE(TS)) dut (.*);

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
    for (int i = 0; i < POP; i++) costs[i] = cost_t'($urandom_range(500, 100));
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      int exp_w; cost_t exp_c; int cyc;
      @(negedge clk);
      start = 1'b1; rnd = 16'($urandom);
      @(negedge clk);
      start = 1'b0;
      exp_c = '1; exp_w = -1;
      for (int d = 0; d < TS; d++) begin
        int e;
        rnd = 16'($urandom);
        #1;
        e = (int'(rnd) * POP) >> 16;
        check(int'(rd_idx) == e, "draw index");
        check(busy && !done, "busy while drawing");
        if (exp_w < 0 || costs[e] < exp_c) begin exp_c = costs[e]; exp_w = e; end
        @(negedge clk);
      end
      check(done, "done TOUR_SIZE+1 cycles after start");
      check(int'(winner) == exp_w, $sformatf("winner %0d expected %0d", winner, exp_w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
