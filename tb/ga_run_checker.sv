// Test harness used by ga_tsp_workloads_tb: runs one complete optimisation
// of ga_tsp_top in a given configuration and checks the result.
//
// Resets the accelerator, holds start high until done, counts the clock
// cycles of the run, then reads the whole final population through the
// read port and checks that every route is a permutation of 0..N-1, that
// best_dist is the minimum of the recomputed route costs (distances with
// real-valued square roots), that the route at best_idx costs best_dist,
// and that current_gen equals the generation count. `finished` rises when
// all checks are made; `checks` and `failures` count them.
module ga_run_checker
  import ga_pkg::*;
#(
  parameter int unsigned N   = 29,
  parameter int unsigned POP = 150,
  parameter int unsigned GEN = 1500,
  parameter string       NAME = "run"
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);

  logic rst = 1'b1, start = 1'b0;
  logic done, best_update;
  cost_t best_dist;
  logic [15:0] best_idx, pop_size_out;
  gen_t best_gen, current_gen, total_gen;
  addr_t rd_addr = '0;
  city_t rd_city;

  ga_tsp_top #(.N (N), .POP (POP), .MAX_GEN (GEN)) dut (.*);

  function automatic int unsigned ref_dist(int unsigned a, int unsigned b);
    real dx, dy;
    dx = real'(city_x(a)) - real'(city_x(b));
    dy = real'(city_y(a)) - real'(city_y(b));
    return int'($floor($sqrt(dx * dx + dy * dy) + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%s): %s", NAME, what);
    end
  endtask

  longint cycles = 0;
  int improvements = 0;
  always @(posedge clk) begin
    if (start && !done) cycles++;
    if (best_update) improvements++;
  end

  int unsigned route [N];

  initial begin
    int unsigned min_cost;
    checks = 0;
    failures = 0;
    finished = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    start <= 1'b1;
    wait (done);
    @(posedge clk);
    check(current_gen == gen_t'(GEN), "current_gen equals the generation count");
    check(improvements > 0, "best register was updated");
    min_cost = '1;
    for (int i = 0; i < POP; i++) begin
      bit seen [N];
      int unsigned c;
      bit perm_ok;
      foreach (seen[k]) seen[k] = 1'b0;
      for (int p = 0; p < N; p++) begin
        rd_addr <= addr_t'(i * N + p);
        @(posedge clk);
        @(negedge clk);
        route[p] = rd_city;
      end
      perm_ok = 1'b1;
      for (int p = 0; p < N; p++) begin
        if (route[p] >= N || seen[route[p]]) perm_ok = 1'b0;
        else seen[route[p]] = 1'b1;
      end
      check(perm_ok, $sformatf("individual %0d is a permutation", i));
      c = 0;
      for (int p = 0; p < N; p++) c += ref_dist(route[p], route[(p + 1) % N]);
      if (c < min_cost) min_cost = c;
      if (i == int'(best_idx))
        check(c == best_dist, $sformatf("best route costs %0d, best_dist %0d", c, best_dist));
    end
    check(min_cost == best_dist, "best_dist is the population minimum");
    $display("%s: N=%0d POP=%0d GEN=%0d best_dist=%0d found in generation %0d, %0d cycles (%0d per generation)",
             NAME, N, POP, GEN, best_dist, best_gen, cycles, cycles / GEN);
    finished = 1'b1;
  end

endmodule
