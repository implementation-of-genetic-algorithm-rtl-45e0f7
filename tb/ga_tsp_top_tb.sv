// End-to-end test of the GA accelerator at reduced size.
//
// Runs a complete optimisation (N=12 cities, POP=20, 30 generations, raised
// mutation rate so mutations occur often), then reads the whole final
// population back through the read port and checks, independently of the
// RTL's arithmetic (distances recomputed with real-valued square roots):
//   - every individual is a permutation of 0..N-1;
//   - every individual's cost equals the cost recorded for it;
//   - the route at best_idx costs exactly best_dist;
//   - best_dist is the minimum over the final population and never rose;
//   - current_gen = MAX_GEN at done, and the status outputs.
// It also counts each mechanism of the design while it runs (initial fill,
// shuffle swaps, elite copies, tournaments, crossovers, crossover-rate
// copies, comparator-suppressed writes, mutations, best-register updates,
// index rebases, generation turns) and fails if any never happened.
module ga_tsp_top_tb;
  import ga_pkg::*;

  localparam int unsigned N   = 12;
  localparam int unsigned POP = 20;
  localparam int unsigned GEN = 30;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic done, best_update;
  cost_t best_dist;
  logic [15:0] best_idx, pop_size_out;
  gen_t best_gen, current_gen, total_gen;
  addr_t rd_addr = '0;
  city_t rd_city;

  int checks = 0, failures = 0;

  ga_tsp_top #(
    .N (N), .POP (POP), .MAX_GEN (GEN), .MUT_RATE (16384)
  ) dut (.*);

  always #5 clk = ~clk;

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
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_init = 0, n_shuffle = 0, n_elite = 0, n_tour = 0, n_cross = 0,
      n_copy = 0, n_suppress = 0, n_mut = 0, n_improve = 0, n_rebase = 0,
      n_nextgen = 0;
  cost_t prev_best = '1;
  logic prev_done = 1'b0;

  always @(posedge clk) if (!rst) begin
    if (dut.state == S_INIT) n_init++;
    if (dut.state == S_SHUFFLE && dut.sw_done) n_shuffle++;
    if (dut.state == S_MUTATION && dut.sw_done) n_mut++;
    if (dut.el_done) n_elite++;
    if (dut.tour_done) n_tour++;
    if (dut.xo_start && !dut.xo_copy) n_cross++;
    if (dut.xo_start && dut.xo_copy && dut.state == S_CROSSOVER && dut.pop_count >= 16'(POP / 10)) n_copy++;
    if (dut.u_xo.r_valid && dut.u_xo.in_child) n_suppress++;
    if (best_update) n_improve++;
    if (dut.bu_rebase) n_rebase++;
    if (dut.state == S_NEXT_GEN) n_nextgen++;
    if (best_dist > prev_best) begin
      failures++;
      $display("FAIL: best_dist rose from %0d to %0d", prev_best, best_dist);
    end
    prev_best <= best_dist;
  end

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned route [N];
  int unsigned min_cost;

  initial begin
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    start <= 1'b1;
    wait (done);
    @(posedge clk);
    check(current_gen == gen_t'(GEN), "current_gen equals MAX_GEN at done");
    check(total_gen == gen_t'(GEN) && pop_size_out == 16'(POP), "status outputs");
    check(best_gen <= gen_t'(GEN), "best_gen in range");

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
      check(c == dut.u_cost.mem[int'(dut.par_bank) * POP + i],
            $sformatf("individual %0d cost %0d matches table %0d", i, c,
                      dut.u_cost.mem[int'(dut.par_bank) * POP + i]));
      if (c < min_cost) min_cost = c;
      if (i == int'(best_idx))
        check(c == best_dist, $sformatf("best route cost %0d equals best_dist %0d", c, best_dist));
    end
    check(min_cost == best_dist, "best_dist is the population minimum");

    $display("mechanisms: init=%0d shuffle=%0d elite=%0d tournament=%0d crossover=%0d copy=%0d suppressed=%0d mutation=%0d improve=%0d rebase=%0d nextgen=%0d",
             n_init, n_shuffle, n_elite, n_tour, n_cross, n_copy, n_suppress, n_mut, n_improve, n_rebase, n_nextgen);
    $display("best_dist=%0d best_gen=%0d best_idx=%0d", best_dist, best_gen, best_idx);
    check(n_init == POP * N, "initial fill wrote every gene once");
    check(n_shuffle == POP * N, "N shuffle swaps per initial individual");
    check(n_elite == GEN * (POP / 10), "elite count per generation");
    check(n_tour == 2 * GEN * (POP - POP / 10), "two tournaments per offspring");
    check(n_cross > 0, "crossover happened");
    check(n_copy > 0, "crossover-rate copy happened");
    check(n_suppress > 0, "comparator suppressed a duplicate");
    check(n_mut > 0, "mutation happened");
    check(n_improve > 1, "best register improved");
    check(n_rebase == GEN, "best index rebased each generation");
    check(n_nextgen == GEN, "generation turns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
