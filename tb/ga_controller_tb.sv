// Self-checking test of ga_controller with simple behavioural stand-ins for
// the operators it sequences (each answers its start with a done pulse a
// fixed number of cycles later; selections return random winners, the
// fitness unit a random cost). Small configuration: N=6, POP=10 (one
// elite), 5 generations, crossover and mutation rates 0.5.
// Checked: the identity fill (every address once, gene = address mod N);
// N shuffle swaps per initial individual on distinct positions of the right
// slot; per generation one elite copy, two tournaments per other slot, a
// crossover start per slot with the right parent bases, copy mode for the
// elite; cost-table writes of every slot in order with the fitness result;
// one index rebase per generation; bank roles swapping every generation;
// both crossover outcomes and mutations happening; done with
// current_gen = MAX_GEN.
module ga_controller_tb;
  import ga_pkg::*;

  localparam int unsigned N = 6, POP = 10, GEN = 5, ELITE = 1;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  rnd_t rnd;
  ga_state_t state;
  logic par_bank, work_bank, init_we, sw_en, sw_done, xo_start, xo_copy, xo_done;
  addr_t init_addr, sw_addr_a, sw_addr_b, xo_p1_base, xo_p2_base, xo_o_base, fit_base;
  city_t init_data, xo_cut1, xo_cut2;
  logic tour_start, tour_done, el_clear, el_start, el_done, fit_start, fit_done;
  logic [15:0] tour_winner, el_elite, ct_idx, pop_count;
  cost_t fit_cost, ct_cost;
  logic ct_we, bu_upd, bu_rebase, done;
  gen_t bu_gen, current_gen;
  int checks = 0, failures = 0;

  ga_controller #(.N(N), .POP(POP), .MAX_GEN(GEN), .CX_RATE(32768), .MUT_RATE(32768)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // operator stand-ins
  int xo_t = 0, tour_t = 0, el_t = 0, fit_t = 0;
  always @(posedge clk) begin
    rnd <= $urandom;
    sw_done <= sw_en && !sw_done;
    xo_done <= 1'b0; tour_done <= 1'b0; el_done <= 1'b0; fit_done <= 1'b0;
    if (xo_start) xo_t <= 3; else if (xo_t > 0) begin xo_t <= xo_t - 1; if (xo_t == 1) xo_done <= 1'b1; end
    if (tour_start) tour_t <= 2; else if (tour_t > 0) begin
      tour_t <= tour_t - 1;
      if (tour_t == 1) begin tour_done <= 1'b1; tour_winner <= 16'($urandom_range(POP - 1)); end
    end
    if (el_start) el_t <= 2; else if (el_t > 0) begin
      el_t <= el_t - 1;
      if (el_t == 1) begin el_done <= 1'b1; el_elite <= 16'($urandom_range(POP - 1)); end
    end
    if (fit_start) fit_t <= 4; else if (fit_t > 0) begin
      fit_t <= fit_t - 1;
      if (fit_t == 1) begin fit_done <= 1'b1; fit_cost <= cost_t'($urandom_range(9999)); end
    end
  end

  // observers
  int n_init = 0, n_shuffle = 0, n_mut = 0, n_el = 0, n_tour = 0, n_xo = 0,
      n_copy_el = 0, n_copy_rate = 0, n_cross = 0, n_rebase = 0, n_ct = 0, n_gen_ct = 0;
  int exp_ct_idx = 0;
  logic [15:0] last_el, w1, w2;
  int tours_in_slot = 0;
  cost_t last_fit;
  logic prev_par;
  int flips = 0;
  always @(posedge clk) if (!rst) begin
    if (init_we) begin
      check(32'(init_addr) == n_init && 32'(init_data) == n_init % N, "identity fill");
      n_init++;
    end
    if (sw_en && state == S_SHUFFLE) begin
      n_shuffle++;
      check(sw_addr_a != sw_addr_b, "shuffle positions distinct");
      check(32'(sw_addr_a) / N == 32'(pop_count) && 32'(sw_addr_b) / N == 32'(pop_count), "shuffle inside the slot");
    end
    if (sw_en && state == S_MUTATION) begin
      n_mut++;
      check(sw_addr_a != sw_addr_b && 32'(sw_addr_a) / N == 32'(pop_count), "mutation positions");
    end
    if (el_done) begin n_el++; last_el = el_elite; end
    if (tour_done) begin
      n_tour++;
      if (tours_in_slot == 0) w1 = tour_winner; else w2 = tour_winner;
      tours_in_slot = (tours_in_slot + 1) % 2;
    end
    if (xo_start) begin
      n_xo++;
      check(xo_o_base == addr_t'(32'(pop_count) * N), "offspring base");
      if (32'(pop_count) < ELITE) begin
        check(xo_copy && xo_p1_base == addr_t'(32'(last_el) * N), "elite copied unchanged");
        n_copy_el++;
      end else begin
        check(xo_p1_base == addr_t'(32'(w1) * N) && xo_p2_base == addr_t'(32'(w2) * N), "tournament winners are the parents");
        check(xo_cut1 <= xo_cut2 && 32'(xo_cut2) < N, "cut points ordered");
        if (xo_copy) n_copy_rate++; else n_cross++;
      end
      check(work_bank != par_bank, "offspring written to the other bank");
    end
    if (fit_done) last_fit = fit_cost;
    if (fit_start) check(fit_base == addr_t'(32'(pop_count) * N), "evaluation base");
    if (ct_we) begin
      check(32'(ct_idx) == exp_ct_idx && ct_cost == last_fit, "cost-table write");
      exp_ct_idx = (exp_ct_idx + 1) % POP;
      n_ct++;
    end
    if (bu_rebase) begin
      n_rebase++;
      check(ct_idx == 0, "rebase on slot 0");
    end
    if (state == S_NEXT_GEN) flips++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    repeat (3) @(negedge clk);
    check(state == S_IDLE, "idle without start");
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (done);
    repeat (5) @(negedge clk);
    check(done && state == S_DONE, "done stays high");
    check(current_gen == gen_t'(GEN), "current_gen = MAX_GEN");
    check(par_bank == 1'(GEN % 2), "bank roles swapped every generation");
    check(n_init == POP * N, "fill count");
    check(n_shuffle == POP * N, "shuffle count");
    check(n_el == GEN * ELITE, "elite count");
    check(n_tour == 2 * GEN * (POP - ELITE), "tournament count");
    check(n_xo == GEN * POP, "crossover starts");
    check(n_ct == (GEN + 1) * POP, "cost writes");
    check(n_rebase == GEN, "rebases");
    check(flips == GEN, "generation turns");
    check(n_cross > 0 && n_copy_rate > 0, "both crossover-rate outcomes");
    check(n_mut > 0 && n_mut < GEN * (POP - ELITE), "mutations at rate 0.5");
    $display("fill=%0d shuffle=%0d elite=%0d tour=%0d cross=%0d copy=%0d mut=%0d", n_init, n_shuffle, n_el, n_tour, n_cross, n_copy_rate, n_mut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
