// Self-checking test of ox_crossover at the full city count (70).
//
// Parent routes live in a model RAM with registered reads (parent 1 and
// parent 2 in different slots); offspring writes go to a model RAM. For
// 200 random parent pairs and cut points, plus copy-mode and edge cuts, the
// child is compared with an order crossover computed here: the segment
// cut1..cut2 from parent 1, then the missing cities in parent-2 order
// starting after cut2, placed from cut2+1 on, wrapping. The number of
// offspring writes (exactly N: every duplicate city had its write
// suppressed by the comparator) and the start-to-done latency (segment + N + 3 cycles, or
// N + 3 in copy mode) are checked as well.
module ox_crossover_tb;
  import ga_pkg::*;

  localparam int unsigned N = N_CITIES_DEF;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, copy_mode = 1'b0;
  addr_t p1_base = '0, p2_base = '0, o_base = '0;
  city_t cut1 = '0, cut2 = '0;
  logic busy, done;
  addr_t pa_addr, pb_addr, o_addr;
  city_t pa_dout, pb_dout, o_din;
  logic o_we;
  int checks = 0, failures = 0;

  city_t par [4 * N];
  city_t off [2 * N];
  always_ff @(posedge clk) begin
    pa_dout <= par[pa_addr];
    pb_dout <= par[pb_addr];
  end
  int writes = 0;
  always @(posedge clk) if (o_we) begin
    off[o_addr] = o_din;
    writes++;
  end

  ox_crossover #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int edge_cnt = 0, start_edge = 0, done_edge = 0;
  always @(posedge clk) begin
    edge_cnt <= edge_cnt + 1;
    if (start) start_edge <= edge_cnt;
    if (done)  done_edge  <= edge_cnt;
  end

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

  task automatic random_route(input int slot);
    int unsigned perm [N];
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j; int unsigned t;
      j = $urandom_range(i);
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < N; i++) par[slot * N + i] = city_t'(perm[i]);
  endtask

  task automatic run_one(input int s1, input int s2, input int os, input int c1,
                         input int c2, input bit cp);
    city_t exp_child [N];
    bit in_seg [N];
    int pos, seg, lat;
    if (cp) begin c1 = 0; c2 = N - 1; end
    foreach (in_seg[k]) in_seg[k] = 1'b0;
    for (int i = c1; i <= c2; i++) begin
      exp_child[i] = par[s1 * N + i];
      in_seg[par[s1 * N + i]] = 1'b1;
    end
    pos = (c2 + 1) % N;
    for (int k = 0; k < N; k++) begin
      city_t g;
      g = par[s2 * N + (c2 + 1 + k) % N];
      if (!in_seg[g]) begin
        exp_child[pos] = g;
        pos = (pos + 1) % N;
      end
    end
    seg = c2 - c1 + 1;
    writes = 0;
    @(negedge clk);
    start = 1'b1; copy_mode = cp;
    p1_base = addr_t'(s1 * N); p2_base = addr_t'(s2 * N); o_base = addr_t'(os * N);
    cut1 = city_t'(c1); cut2 = city_t'(c2);
    if (cp) begin cut1 = city_t'($urandom_range(N - 1)); cut2 = cut1; end  // ignored in copy mode
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    lat = done_edge - start_edge;
    check(lat == (cp ? N + 3 : seg + N + 3),
          $sformatf("latency %0d (cut %0d..%0d copy %0d)", lat, c1, c2, cp));
    check(writes == N, $sformatf("%0d offspring writes, expected %0d", writes, N));
    for (int i = 0; i < N; i++)
      check(off[os * N + i] == exp_child[i],
            $sformatf("child[%0d] = %0d expected %0d (cut %0d..%0d)", i, off[os * N + i], exp_child[i], c1, c2));
  endtask

  initial begin
    for (int s = 0; s < 4; s++) random_route(s);
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run_one(0, 1, 0, 10, 30, 1'b0);
    run_one(2, 3, 1, 0, 0, 1'b0);
    run_one(1, 0, 0, 0, N - 1, 1'b0);
    run_one(3, 2, 1, N - 1, N - 1, 1'b0);
    run_one(0, 3, 1, 5, 5, 1'b1);
    for (int t = 0; t < 200; t++) begin
      int a, b, s1, s2;
      a = $urandom_range(N - 1); b = $urandom_range(N - 1);
      s1 = $urandom_range(3);
      do s2 = $urandom_range(3); while (s2 == s1);
      if (t % 20 == 0) random_route(s1);
      run_one(s1, s2, t % 2, (a < b) ? a : b, (a < b) ? b : a, (t % 25) == 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
