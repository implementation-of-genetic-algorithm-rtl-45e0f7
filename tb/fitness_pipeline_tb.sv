// Self-checking test of fitness_pipeline at the full city count (70).
//
// A model RAM with registered reads holds 8 random routes. Each route is
// evaluated, back to back, and the cost is compared with the closed-tour
// length computed here with real-valued distances. The latency from start
// to done must be N+3 cycles (one distance per cycle plus three pipeline
// stages).
module fitness_pipeline_tb;
  import ga_pkg::*;

  localparam int unsigned N = N_CITIES_DEF;
  localparam int unsigned ROUTES = 8;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  addr_t base = '0;
  logic busy, done;
  cost_t cost;
  addr_t ram_addr_a, ram_addr_b;
  city_t ram_dout_a, ram_dout_b;
  int checks = 0, failures = 0;

  city_t mem [ROUTES * N];
  always_ff @(posedge clk) begin
    ram_dout_a <= mem[ram_addr_a];
    ram_dout_b <= mem[ram_addr_b];
  end

  fitness_pipeline #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // edge counter: clock edge that samples start, and the one that samples done
  int edge_cnt = 0, start_edge = 0, done_edge = 0;
  always @(posedge clk) begin
    edge_cnt <= edge_cnt + 1;
    if (start) start_edge <= edge_cnt;
    if (done)  done_edge  <= edge_cnt;
  end

  function automatic int unsigned ref_dist(int unsigned a, int unsigned b);
    real dx, dy;
    dx = real'(city_x(a)) - real'(city_x(b));
    dy = real'(city_y(a)) - real'(city_y(b));
    return int'($floor($sqrt(dx * dx + dy * dy) + 0.5));
  endfunction

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
    int unsigned perm [N];
    int unsigned expected [ROUTES];
    for (int r = 0; r < ROUTES; r++) begin
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j; int unsigned t;
        j = $urandom_range(i);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      expected[r] = 0;
      for (int i = 0; i < N; i++) begin
        mem[r * N + i] = city_t'(perm[i]);
        expected[r] += ref_dist(perm[i], perm[(i + 1) % N]);
      end
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int r = 0; r < ROUTES; r++) begin
      @(negedge clk);
      start = 1'b1;
      base  = addr_t'(r * N);
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      @(negedge clk);
      check(done_edge - start_edge == N + 3,
            $sformatf("route %0d latency %0d cycles, expected %0d", r, done_edge - start_edge, N + 3));
      check(cost == expected[r], $sformatf("route %0d cost %0d expected %0d", r, cost, expected[r]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
