// Self-checking test of dist_rom at full size (70 cities): every entry is
// compared with the rounded Euclidean distance computed here in real
// arithmetic from the city coordinates; the read latency of one cycle and
// the zero result past the end of the table are checked too.
module dist_rom_tb;
  import ga_pkg::*;

  localparam int unsigned N = N_CITIES_DEF;

  logic clk = 1'b0;
  logic [ROMA_W-1:0] addr = '0;
  dist_t distance;
  int checks = 0, failures = 0;

  dist_rom #(.N(N)) dut (.*);

  always #5 clk = ~clk;

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
    for (int a = 0; a < N; a++) begin
      for (int b = 0; b < N; b++) begin
        @(negedge clk);
        addr = ROMA_W'(a * N + b);
        @(posedge clk); #1;
        check(32'(distance) == ref_dist(a, b),
              $sformatf("d(%0d,%0d) = %0d expected %0d", a, b, distance, ref_dist(a, b)));
      end
    end
    @(negedge clk); addr = ROMA_W'(N * N);
    @(posedge clk); #1 check(distance == '0, "out-of-range address reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
