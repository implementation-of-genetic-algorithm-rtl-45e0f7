// Runs the two smaller evaluation configurations side by side, each to
// completion: 29 cities with 150 individuals for 1500 generations, and
// 51 cities with 150 individuals for 2000 generations (the sizes of the
// wi29 and eil51 benchmarks; the cities are the first 29 and 51 of the
// built-in synthetic instance, since the benchmark coordinates are not part
// of this design). The 70-city, 200-individual, 4000-generation
// configuration is the default one and is run by ga_tsp_full_tb.
// Each run is checked by ga_run_checker; the cycle counts are printed.
module ga_tsp_workloads_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c29, f29, c51, f51;
  logic fin29, fin51;

  ga_run_checker #(.N (29), .POP (150), .GEN (1500), .NAME ("29 cities")) u_29 (
    .clk (clk), .checks (c29), .failures (f29), .finished (fin29)
  );

  ga_run_checker #(.N (51), .POP (150), .GEN (2000), .NAME ("51 cities")) u_51 (
    .clk (clk), .checks (c51), .failures (f51), .finished (fin51)
  );

  // watchdog
  initial begin
    repeat (100_000_000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c29 + c51, f29 + f51 + 1);
    $finish;
  end

  initial begin
    wait (fin29 && fin51);
    $display("TB_RESULT checks=%0d failures=%0d", c29 + c51, f29 + f51);
    $finish;
  end

endmodule
