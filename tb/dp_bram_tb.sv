// Self-checking test of dp_bram: random reads and writes on both ports
// against a reference array, including simultaneous writes on both ports,
// the one-cycle read latency and read-first behaviour on a same-cycle write.
module dp_bram_tb;
  import ga_pkg::*;

  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0;
  addr_t addr_a, addr_b;
  city_t din_a, din_b, dout_a, dout_b;
  logic we_a, we_b;
  int checks = 0, failures = 0;
  city_t ref_mem [DEPTH];

  dp_bram #(.DEPTH(DEPTH)) dut (.*);

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
    city_t exp_a, exp_b;
    we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // fill through both ports at once
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      addr_a = addr_t'(i);     din_a = city_t'($urandom); we_a = 1;
      addr_b = addr_t'(i + 1); din_b = city_t'($urandom); we_b = 1;
      ref_mem[i] = din_a; ref_mem[i + 1] = din_b;
    end
    @(negedge clk); we_a = 0; we_b = 0;
    // random traffic
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      addr_a = addr_t'($urandom_range(DEPTH - 1));
      addr_b = addr_t'($urandom_range(DEPTH - 1));
      we_a = $urandom_range(1);
      we_b = $urandom_range(1) && (addr_b != addr_a);
      din_a = city_t'($urandom); din_b = city_t'($urandom);
      exp_a = ref_mem[addr_a];   // read-first
      exp_b = ref_mem[addr_b];
      @(posedge clk);
      if (we_a) ref_mem[addr_a] = din_a;
      if (we_b) ref_mem[addr_b] = din_b;
      #1;
      check(dout_a == exp_a, $sformatf("port A read %0d: %0d expected %0d", addr_a, dout_a, exp_a));
      check(dout_b == exp_b, $sformatf("port B read %0d: %0d expected %0d", addr_b, dout_b, exp_b));
    end
    // final sweep
    @(negedge clk); we_a = 0; we_b = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); addr_a = addr_t'(i); addr_b = addr_t'(DEPTH - 1 - i);
      @(posedge clk); #1;
      check(dout_a == ref_mem[i] && dout_b == ref_mem[DEPTH - 1 - i], "final sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
