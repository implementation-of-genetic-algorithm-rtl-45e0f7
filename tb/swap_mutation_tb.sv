// Self-checking test of swap_mutation with the dual-port RAM it drives.
//
// The RAM is loaded from the testbench, then 500 random swaps of distinct
// addresses are made back to back and each is checked: `done` one cycle
// after `swap_en` (a swap every two cycles) and the RAM contents equal to a
// reference array with the same swaps applied.
module swap_mutation_tb;
  import ga_pkg::*;

  localparam int unsigned DEPTH = 32;

  logic clk = 1'b0, rst = 1'b1, swap_en = 1'b0;
  addr_t addr_a = '0, addr_b = '0;
  logic busy, done;
  addr_t ram_addr_a, ram_addr_b;
  logic ram_we_a, ram_we_b;
  city_t ram_din_a, ram_din_b, ram_dout_a, ram_dout_b;
  int checks = 0, failures = 0;

  // testbench access to the RAM while loading and checking
  logic tb_own = 1'b1;
  addr_t tb_addr = '0;
  city_t tb_din = '0;
  logic tb_we = 1'b0;

  swap_mutation dut (.*);

  dp_bram #(.DEPTH(DEPTH)) u_ram (
    .clk (clk),
    .addr_a (tb_own ? tb_addr : ram_addr_a), .din_a (tb_own ? tb_din : ram_din_a),
    .we_a (tb_own ? tb_we : ram_we_a), .dout_a (ram_dout_a),
    .addr_b (ram_addr_b), .din_b (ram_din_b), .we_b (!tb_own && ram_we_b), .dout_b (ram_dout_b)
  );

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

  city_t ref_mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      tb_addr = addr_t'(i); tb_din = city_t'(i * 3 + 1); tb_we = 1'b1;
      ref_mem[i] = tb_din;
    end
    @(negedge clk); tb_we = 1'b0; tb_own = 1'b0; rst = 1'b0;
    for (int s = 0; s < 500; s++) begin
      int a, b;
      city_t t;
      a = $urandom_range(DEPTH - 1);
      do b = $urandom_range(DEPTH - 1); while (b == a);
      @(negedge clk);
      swap_en = 1'b1; addr_a = addr_t'(a); addr_b = addr_t'(b);
      @(negedge clk);
      swap_en = 1'b0;
      check(done, "done one cycle after swap_en");
      t = ref_mem[a]; ref_mem[a] = ref_mem[b]; ref_mem[b] = t;
    end
    @(negedge clk);
    check(!done && !busy, "idle after the last swap");
    tb_own = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); tb_addr = addr_t'(i);
      @(posedge clk); #1;
      check(ram_dout_a == ref_mem[i], $sformatf("word %0d = %0d expected %0d", i, ram_dout_a, ref_mem[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
