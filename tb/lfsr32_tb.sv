// Self-checking test of lfsr32: compares 5000 steps with a software model
// of the x^32+x^22+x^2+x+1 Galois LFSR, checks the reset value, that `en`
// low holds the state, and that the state never becomes zero.
module lfsr32_tb;
  import ga_pkg::*;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  rnd_t rnd;
  int checks = 0, failures = 0;
  logic [31:0] model;

  lfsr32 #(.SEED(32'h1234_5678)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] step(logic [31:0] s);
    logic fb;
    fb = s[0];
    s = {1'b0, s[31:1]};
    if (fb) begin
      s[31] = ~s[31];   // x^32 term
      s[21] = ~s[21];   // x^22 term
      s[1]  = ~s[1];    // x^2 term
      s[0]  = ~s[0];    // x^1 term
    end
    return s;
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
    repeat (2) @(posedge clk);
    #1 check(rnd == 32'h1234_5678, "reset loads the seed");
    rst = 1'b0;
    model = 32'h1234_5678;
    repeat (3) @(posedge clk);
    #1 check(rnd == model, "state holds while en is low");
    en = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      model = step(model);
      #1 check(rnd == model, $sformatf("step %0d: %08h expected %08h", i, rnd, model));
      check(rnd != 0, "state is never zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
