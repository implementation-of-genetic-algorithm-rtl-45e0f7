// True dual-port block RAM holding the population (one gene per word).
//
// Two independent ports, A and B, each with address, write data, write
// enable and a registered read output, all on one clock. A read returns
// the stored word one cycle after the address is presented (read-first:
// a write and a read of the same address in one cycle return the old word).
// Both ports may write in the same cycle; if they write the same address,
// port B wins. The two ports let the swap mutation read two genes in one
// cycle and write them back crossed in the next, and let the fitness
// pipeline fetch two consecutive cities of a route per cycle.
//
// Depth is the population size times the number of cities (200 x 70 =
// 14000 words of 8 bits by default, addressed by 14 bits). The contents are
// not reset; the controller writes every word before it is read.
module dp_bram
  import ga_pkg::*;
#(
  parameter int unsigned DEPTH  = POP_SIZE_DEF * N_CITIES_DEF,
  parameter int unsigned WIDTH  = CITY_W,
  parameter int unsigned AW     = ADDR_W
) (
  input  logic             clk,
  // port A
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] din_a,
  input  logic             we_a,
  output logic [WIDTH-1:0] dout_a,
  // port B
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] din_b,
  input  logic             we_b,
  output logic [WIDTH-1:0] dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
  end

endmodule
