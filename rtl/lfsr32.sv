// 32-bit linear feedback shift register, the random source of the accelerator.
//
// A Galois LFSR with the maximal-length polynomial x^32 + x^22 + x^2 + x + 1
// (period 2^32 - 1). Each cycle with `en` high it shifts one step right and
// XORs the feedback mask 32'h8020_0003 into the state when the bit shifted
// out is 1. `rnd` is the current state; consumers take 16-bit halves of it
// and scale them to an index range. Reset loads SEED (forced non-zero, since
// the all-zero state is a lock-up state).
//
// The width (32 bits) comes from the original architecture; the polynomial, the Galois form and
// the seed are choices of this implementation.
module lfsr32
  import ga_pkg::*;
#(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output rnd_t rnd
);

  localparam logic [31:0] MASK = 32'h8020_0003;
  localparam logic [31:0] SEED_NZ = (SEED == 32'd0) ? 32'd1 : SEED;

  always_ff @(posedge clk) begin
    if (rst) begin
      rnd <= SEED_NZ;
    end else if (en) begin
      rnd <= (rnd >> 1) ^ (rnd[0] ? MASK : 32'd0);
    end
  end

endmodule
