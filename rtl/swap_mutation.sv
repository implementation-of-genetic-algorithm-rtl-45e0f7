// Swap mutation through the two ports of the population RAM.
//
// Exchanges the genes at two addresses of the dual-port RAM in two clock
// cycles. In the cycle `swap_en` is high the two addresses go straight to
// RAM ports A and B (read cycle). In the next cycle the write pulse is
// raised on both ports and the read data are cross-wired: what port A read
// is written through port B and what port B read is written through port A.
// The RAM's own output registers hold the two genes, so no extra storage is
// needed. `done` is high in the write cycle; the swapped genes are readable
// from the following cycle. A new `swap_en` may be given in the cycle after
// `done` (one swap per two cycles).
//
// The read-then-cross-write scheme follows the original architecture; the handshake
// (swap_en pulse, done pulse) is this implementation's. The caller makes
// the two addresses distinct; equal addresses leave the gene unchanged.
module swap_mutation
  import ga_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  swap_en,     // pulse: start a swap of addr_a and addr_b
  input  addr_t addr_a,
  input  addr_t addr_b,
  output logic  busy,
  output logic  done,        // write cycle of the swap
  // population RAM ports
  output addr_t ram_addr_a,
  output addr_t ram_addr_b,
  output logic  ram_we_a,
  output logic  ram_we_b,
  output city_t ram_din_a,
  output city_t ram_din_b,
  input  city_t ram_dout_a,
  input  city_t ram_dout_b
);

  logic  we_pulse;
  addr_t addr_a_q, addr_b_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      we_pulse <= 1'b0;
    end else begin
      we_pulse <= swap_en && !we_pulse;
    end
    if (swap_en && !we_pulse) begin
      addr_a_q <= addr_a;
      addr_b_q <= addr_b;
    end
  end

  always_comb begin
    ram_addr_a = we_pulse ? addr_a_q : addr_a;
    ram_addr_b = we_pulse ? addr_b_q : addr_b;
    ram_we_a   = we_pulse;
    ram_we_b   = we_pulse;
    ram_din_a  = ram_dout_b;   // cross-wired data paths
    ram_din_b  = ram_dout_a;
  end

  assign busy = we_pulse;
  assign done = we_pulse;

endmodule
