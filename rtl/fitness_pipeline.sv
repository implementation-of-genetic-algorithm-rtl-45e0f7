// Four-stage route-cost (fitness) pipeline.
//
// Computes the length of the closed tour stored at `base` .. `base`+N-1 of
// the population RAM, one edge per clock:
//   stage 1 (fetch)      a counter i generates the RAM addresses of city i
//                        (port A) and city (i+1) mod N (port B);
//   stage 2 (read)       the RAM returns the two city indices and the
//                        distance-ROM address a*N + b is formed;
//   stage 3 (lookup)     the distance ROM returns d(a, b);
//   stage 4 (accumulate) the distance is added to the running total.
// The last edge closes the tour (city N-1 back to city 0).
//
// Timing: `start` is a one-cycle pulse; edges are fetched in the N cycles
// after it, and `done` pulses N+3 cycles after `start` with `cost` valid
// (and held until the next start). A new start may follow `done` directly.
// The stages and one edge per cycle follow the original architecture; the closing edge and
// the handshake are this implementation's choices.
module fitness_pipeline
  import ga_pkg::*;
#(
  parameter int unsigned N = N_CITIES_DEF
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  addr_t base,
  output logic  busy,
  output logic  done,
  output cost_t cost,
  // population RAM read ports
  output addr_t ram_addr_a,
  output addr_t ram_addr_b,
  input  city_t ram_dout_a,
  input  city_t ram_dout_b
);

  localparam int unsigned IW = $clog2(N + 1);

  // stage 1: fetch
  logic          run1;
  logic [IW-1:0] idx;
  addr_t         base_q;
  // valid bits of stages 2 and 3
  logic          v2, v3;
  logic          last1, last2, last3;
  logic [ROMA_W-1:0] rom_addr;
  dist_t         d3;
  cost_t         acc;

  wire last_edge = (32'(idx) == N - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      run1 <= 1'b0;
      idx  <= '0;
      v2   <= 1'b0;
      v3   <= 1'b0;
      last2 <= 1'b0;
      last3 <= 1'b0;
      done <= 1'b0;
      acc  <= '0;
      cost <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run1   <= 1'b1;
        idx    <= '0;
        base_q <= base;
        acc    <= '0;
      end else if (run1) begin
        idx <= idx + 1'b1;
        if (last_edge) run1 <= 1'b0;
      end
      v2    <= run1;
      last2 <= last1;
      v3    <= v2;
      last3 <= last2;
      // stage 4: accumulate
      if (v3) begin
        acc <= acc + cost_t'(d3);
        if (last3) begin
          cost <= acc + cost_t'(d3);
          done <= 1'b1;
        end
      end
    end
  end

  assign last1 = run1 && last_edge;

  // stage 1 addresses
  always_comb begin
    ram_addr_a = base_q + addr_t'(idx);
    ram_addr_b = last_edge ? base_q : base_q + addr_t'(idx) + 1'b1;
  end

  // stage 2: city indices -> ROM address
  assign rom_addr = ROMA_W'(32'(ram_dout_a) * N + 32'(ram_dout_b));

  // stage 3: distance lookup
  dist_rom #(.N(N)) u_rom (
    .clk      (clk),
    .addr     (rom_addr),
    .distance (d3)
  );

  assign busy = run1 || v2 || v3;

endmodule
