// Distance-matrix ROM: the pre-computed distance between every pair of cities.
//
// Entry a*N + b holds the distance from city a to city b as a 16-bit integer,
// so no Euclidean arithmetic happens at run time. The read is synchronous:
// the entry addressed in one cycle appears on `distance` in the next (one
// pipeline stage of the fitness evaluation).
//
// The matrix is filled at elaboration from ga_pkg::euc_dist, the rounded
// Euclidean distance between the package's city coordinates. Another
// instance is used by replacing city_x/city_y (or euc_dist) in ga_pkg, the
// counterpart of generating a new constant table for each dataset. Addresses
// at or above N*N read 0.
module dist_rom
  import ga_pkg::*;
#(
  parameter int unsigned N = N_CITIES_DEF
) (
  input  logic              clk,
  input  logic [ROMA_W-1:0] addr,
  output dist_t             distance
);

  dist_t table_q [N*N];

  for (genvar a = 0; a < N; a++) begin : g_row
    for (genvar b = 0; b < N; b++) begin : g_col
      localparam int unsigned D = euc_dist(a, b);
      assign table_q[a*N + b] = dist_t'(D);
    end
  end

  always_ff @(posedge clk) begin
    if (32'(addr) < N * N) distance <= table_q[addr];
    else                   distance <= '0;
  end

endmodule
