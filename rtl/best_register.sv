// Global best register and comparator.
//
// Holds the lowest route cost seen since `clr` (best_dist), which individual
// of the population holds it (best_idx) and in which generation it was found
// (best_gen). When `upd` is high and `cost` is strictly below best_dist, all
// three are loaded in that clock edge and `improved` (the update signal)
// pulses in the next cycle. `rebase` loads only best_idx: the controller
// uses it when the best route has moved to a new slot of the next
// population without changing its cost.
//
// best_dist starts at all ones after reset or clr, so the first evaluated
// route always becomes the best. The strict less-than comparison follows the original
// architecture; best_idx, best_gen and rebase are this implementation's
// additions so the best route can be found and timed.
module best_register
  import ga_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        upd,
  input  cost_t       cost,
  input  logic [15:0] idx,
  input  gen_t        gen,
  input  logic        rebase,
  input  logic [15:0] rebase_idx,
  output cost_t       best_dist,
  output logic [15:0] best_idx,
  output gen_t        best_gen,
  output logic        improved
);

  logic better;
  assign better = upd && (cost < best_dist);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      best_dist <= '1;
      best_idx  <= '0;
      best_gen  <= '0;
      improved  <= 1'b0;
    end else begin
      improved <= better;
      if (better) begin
        best_dist <= cost;
        best_idx  <= idx;
        best_gen  <= gen;
      end else if (rebase) begin
        best_idx  <= rebase_idx;
      end
    end
  end

endmodule
