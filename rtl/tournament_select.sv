// Tournament selection of one parent.
//
// Draws TOUR_SIZE individuals at random (one per cycle, index =
// (r * POP) >> 16 from 16 random bits) and returns the one with the lowest
// route cost, which is the highest fitness since fitness is the reciprocal
// of the cost. Costs are read from the cost table through an asynchronous
// read port, so each draw is compared in the cycle it is made; ties keep
// the earlier draw.
//
// Timing: `start` is a pulse; the draws take the TOUR_SIZE cycles after it
// and `done` pulses in the cycle after the last draw with `winner` valid
// (held until the next start). Tournament size 5 comes from the original architecture; the
// sequential draw and the handshake are this implementation's choices.
module tournament_select
  import ga_pkg::*;
#(
  parameter int unsigned POP       = POP_SIZE_DEF,
  parameter int unsigned TOUR_SIZE = TOUR_SIZE_DEF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [15:0] rnd,
  output logic [15:0] rd_idx,    // cost-table read address
  input  cost_t       rd_cost,   // cost-table read data
  output logic        busy,
  output logic        done,
  output logic [15:0] winner
);

  logic [7:0]  draws;
  cost_t       best_cost;
  logic        first;

  assign rd_idx = 16'(scale_rand(rnd, POP));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      draws <= '0;
      first <= 1'b0;
      winner <= '0;
      best_cost <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        draws <= '0;
        first <= 1'b1;
      end else if (busy) begin
        if (first || rd_cost < best_cost) begin
          best_cost <= rd_cost;
          winner    <= rd_idx;
        end
        first <= 1'b0;
        draws <= draws + 1'b1;
        if (32'(draws) == TOUR_SIZE - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
