// Elite selection: finds the best individuals of the parent population.
//
// Each `start` scans the whole cost table (one entry per cycle through an
// asynchronous read port) and returns the index of the lowest cost among
// the entries not yet taken, then marks it taken. Calling it E times after
// a `clear` yields the E best individuals in order of increasing cost
// (ties: lowest index first). The controller calls it for the top 10 % of
// the population each generation and copies those routes unchanged.
//
// Timing: `start` is a pulse; the scan takes POP cycles and `done` pulses
// in the cycle after the last entry with `elite` valid. `clear` (a pulse,
// while idle) forgets all taken marks. Preserving the top 10 % comes from the original
// architecture; the repeated minimum scan is this implementation's simplest way
// of doing it.
module elite_select
  import ga_pkg::*;
#(
  parameter int unsigned POP = POP_SIZE_DEF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        start,
  output logic [15:0] rd_idx,
  input  cost_t       rd_cost,
  output logic        busy,
  output logic        done,
  output logic [15:0] elite
);

  logic [POP-1:0] taken;
  logic [15:0]    scan;
  logic           found;
  cost_t          min_cost;
  logic [15:0]    min_idx;

  assign rd_idx = scan;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      taken <= '0;
      scan  <= '0;
      found <= 1'b0;
      elite <= '0;
      min_cost <= '0;
      min_idx  <= '0;
    end else begin
      done <= 1'b0;
      if (clear && !busy) taken <= '0;
      if (start && !busy) begin
        busy  <= 1'b1;
        scan  <= '0;
        found <= 1'b0;
      end else if (busy) begin
        if (!taken[scan] && (!found || rd_cost < min_cost)) begin
          found    <= 1'b1;
          min_cost <= rd_cost;
          min_idx  <= scan;
        end
        if (32'(scan) == POP - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          // the last entry may itself be the minimum
          if (!taken[scan] && (!found || rd_cost < min_cost)) begin
            elite        <= scan;
            taken[scan]  <= 1'b1;
          end else begin
            elite           <= min_idx;
            taken[min_idx]  <= 1'b1;
          end
        end else begin
          scan <= scan + 1'b1;
        end
      end
    end
  end

endmodule
