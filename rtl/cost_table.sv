// Route-cost table of the parent and the offspring population.
//
// Two banks of POP 32-bit entries. Bank `rd_bank` is read asynchronously
// (distributed RAM) by tournament and elite selection while the fitness
// results of the new population are written, one per clock with `we`, into
// bank `wr_bank`. The controller swaps the roles of the banks every
// generation, like the two population RAMs. Contents are not reset: every
// entry is written before it is read.
module cost_table
  import ga_pkg::*;
#(
  parameter int unsigned POP = POP_SIZE_DEF
) (
  input  logic        clk,
  input  logic        we,
  input  logic        wr_bank,
  input  logic [15:0] wr_idx,
  input  cost_t       wr_cost,
  input  logic        rd_bank,
  input  logic [15:0] rd_idx,
  output cost_t       rd_cost
);

  cost_t mem [2*POP];

  always_ff @(posedge clk) begin
    if (we) mem[32'(wr_bank) * POP + 32'(wr_idx)] <= wr_cost;
  end

  assign rd_cost = mem[32'(rd_bank) * POP + 32'(rd_idx)];

endmodule
