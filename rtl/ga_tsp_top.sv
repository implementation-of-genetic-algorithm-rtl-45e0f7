// Genetic-algorithm accelerator for the travelling salesman problem.
//
// Evolves a population of POP routes over N cities for MAX_GEN generations
// and reports the length of the shortest closed route found. Routes are
// permutations of city indices stored one 8-bit gene per word in two
// true dual-port RAMs of POP*N words: one holds the parent population, the
// other receives the offspring, and their roles swap every generation.
// Distances come from a pre-computed distance-matrix ROM inside the
// fitness pipeline, so route costs are sums of integer table entries.
//
// Blocks: ga_controller (the FSM), lfsr32 (random numbers), two dp_bram
// (population RAMs), swap_mutation (shuffle and mutation swaps),
// ox_crossover (order crossover and elite copy), tournament_select,
// elite_select, cost_table (costs of parent and offspring population),
// fitness_pipeline (4-stage route cost, with dist_rom) and best_register
// (global best register and comparator). This module only instantiates
// them and multiplexes the RAM ports between the operators by FSM state.
//
// Interface: hold `start` high (or pulse it) after reset to run; `done`
// rises when the last generation has been evaluated and stays high until
// reset. best_dist is the best route cost so far, best_gen the generation
// that found it (0 = initial population) and best_update pulses on each
// improvement. current_gen counts finished generations; pop_size_out and
// total_gen report the configuration. After `done` the final population
// can be read through rd_addr/rd_city (one-cycle read latency): the best
// route occupies addresses best_idx*N .. best_idx*N+N-1.
module ga_tsp_top
  import ga_pkg::*;
#(
  parameter int unsigned N         = N_CITIES_DEF,
  parameter int unsigned POP       = POP_SIZE_DEF,
  parameter int unsigned MAX_GEN   = MAX_GEN_DEF,
  parameter int unsigned TOUR_SIZE = TOUR_SIZE_DEF,
  parameter int unsigned CX_RATE   = CX_RATE_DEF,
  parameter int unsigned MUT_RATE  = MUT_RATE_DEF,
  parameter logic [31:0] SEED      = 32'hACE1_2468
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic        done,
  output cost_t       best_dist,
  output logic [15:0] best_idx,
  output gen_t        best_gen,
  output logic        best_update,
  output gen_t        current_gen,
  output logic [15:0] pop_size_out,
  output gen_t        total_gen,
  input  addr_t       rd_addr,
  output city_t       rd_city
);

  // ---------------------------------------------------------------- control
  ga_state_t state;
  logic      par_bank, work_bank;
  rnd_t      rnd;

  logic  init_we;  addr_t init_addr;  city_t init_data;
  logic  sw_en, sw_done, sw_busy;  addr_t sw_addr_a, sw_addr_b;
  logic  xo_start, xo_copy, xo_done, xo_busy;
  addr_t xo_p1_base, xo_p2_base, xo_o_base;
  city_t xo_cut1, xo_cut2;
  logic  tour_start, tour_done, tour_busy;  logic [15:0] tour_winner, tour_rd_idx;
  logic  el_clear, el_start, el_done, el_busy;  logic [15:0] el_elite, el_rd_idx;
  logic  fit_start, fit_done, fit_busy;  addr_t fit_base;  cost_t fit_cost;
  logic  ct_we;  logic [15:0] ct_idx;  cost_t ct_cost, ct_rd_cost;
  logic  bu_upd, bu_rebase;  gen_t bu_gen;
  logic [15:0] pop_count;

  lfsr32 #(.SEED(SEED)) u_lfsr (
    .clk (clk), .rst (rst), .en (1'b1), .rnd (rnd)
  );

  ga_controller #(
    .N (N), .POP (POP), .MAX_GEN (MAX_GEN),
    .CX_RATE (CX_RATE), .MUT_RATE (MUT_RATE)
  ) u_ctrl (
    .clk (clk), .rst (rst), .start (start), .rnd (rnd),
    .state (state), .par_bank (par_bank), .work_bank (work_bank),
    .init_we (init_we), .init_addr (init_addr), .init_data (init_data),
    .sw_en (sw_en), .sw_addr_a (sw_addr_a), .sw_addr_b (sw_addr_b), .sw_done (sw_done),
    .xo_start (xo_start), .xo_copy (xo_copy), .xo_p1_base (xo_p1_base),
    .xo_p2_base (xo_p2_base), .xo_o_base (xo_o_base), .xo_cut1 (xo_cut1),
    .xo_cut2 (xo_cut2), .xo_done (xo_done),
    .tour_start (tour_start), .tour_done (tour_done), .tour_winner (tour_winner),
    .el_clear (el_clear), .el_start (el_start), .el_done (el_done), .el_elite (el_elite),
    .fit_start (fit_start), .fit_base (fit_base), .fit_done (fit_done), .fit_cost (fit_cost),
    .ct_we (ct_we), .ct_idx (ct_idx), .ct_cost (ct_cost),
    .bu_upd (bu_upd), .bu_rebase (bu_rebase), .bu_gen (bu_gen),
    .pop_count (pop_count), .current_gen (current_gen), .done (done)
  );

  // -------------------------------------------------------------- operators
  addr_t sw_ram_addr_a, sw_ram_addr_b;  logic sw_we_a, sw_we_b;
  city_t sw_din_a, sw_din_b;
  addr_t xo_pa_addr, xo_pb_addr, xo_o_addr;  city_t xo_o_din;  logic xo_o_we;
  addr_t fit_addr_a, fit_addr_b;
  city_t work_dout_a, work_dout_b, par_dout_a, par_dout_b;

  swap_mutation u_swap (
    .clk (clk), .rst (rst), .swap_en (sw_en), .addr_a (sw_addr_a), .addr_b (sw_addr_b),
    .busy (sw_busy), .done (sw_done),
    .ram_addr_a (sw_ram_addr_a), .ram_addr_b (sw_ram_addr_b),
    .ram_we_a (sw_we_a), .ram_we_b (sw_we_b),
    .ram_din_a (sw_din_a), .ram_din_b (sw_din_b),
    .ram_dout_a (work_dout_a), .ram_dout_b (work_dout_b)
  );

  ox_crossover #(.N (N)) u_xo (
    .clk (clk), .rst (rst), .start (xo_start), .copy_mode (xo_copy),
    .p1_base (xo_p1_base), .p2_base (xo_p2_base), .o_base (xo_o_base),
    .cut1 (xo_cut1), .cut2 (xo_cut2), .busy (xo_busy), .done (xo_done),
    .pa_addr (xo_pa_addr), .pa_dout (par_dout_a),
    .pb_addr (xo_pb_addr), .pb_dout (par_dout_b),
    .o_addr (xo_o_addr), .o_din (xo_o_din), .o_we (xo_o_we)
  );

  tournament_select #(.POP (POP), .TOUR_SIZE (TOUR_SIZE)) u_tour (
    .clk (clk), .rst (rst), .start (tour_start), .rnd (rnd[15:0]),
    .rd_idx (tour_rd_idx), .rd_cost (ct_rd_cost),
    .busy (tour_busy), .done (tour_done), .winner (tour_winner)
  );

  elite_select #(.POP (POP)) u_elite (
    .clk (clk), .rst (rst), .clear (el_clear), .start (el_start),
    .rd_idx (el_rd_idx), .rd_cost (ct_rd_cost),
    .busy (el_busy), .done (el_done), .elite (el_elite)
  );

  cost_table #(.POP (POP)) u_cost (
    .clk (clk), .we (ct_we), .wr_bank (work_bank), .wr_idx (ct_idx), .wr_cost (ct_cost),
    .rd_bank (par_bank), .rd_idx ((state == S_ELITE) ? el_rd_idx : tour_rd_idx),
    .rd_cost (ct_rd_cost)
  );

  fitness_pipeline #(.N (N)) u_fit (
    .clk (clk), .rst (rst), .start (fit_start), .base (fit_base),
    .busy (fit_busy), .done (fit_done), .cost (fit_cost),
    .ram_addr_a (fit_addr_a), .ram_addr_b (fit_addr_b),
    .ram_dout_a (work_dout_a), .ram_dout_b (work_dout_b)
  );

  best_register u_best (
    .clk (clk), .rst (rst), .clr (state == S_IDLE),
    .upd (bu_upd), .cost (ct_cost), .idx (ct_idx), .gen (bu_gen),
    .rebase (bu_rebase), .rebase_idx (16'd0),
    .best_dist (best_dist), .best_idx (best_idx), .best_gen (best_gen),
    .improved (best_update)
  );

  // ------------------------------------------------------- population RAMs
  addr_t addr_a [2], addr_b [2];
  city_t din_a  [2], din_b  [2], dout_a [2], dout_b [2];
  logic  we_a   [2], we_b   [2];

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      addr_a[b] = rd_addr;  din_a[b] = '0;  we_a[b] = 1'b0;
      addr_b[b] = '0;       din_b[b] = '0;  we_b[b] = 1'b0;
      if (state == S_CROSSOVER) begin
        if (1'(b) == par_bank) begin
          addr_a[b] = xo_pa_addr;
          addr_b[b] = xo_pb_addr;
        end else begin
          addr_a[b] = xo_o_addr;  din_a[b] = xo_o_din;  we_a[b] = xo_o_we;
        end
      end else if (1'(b) == work_bank) begin
        case (state)
          S_INIT: begin
            addr_a[b] = init_addr;  din_a[b] = init_data;  we_a[b] = init_we;
          end
          S_SHUFFLE, S_MUTATION: begin
            addr_a[b] = sw_ram_addr_a;  din_a[b] = sw_din_a;  we_a[b] = sw_we_a;
            addr_b[b] = sw_ram_addr_b;  din_b[b] = sw_din_b;  we_b[b] = sw_we_b;
          end
          S_EVALUATION: begin
            addr_a[b] = fit_addr_a;
            addr_b[b] = fit_addr_b;
          end
          default: ;
        endcase
      end
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    dp_bram #(.DEPTH (POP * N)) u_ram (
      .clk (clk),
      .addr_a (addr_a[b]), .din_a (din_a[b]), .we_a (we_a[b]), .dout_a (dout_a[b]),
      .addr_b (addr_b[b]), .din_b (din_b[b]), .we_b (we_b[b]), .dout_b (dout_b[b])
    );
  end

  assign work_dout_a = dout_a[work_bank];
  assign work_dout_b = dout_b[work_bank];
  assign par_dout_a  = dout_a[par_bank];
  assign par_dout_b  = dout_b[par_bank];
  assign rd_city     = dout_a[par_bank];

  assign pop_size_out = 16'(POP);
  assign total_gen    = gen_t'(MAX_GEN);

endmodule
