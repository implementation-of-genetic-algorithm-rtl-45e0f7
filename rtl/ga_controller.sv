// Main control unit of the genetic-algorithm accelerator.
//
// One finite state machine sequences the whole run; the operators it starts
// (swap mutation, order crossover, tournament and elite selection, fitness
// pipeline) report back with a done pulse. Flow:
//   IDLE        waits for `start`;
//   INIT        writes the identity route 0..N-1 into every individual of
//               population RAM 0, one gene per clock;
//   SHUFFLE     for each individual, N random swaps (a counter), giving a
//               random initial route, then EVALUATION and CHECK_BEST;
//   ELITE       (slots 0 .. ELITE-1 of each new generation) picks the next
//               best parent, which is copied unchanged by CROSSOVER;
//   SELECT      (other slots) two tournaments choose parent 1 and parent 2;
//   CROSSOVER   order crossover of the parents into the offspring slot, or a
//               plain copy of parent 1 when the crossover-rate draw fails;
//   MUTATION    with the mutation-rate probability, one swap of two random,
//               distinct genes of the offspring;
//   EVALUATION  route cost of the slot through the 4-stage pipeline;
//   CHECK_BEST  writes the cost to the cost table and offers it to the
//               global best register; counts pop_count up;
//   NEXT_GEN    once pop_count reaches the population size: swaps the roles
//               of the two population RAMs and cost banks and counts the
//               generation; after MAX_GEN generations the FSM stays in DONE.
// Parents are read from RAM `par_bank`, offspring written to the other one
// (`work_bank`); during initialisation both are RAM 0.
//
// Random draws take 16-bit halves of the free-running LFSR word: positions
// are (r * N) >> 16, probabilities compare r with a 16-bit threshold.
// The state names IDLE to NEXT_GEN, the identity fill, the swap-based
// shuffle and mutation, the comparator step and the generation counter
// follow the original architecture; the ELITE/SELECT/CROSSOVER steps, the ping-pong of the
// two RAMs and the one-swap mutation are this implementation's way of
// running the operators the original architecture names.
module ga_controller
  import ga_pkg::*;
#(
  parameter int unsigned N         = N_CITIES_DEF,
  parameter int unsigned POP       = POP_SIZE_DEF,
  parameter int unsigned MAX_GEN   = MAX_GEN_DEF,
  parameter int unsigned ELITE     = (POP / 10 > 0) ? POP / 10 : 1,
  parameter int unsigned CX_RATE   = CX_RATE_DEF,
  parameter int unsigned MUT_RATE  = MUT_RATE_DEF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  rnd_t        rnd,
  output ga_state_t   state,
  output logic        par_bank,
  output logic        work_bank,
  // identity fill (INIT)
  output logic        init_we,
  output addr_t       init_addr,
  output city_t       init_data,
  // swap unit (SHUFFLE, MUTATION)
  output logic        sw_en,
  output addr_t       sw_addr_a,
  output addr_t       sw_addr_b,
  input  logic        sw_done,
  // crossover unit
  output logic        xo_start,
  output logic        xo_copy,
  output addr_t       xo_p1_base,
  output addr_t       xo_p2_base,
  output addr_t       xo_o_base,
  output city_t       xo_cut1,
  output city_t       xo_cut2,
  input  logic        xo_done,
  // selection units
  output logic        tour_start,
  input  logic        tour_done,
  input  logic [15:0] tour_winner,
  output logic        el_clear,
  output logic        el_start,
  input  logic        el_done,
  input  logic [15:0] el_elite,
  // fitness pipeline
  output logic        fit_start,
  output addr_t       fit_base,
  input  logic        fit_done,
  input  cost_t       fit_cost,
  // cost table write
  output logic        ct_we,
  output logic [15:0] ct_idx,
  output cost_t       ct_cost,
  // global best register
  output logic        bu_upd,
  output logic        bu_rebase,
  output gen_t        bu_gen,
  // status
  output logic [15:0] pop_count,
  output gen_t        current_gen,
  output logic        done
);

  ga_state_t nxt;
  logic      launched;       // operator of the current state started
  logic      init_phase;     // building the initial population
  logic      sel_second;     // second tournament in progress
  logic      mut_go;         // mutation swap issued
  logic [ADDR_W-1:0] fill_cnt;
  city_t     swap_cnt;
  logic [15:0] p1_idx, p2_idx;
  cost_t     cost_q;

  // random positions from the two halves of the random word
  city_t ra, rb, rb_d;
  assign ra   = city_t'(scale_rand(rnd[15:0], N));
  assign rb   = city_t'(scale_rand(rnd[31:16], N));
  assign rb_d = (rb != ra) ? rb : ((32'(ra) == N - 1) ? city_t'(0) : ra + 1'b1);

  addr_t slot_base;
  assign slot_base = addr_t'(32'(pop_count) * N);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      launched    <= 1'b0;
      init_phase  <= 1'b1;
      sel_second  <= 1'b0;
      mut_go      <= 1'b0;
      fill_cnt    <= '0;
      swap_cnt    <= '0;
      pop_count   <= '0;
      current_gen <= '0;
      par_bank    <= 1'b0;
      p1_idx      <= '0;
      p2_idx      <= '0;
      cost_q      <= '0;
      xo_copy     <= 1'b0;
      xo_cut1     <= '0;
      xo_cut2     <= '0;
    end else begin
      launched <= (nxt == state);   // cleared on every state change
      case (state)
        S_IDLE: begin
          init_phase <= 1'b1;
          fill_cnt   <= '0;
          pop_count  <= '0;
          current_gen <= '0;
          par_bank   <= 1'b0;
        end
        S_INIT: fill_cnt <= fill_cnt + 1'b1;
        S_SHUFFLE: if (sw_done) swap_cnt <= swap_cnt + 1'b1;
        S_ELITE: if (el_done) p1_idx <= el_elite;
        S_SELECT: if (tour_done) begin
          if (!sel_second) begin
            p1_idx     <= tour_winner;
            sel_second <= 1'b1;
          end else begin
            p2_idx     <= tour_winner;
            sel_second <= 1'b0;
          end
        end
        S_MUTATION: if (!launched) mut_go <= (32'(rnd[15:0]) < MUT_RATE);
        S_EVALUATION: if (fit_done) cost_q <= fit_cost;
        S_CHECK_BEST: begin
          swap_cnt  <= '0;
          pop_count <= pop_count + 1'b1;
        end
        S_NEXT_GEN: begin
          current_gen <= current_gen + 1'b1;
          par_bank    <= ~par_bank;
          pop_count   <= '0;
        end
        default: ;
      endcase
      // crossover set-up, taken when CROSSOVER is entered
      if (nxt == S_CROSSOVER && state != S_CROSSOVER) begin
        xo_copy <= (state == S_ELITE) || (32'(rnd[15:0]) >= CX_RATE);
        xo_cut1 <= (ra < rb) ? ra : rb;
        xo_cut2 <= (ra < rb) ? rb : ra;
      end
      // leaving the initial population
      if (state == S_CHECK_BEST && init_phase && 32'(pop_count) == POP - 1) begin
        init_phase <= 1'b0;
        pop_count  <= '0;
      end
      state <= nxt;
    end
  end

  // next state
  always_comb begin
    nxt = state;
    case (state)
      S_IDLE:       if (start) nxt = S_INIT;
      S_INIT:       if (32'(fill_cnt) == POP * N - 1) nxt = S_SHUFFLE;
      S_SHUFFLE:    if (sw_done && 32'(swap_cnt) == N - 1) nxt = S_EVALUATION;
      S_ELITE:      if (el_done) nxt = S_CROSSOVER;
      S_SELECT:     if (tour_done && sel_second) nxt = S_CROSSOVER;
      S_CROSSOVER:  if (xo_done) nxt = (32'(pop_count) < ELITE) ? S_EVALUATION : S_MUTATION;
      S_MUTATION:   if (launched && (!mut_go || sw_done)) nxt = S_EVALUATION;
      S_EVALUATION: if (fit_done) nxt = S_CHECK_BEST;
      S_CHECK_BEST: begin
        if (32'(pop_count) == POP - 1) begin
          if (init_phase) nxt = (MAX_GEN == 0) ? S_DONE : S_ELITE;
          else            nxt = S_NEXT_GEN;
        end else if (init_phase) begin
          nxt = S_SHUFFLE;
        end else begin
          nxt = (32'(pop_count) + 1 < ELITE) ? S_ELITE : S_SELECT;
        end
      end
      S_NEXT_GEN:   nxt = (32'(current_gen) + 1 == MAX_GEN) ? S_DONE : S_ELITE;
      S_DONE:       nxt = S_DONE;
      default:      nxt = S_IDLE;
    endcase
  end

  // operator start pulses: first cycle of a state, or after a done
  always_comb begin
    init_we    = (state == S_INIT);
    init_addr  = fill_cnt;
    init_data  = city_t'(32'(fill_cnt) % N);

    sw_en      = 1'b0;
    sw_addr_a  = slot_base + addr_t'(ra);
    sw_addr_b  = slot_base + addr_t'(rb_d);
    // a swap occupies the RAM for two cycles: issue, then write (sw_done)
    if (state == S_SHUFFLE)
      sw_en = !sw_done;
    if (state == S_MUTATION && launched && mut_go)
      sw_en = !sw_done;

    xo_start   = (state == S_CROSSOVER) && !launched;
    xo_p1_base = addr_t'(32'(p1_idx) * N);
    xo_p2_base = addr_t'(32'(p2_idx) * N);
    xo_o_base  = slot_base;

    tour_start = (state == S_SELECT) && (!launched || (tour_done && !sel_second));
    el_start   = (state == S_ELITE) && !launched;
    el_clear   = (state == S_NEXT_GEN) ||
                 (state == S_CHECK_BEST && init_phase && 32'(pop_count) == POP - 1);

    fit_start  = (state == S_EVALUATION) && !launched;
    fit_base   = slot_base;

    ct_we      = (state == S_CHECK_BEST);
    ct_idx     = pop_count;
    ct_cost    = cost_q;
    bu_upd     = (state == S_CHECK_BEST);
    bu_rebase  = (state == S_CHECK_BEST) && !init_phase && (pop_count == 16'd0);
    bu_gen     = init_phase ? gen_t'(0) : current_gen + 1'b1;

    work_bank  = init_phase ? 1'b0 : ~par_bank;
    done       = (state == S_DONE);
  end

endmodule
