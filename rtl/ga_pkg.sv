// Shared constants, types and helper functions of the genetic-algorithm TSP
// accelerator.
//
// The default sizes are those of the largest configuration the design was
// evaluated with (70 cities, 200 individuals, 4000 generations, tournament of 5,
// 10 % elitism, crossover rate 0.95, mutation rate 0.01). The bus widths follow
// the block diagram: 14-bit population RAM addresses, 8-bit city indices,
// 16-bit distances and ROM addresses, 32-bit route costs and random words,
// 16-bit generation counters.
//
// Probabilities are held as 16-bit fractions: an event with rate p happens
// when the low 16 bits of a random word are below round(p * 65536).
//
// The built-in city set is synthetic: city_x/city_y give a fixed pseudo-random
// point in a 1000 x 1000 square for every city index. It stands in for a
// benchmark instance; any other instance is used by overriding the distance
// ROM contents (see dist_rom).
package ga_pkg;

  // Configuration defaults
  localparam int unsigned N_CITIES_DEF  = 70;
  localparam int unsigned POP_SIZE_DEF  = 200;
  localparam int unsigned MAX_GEN_DEF   = 4000;
  localparam int unsigned TOUR_SIZE_DEF = 5;
  localparam int unsigned CX_RATE_DEF   = 62259;  // 0.95 * 65536
  localparam int unsigned MUT_RATE_DEF  = 655;    // 0.01 * 65536

  // Bus widths
  localparam int unsigned ADDR_W = 14;   // population RAM address
  localparam int unsigned CITY_W = 8;    // one gene (city index)
  localparam int unsigned DIST_W = 16;   // one distance-matrix entry
  localparam int unsigned ROMA_W = 16;   // distance ROM address
  localparam int unsigned COST_W = 32;   // accumulated route cost
  localparam int unsigned GEN_W  = 16;   // generation counters
  localparam int unsigned RND_W  = 32;   // random word

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [CITY_W-1:0] city_t;
  typedef logic [DIST_W-1:0] dist_t;
  typedef logic [COST_W-1:0] cost_t;
  typedef logic [GEN_W-1:0]  gen_t;
  typedef logic [RND_W-1:0]  rnd_t;

  // States of the main control unit. IDLE .. NEXT_GEN carry the names of the
  // original control flow; ELITE, SELECT, CROSSOVER and DONE are the steps
  // that build each offspring and end the run.
  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_SHUFFLE, S_MUTATION, S_EVALUATION, S_CHECK_BEST,
    S_NEXT_GEN, S_ELITE, S_SELECT, S_CROSSOVER, S_DONE
  } ga_state_t;

  // Uniform index in [0, range) from 16 random bits: (r * range) >> 16.
  function automatic int unsigned scale_rand(logic [15:0] r, int unsigned range);
    logic [31:0] prod;
    prod = 32'(r) * 32'(range);
    return int'(prod[31:16]);
  endfunction

  // Synthetic benchmark city set: points in [0, 1000) x [0, 1000).
  function automatic int unsigned city_x(int unsigned i);
    return ((i * 7919 + 104729) * 31) % 1000;
  endfunction

  function automatic int unsigned city_y(int unsigned i);
    return ((i * 6007 + 15485) * 17 + (i * i * 3)) % 1000;
  endfunction

  // Integer square root rounded to nearest, bit by bit.
  function automatic int unsigned isqrt_round(int unsigned v);
    int unsigned root, bitv, rem;
    root = 0;
    rem  = v;
    bitv = 32'h4000_0000;
    while (bitv > v) bitv = bitv >> 2;
    while (bitv != 0) begin
      if (rem >= root + bitv) begin
        rem  = rem - (root + bitv);
        root = (root >> 1) + bitv;
      end else begin
        root = root >> 1;
      end
      bitv = bitv >> 2;
    end
    // root = floor(sqrt(v)); round to nearest integer
    if (rem > root) root = root + 1;
    return root;
  endfunction

  // Euclidean distance between two cities, rounded to the nearest integer.
  function automatic int unsigned euc_dist(int unsigned a, int unsigned b);
    int unsigned dx, dy;
    dx = (city_x(a) > city_x(b)) ? city_x(a) - city_x(b) : city_x(b) - city_x(a);
    dy = (city_y(a) > city_y(b)) ? city_y(a) - city_y(b) : city_y(b) - city_y(a);
    return isqrt_round(dx * dx + dy * dy);
  endfunction

endpackage
