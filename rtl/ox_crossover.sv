// Order crossover (OX1) of two parent routes into one offspring route.
//
// Works on routes of N cities stored one gene per word: the parents in the
// parent population RAM (parent 1 read through port A, parent 2 through
// port B) and the child in the offspring RAM. Two phases:
//   segment copy   counter P1 walks positions cut1..cut2 of parent 1 and
//                  copies those genes to the same positions of the child;
//   fill/validate  counter P2 walks all N positions of parent 2, starting
//                  after cut2 and wrapping, and a comparator checks whether
//                  the city is already in the child. A city that is missing
//                  is written to the next free child position (starting
//                  after cut2, wrapping); a city already present suppresses
//                  the write enable.
// The comparator is a presence bit per city, set whenever a city is
// written, so the check costs no memory access. A 2-to-1 multiplexer picks
// the parent 1 or parent 2 gene and a register (P2_REG) holds it for the
// write cycle.
//
// With copy_mode the cut points become 0 and N-1 and the fill phase is
// skipped: the child is a copy of parent 1 (used for elites and for pairs
// that are not recombined).
//
// Timing: `start` is a pulse; a read is issued every cycle, the gene is
// checked one cycle later and written the cycle after that. `done` pulses
// (cut2-cut1+1) + N + 3 cycles after start, or N + 3 in copy mode, in the
// cycle of the last offspring write; the child is readable after it. The two
// phases, the counters, the comparator-gated write enable and P2_REG
// follow the original architecture; the presence-bit form of the comparator, the wrap
// order (classic OX1) and the handshake are this implementation's choices.
// Requires cut1 <= cut2 < N.
module ox_crossover
  import ga_pkg::*;
#(
  parameter int unsigned N = N_CITIES_DEF
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  logic  copy_mode,
  input  addr_t p1_base,
  input  addr_t p2_base,
  input  addr_t o_base,
  input  city_t cut1,
  input  city_t cut2,
  output logic  busy,
  output logic  done,
  // parent RAM read ports
  output addr_t pa_addr,
  input  city_t pa_dout,
  output addr_t pb_addr,
  input  city_t pb_dout,
  // offspring RAM write port
  output addr_t o_addr,
  output city_t o_din,
  output logic  o_we
);

  typedef enum logic [1:0] {X_IDLE, X_SEG, X_FILL, X_DRAIN} xstate_t;
  xstate_t state;

  addr_t p1_q, p2_q, o_q;
  city_t c2_q;
  logic  copy_q;
  city_t cnt_p1, cnt_p2, slot, fill_start;
  logic [N-1:0] present;

  // read stage (data returning from the RAM)
  logic  r_valid, r_fill;
  city_t r_pos;
  // P2_REG write stage
  logic  w_valid;
  addr_t w_addr;
  city_t w_data;

  // position in parent 2 scanned by counter P2
  city_t p2_pos;
  always_comb begin
    int unsigned s;
    s = 32'(fill_start) + 32'(cnt_p2);
    if (s >= N) s = s - N;
    p2_pos = city_t'(s);
  end

  // 2-to-1 multiplexer and comparator
  city_t mux_gene;
  logic  in_child;
  assign mux_gene = r_fill ? pb_dout : pa_dout;
  assign in_child = r_fill && present[mux_gene];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= X_IDLE;
      r_valid <= 1'b0;
      w_valid <= 1'b0;
      done    <= 1'b0;
      present <= '0;
    end else begin
      done    <= 1'b0;
      r_valid <= 1'b0;
      case (state)
        X_IDLE: if (start) begin
          p1_q    <= p1_base;
          p2_q    <= p2_base;
          o_q     <= o_base;
          copy_q  <= copy_mode;
          c2_q    <= copy_mode ? city_t'(N - 1) : cut2;
          cnt_p1  <= copy_mode ? city_t'(0) : cut1;
          cnt_p2  <= '0;
          fill_start <= (copy_mode || 32'(cut2) == N - 1) ? city_t'(0) : cut2 + 1'b1;
          slot    <= (copy_mode || 32'(cut2) == N - 1) ? city_t'(0) : cut2 + 1'b1;
          present <= '0;
          state   <= X_SEG;
        end
        X_SEG: begin
          r_valid <= 1'b1;
          r_fill  <= 1'b0;
          r_pos   <= cnt_p1;
          if (cnt_p1 == c2_q) state <= copy_q ? X_DRAIN : X_FILL;
          else                cnt_p1 <= cnt_p1 + 1'b1;
        end
        X_FILL: begin
          r_valid <= 1'b1;
          r_fill  <= 1'b1;
          if (32'(cnt_p2) == N - 1) state <= X_DRAIN;
          else                      cnt_p2 <= cnt_p2 + 1'b1;
        end
        X_DRAIN: if (!r_valid) begin   // last write (if any) is in this cycle
          done  <= 1'b1;
          state <= X_IDLE;
        end
        default: state <= X_IDLE;
      endcase

      // check stage: decide the write and load P2_REG
      w_valid <= r_valid && !in_child;
      if (r_valid && !in_child) begin
        w_data <= mux_gene;
        present[mux_gene] <= 1'b1;
        if (r_fill) begin
          w_addr <= o_q + addr_t'(slot);
          slot   <= (32'(slot) == N - 1) ? city_t'(0) : slot + 1'b1;
        end else begin
          w_addr <= o_q + addr_t'(r_pos);
        end
      end
    end
  end

  assign pa_addr = p1_q + addr_t'(cnt_p1);
  assign pb_addr = p2_q + addr_t'(p2_pos);
  assign o_addr  = w_addr;
  assign o_din   = w_data;
  assign o_we    = w_valid;
  assign busy    = (state != X_IDLE);

endmodule
