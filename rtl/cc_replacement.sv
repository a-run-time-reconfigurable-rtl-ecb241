// cc_replacement -- replacement logic of the cache controller.
//
// Chooses the way to evict from a full set and computes the new per-set
// replacement word after an access. Five strategies are offered, from the
// least to the most informed, as in the paper's hierarchy:
//   RANDOM   a free-running 16-bit LFSR, no per-set state;
//   PRANDOM  one global counter register, advanced on every line fill;
//   FIFO     per set, the number of the way written last; the victim is
//            that number plus one, modulo the associativity;
//   PLRU     per set, a binary tree of ways-1 bits (7 bits for 8 ways);
//   LRU      per set, a pairwise order matrix of ways*(ways-1)/2 bits,
//            28 bits for 8 ways, the figure the paper quotes.
// PLRU and LRU support at most eight ways, as in the paper; at a larger
// associativity they work on ways 0..7 only (the register interface does not
// allow that combination). The tree encoding of PLRU is this design's
// choice: the paper quotes 10 bits per set for it without giving the layout.
//
// Interface: `state_in` is the set's word read from the replacement BRAM;
// `victim` depends combinationally on it and on the two registers. For an
// access to way `acc_way` (`acc_fill` high when the line was just written),
// `state_out` is the word to write back. `fill_pulse` advances the global
// counter. Matrix bit M(i,j), i<j, is 1 when way i was used more recently
// than way j; an all-zero word is a valid state for every strategy.
module cc_replacement
  import rca_pkg::*;
#(
  parameter logic [15:0] LFSR_SEED = 16'hACE1
) (
  input  logic              clk,
  input  logic              rst,
  input  repl_e             strategy,
  input  logic [ALOG_W-1:0] assoc_log2,
  input  repl_word_t        state_in,
  output way_t              victim,
  input  way_t              acc_way,
  input  logic              acc_fill,
  output repl_word_t        state_out,
  input  logic              fill_pulse
);

  logic [15:0] lfsr;
  way_t        gcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr <= LFSR_SEED;
      gcnt <= '0;
    end else begin
      // Galois LFSR, taps 16,14,13,11
      lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
      if (fill_pulse) gcnt <= gcnt + 1'b1;
    end
  end

  // index of matrix bit M(i,j), i < j < 8
  function automatic int unsigned midx(int unsigned i, int unsigned j);
    return (i * (15 - i)) / 2 + (j - i - 1);
  endfunction

  way_t way_mask;
  int unsigned tree_levels, tree_ways;
  always_comb begin
    way_mask    = way_t'((1 << assoc_log2) - 1);
    tree_levels = (assoc_log2 > 3) ? 3 : int'(assoc_log2);
    tree_ways   = 1 << tree_levels;
  end

  // LRU: way v is the oldest when every other active way is more recent
  logic [7:0] lru_oldest;
  always_comb begin
    for (int unsigned v = 0; v < 8; v++) begin
      lru_oldest[v] = (v < tree_ways);
      for (int unsigned o = 0; o < 8; o++) begin
        if (o < tree_ways && o < v && !state_in[midx(o, v)]) lru_oldest[v] = 1'b0;
        if (o < tree_ways && o > v &&  state_in[midx(v, o)]) lru_oldest[v] = 1'b0;
      end
    end
  end

  // victim selection
  always_comb begin
    int unsigned node;
    logic        found;
    victim = '0;
    node   = 0;
    found  = 1'b0;
    unique case (strategy)
      REPL_RANDOM:  victim = way_t'(lfsr[WAY_W-1:0]) & way_mask;
      REPL_PRANDOM: victim = gcnt & way_mask;
      REPL_FIFO:    victim = (state_in[WAY_W-1:0] + 1'b1) & way_mask;
      REPL_PLRU: begin
        for (int unsigned l = 0; l < 3; l++) begin
          if (l < tree_levels) begin
            victim = {victim[WAY_W-2:0], state_in[node]};
            node   = 2 * node + 1 + int'(state_in[node]);
          end
        end
      end
      REPL_LRU: begin
        for (int unsigned v = 0; v < 8; v++) begin
          if (lru_oldest[v] && !found) begin
            victim = way_t'(v);
            found  = 1'b1;
          end
        end
      end
      default: victim = '0;
    endcase
  end

  // state update for an access to acc_way
  always_comb begin
    int unsigned node;
    logic        b;
    state_out = state_in;
    node      = 0;
    unique case (strategy)
      REPL_FIFO: if (acc_fill) state_out = {{(REPL_W-WAY_W){1'b0}}, acc_way & way_mask};
      REPL_PLRU: begin
        for (int unsigned l = 0; l < 3; l++) begin
          if (l < tree_levels) begin
            b               = acc_way[tree_levels - 1 - l];
            state_out[node] = ~b;
            node            = 2 * node + 1 + int'(b);
          end
        end
      end
      REPL_LRU: begin
        if (acc_way < 8) begin
          for (int unsigned o = 0; o < 8; o++) begin
            if (o > acc_way) state_out[midx(32'(acc_way), o)] = 1'b1;
            if (o < acc_way) state_out[midx(o, 32'(acc_way))] = 1'b0;
          end
        end
      end
      default: state_out = state_in;
    endcase
  end

endmodule
