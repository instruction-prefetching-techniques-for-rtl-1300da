// Victim-way selection for a refill.
//
// Given the valid bits of the ways of a set, the LRU way from the pseudo-LRU
// state and a random number, it returns the way a new line will be written
// to: the lowest-numbered free way if the set has one; otherwise the LRU way
// (pseudo-LRU policy, two-way sets only) or a random way (pseudo-random
// policy). Purely combinational. Preferring a free way and choosing at random
// or by the LRU bit follow the document; picking the lowest free way and
// reducing the random number modulo the associativity are this design's
// choice.
module icache_victim_sel
  import icache_pkg::*;
#(
  parameter int unsigned ASSOC = 2,
  parameter repl_e       REPL  = REPL_PLRU,
  localparam int unsigned WAY_W = (ASSOC > 1) ? $clog2(ASSOC) : 1
) (
  input  logic [ASSOC-1:0] valid_i,
  input  logic             lru_way_i,
  input  logic [15:0]      rnd_i,
  output logic [WAY_W-1:0] victim_o
);

  if (REPL == REPL_PLRU && ASSOC != 2) begin : g_bad_cfg
    $error("pseudo-LRU replacement is built for two-way sets only");
  end

  always_comb begin
    if (REPL == REPL_PLRU) victim_o = WAY_W'(lru_way_i);
    else                   victim_o = WAY_W'(rnd_i % ASSOC);
    for (int w = ASSOC - 1; w >= 0; w--) begin
      if (!valid_i[w]) victim_o = WAY_W'(w);
    end
  end

endmodule
