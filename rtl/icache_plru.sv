// Pseudo-LRU state of the shared instruction cache (two-way sets).
//
// One bit per set names the least-recently-used way: 32 bits for the 1 KB,
// two-way, 16-byte-line configuration. Several requesters can touch the same
// set in one cycle, so instead of an exact LRU the bit is updated with a
// simple rule evaluated per set every cycle: if any access port touches way 0
// of the set, way 1 becomes the LRU way; otherwise, if any port touches way 1,
// way 0 becomes the LRU way; with no access the bit holds. Per set and way
// this is one wide OR gate over the access ports.
//
// The access ports are the four core private controllers (hits) and the
// master controller (refills caused by a demand miss): five inputs, matching
// the fan-in of five given for the prefetch-enabled cache. Accesses by the
// prefetcher never update the bit, so prefetched lines stay the preferred
// victims. The query ports return the LRU way of a set combinationally. The
// update rule, the bit count and the prefetch exemption follow the document;
// the reset value (way 0 is LRU) is this design's choice.
module icache_plru #(
  parameter int unsigned NSETS = 32,
  parameter int unsigned NACC  = 5,
  parameter int unsigned NQ    = 5,
  localparam int unsigned SET_W = (NSETS > 1) ? $clog2(NSETS) : 1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // access ports
  input  logic             acc_valid_i [NACC],
  input  logic [SET_W-1:0] acc_set_i   [NACC],
  input  logic             acc_way_i   [NACC],
  // query ports
  input  logic [SET_W-1:0] q_set_i     [NQ],
  output logic             q_lru_way_o [NQ]
);

  logic [NSETS-1:0] lru_q, lru_d;
  logic [NSETS-1:0] hit_w0, hit_w1;

  always_comb begin
    hit_w0 = '0;
    hit_w1 = '0;
    for (int p = 0; p < NACC; p++) begin
      if (acc_valid_i[p]) begin
        if (acc_way_i[p]) hit_w1[acc_set_i[p]] = 1'b1;
        else              hit_w0[acc_set_i[p]] = 1'b1;
      end
    end
    for (int s = 0; s < NSETS; s++) begin
      if (hit_w0[s])      lru_d[s] = 1'b1;
      else if (hit_w1[s]) lru_d[s] = 1'b0;
      else                lru_d[s] = lru_q[s];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) lru_q <= '0;
    else         lru_q <= lru_d;
  end

  always_comb begin
    for (int q = 0; q < NQ; q++) q_lru_way_o[q] = lru_q[q_set_i[q]];
  end

endmodule
