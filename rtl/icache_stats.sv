// Statistics counters of the shared instruction cache.
//
// Gathers, between a start and a stop command from software, the figures
// used to judge the cache and its prefetchers:
//  * per core: fetch accesses, hits, and the summed memory access time
//    (cycles from a fetch request to its response; 1 for a hit, the refill
//    time for a miss), from which hit rate and average access time follow;
//  * the number of lines requested from L2, and how many of them the
//    prefetcher requested (miss traffic: 16 bytes per line);
//  * the number of cycles gathered (execution time);
//  * the bytes of valid lines in the cache when gathering stops (cache usage).
// The start command clears every counter and starts counting; the stop
// command freezes them and samples the cache usage. A read port returns one
// statistic per word index, combinationally.
//
// Access time is counted per core as every cycle in which the core requests
// a fetch, or has one accepted and not yet answered. That is exact for a
// single-issue core that issues its next request no earlier than the cycle
// of the previous response.
//
// Which statistics are gathered, and that software brackets the measured
// part of a program with a start and a stop command, follow the document;
// the counter widths (32 bits, wrapping), the index map and the counting
// rule for the access time are this design's choice.
module icache_stats
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES = 4,
  parameter int unsigned CNT_W    = 7   // width of the valid line count
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // commands
  input  logic             start_i,
  input  logic             stop_i,
  // per-core fetch activity
  input  logic             fetch_req_i    [NB_CORES],
  input  logic             fetch_gnt_i    [NB_CORES],
  input  logic             fetch_rvalid_i [NB_CORES],
  input  logic             hit_i          [NB_CORES],
  input  logic             miss_i         [NB_CORES],
  // L2 refill requests
  input  logic             l2_fire_i,
  input  logic             l2_pf_i,
  // valid lines now in the cache
  input  logic [CNT_W-1:0] nvalid_i,
  // read port
  input  logic [4:0]       sel_i,
  output logic [31:0]      val_o
);

  logic        active_q;
  logic [31:0] cycles_q, l2_q, l2_pf_q, used_q;
  logic [31:0] acc_q [NB_CORES];
  logic [31:0] hit_q [NB_CORES];
  logic [31:0] mat_q [NB_CORES];
  logic        out_q [NB_CORES];   // fetch accepted, response pending

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      active_q <= 1'b0;
      cycles_q <= '0;
      l2_q     <= '0;
      l2_pf_q  <= '0;
      used_q   <= '0;
      for (int c = 0; c < NB_CORES; c++) begin
        acc_q[c] <= '0;
        hit_q[c] <= '0;
        mat_q[c] <= '0;
        out_q[c] <= 1'b0;
      end
    end else begin
      for (int c = 0; c < NB_CORES; c++) begin
        if (fetch_req_i[c] && fetch_gnt_i[c]) out_q[c] <= 1'b1;
        else if (fetch_rvalid_i[c])           out_q[c] <= 1'b0;
      end
      if (start_i) begin
        active_q <= 1'b1;
        cycles_q <= '0;
        l2_q     <= '0;
        l2_pf_q  <= '0;
        used_q   <= '0;
        for (int c = 0; c < NB_CORES; c++) begin
          acc_q[c] <= '0;
          hit_q[c] <= '0;
          mat_q[c] <= '0;
        end
      end else if (stop_i) begin
        active_q <= 1'b0;
        if (active_q) used_q <= 32'(nvalid_i) * LINE_BYTES;
      end else if (active_q) begin
        cycles_q <= cycles_q + 1;
        if (l2_fire_i)            l2_q    <= l2_q + 1;
        if (l2_fire_i && l2_pf_i) l2_pf_q <= l2_pf_q + 1;
        for (int c = 0; c < NB_CORES; c++) begin
          if (hit_i[c] || miss_i[c]) acc_q[c] <= acc_q[c] + 1;
          if (hit_i[c])              hit_q[c] <= hit_q[c] + 1;
          if (fetch_req_i[c] || (out_q[c] && !fetch_rvalid_i[c]))
            mat_q[c] <= mat_q[c] + 1;
        end
      end
    end
  end

  always_comb begin
    val_o = '0;
    unique case (int'(sel_i))
      STAT_CYCLES:   val_o = cycles_q;
      STAT_L2_LINES: val_o = l2_q;
      STAT_L2_PF:    val_o = l2_pf_q;
      STAT_USED:     val_o = used_q;
      STAT_ACTIVE:   val_o = 32'(active_q);
      default: begin
        for (int c = 0; c < NB_CORES; c++) begin
          if (int'(sel_i) == STAT_CORE0 + 3 * c)     val_o = acc_q[c];
          if (int'(sel_i) == STAT_CORE0 + 3 * c + 1) val_o = hit_q[c];
          if (int'(sel_i) == STAT_CORE0 + 3 * c + 2) val_o = mat_q[c];
        end
      end
    endcase
  end

  initial begin
    assert (STAT_CORE0 + 3 * NB_CORES <= 32)
      else $error("statistics window too small for %0d cores", NB_CORES);
  end

endmodule
