// Master cache controller with merge-refill table.
//
// Receives the miss requests that won the miss interconnect, one per cycle.
// A small table of outstanding refills merges duplicates: a request for a
// line already in the table is absorbed (a demand request turns a pending
// prefetch entry into a demand entry); any other request takes a new entry.
// Entries are sent to L2 in allocation order as single-line read requests,
// so several refills can be outstanding at once. L2 answers in order with
// two 8-byte beats per 16-byte line, lower address first. When the last beat of a line has
// arrived, the controller writes tag and data into the arrays (setting the
// valid bit) in the next cycle and broadcasts the line and its data as a
// refill notification, through which waiting private controllers complete
// their fetches. A refill caused by a demand miss also counts as an access
// for the pseudo-LRU state; a pure prefetch refill does not.
//
// Timing: request accepted in the cycle valid and ready are high; L2 request
// in a following cycle at the earliest; write-back and notification one
// cycle after the last response beat. The merge, the L2 refill, the write
// back with tag validation and the notification follow the document; the
// table size, the in-order L2 protocol and all handshakes are this design's
// choice.
module icache_master_ctrl
  import icache_pkg::*;
#(
  parameter int unsigned NSETS   = 32,
  parameter int unsigned ASSOC   = 2,
  parameter int unsigned NB_MSHR = 8,
  localparam int unsigned SET_W  = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned WAY_W  = (ASSOC > 1) ? $clog2(ASSOC) : 1,
  localparam int unsigned TAG_W  = LINE_ADDR_W - $clog2(NSETS),
  localparam int unsigned PTR_W  = (NB_MSHR > 1) ? $clog2(NB_MSHR) : 1,
  localparam int unsigned CNT_W  = $clog2(NB_MSHR + 1)
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  // miss requests from the interconnect
  input  logic                   req_valid_i,
  input  miss_req_t              req_i,
  output logic                   req_ready_o,
  // L2 read request channel
  output logic                   l2_req_valid_o,
  output logic [ADDR_W-1:0]      l2_req_addr_o,
  output logic                   l2_req_pf_o,
  input  logic                   l2_req_ready_i,
  // L2 read response channel (in order, L2_BEATS beats per line)
  input  logic                   l2_rsp_valid_i,
  input  logic [L2_DATA_W-1:0]   l2_rsp_data_i,
  // array write port
  output logic                   wr_en_o,
  output logic [SET_W-1:0]       wr_set_o,
  output logic [WAY_W-1:0]       wr_way_o,
  output logic [TAG_W-1:0]       wr_tag_o,
  output logic [LINE_W-1:0]      wr_line_o,
  // pseudo-LRU access of a demand refill
  output logic                   acc_valid_o,
  // refill notification to the private controllers
  output logic                   refill_valid_o,
  output logic [LINE_ADDR_W-1:0] refill_line_o,
  output logic [LINE_W-1:0]      refill_data_o,
  // events
  output logic                   merge_o,
  output logic                   alloc_o
);

  localparam int unsigned BEAT_W = (L2_BEATS > 1) ? $clog2(L2_BEATS) : 1;

  logic [LINE_ADDR_W-1:0] ent_line_q  [NB_MSHR];
  logic [MAX_WAY_W-1:0]   ent_way_q   [NB_MSHR];
  logic [NB_MSHR-1:0]     ent_pf_q;
  logic [NB_MSHR-1:0]     ent_valid_q;

  logic [PTR_W-1:0] tail_q, iss_q, rsp_q;
  logic [CNT_W-1:0] n_unissued_q;
  logic [BEAT_W-1:0] beat_q;
  logic [LINE_W-1:0] beats_q;   // beats shift in from the top

  logic                   wb_valid_q;
  logic [PTR_W-1:0]       wb_idx_q;
  logic [LINE_W-1:0]      wb_data_q;

  // ---- merge lookup ----
  logic             match;
  logic [PTR_W-1:0] match_idx;
  always_comb begin
    match     = 1'b0;
    match_idx = '0;
    for (int e = 0; e < NB_MSHR; e++) begin
      if (ent_valid_q[e] && ent_line_q[e] == req_i.line) begin
        match     = 1'b1;
        match_idx = PTR_W'(e);
      end
    end
  end

  logic full;
  assign full        = ent_valid_q[tail_q];
  assign req_ready_o = match || !full;
  assign merge_o     = req_valid_i && match;
  assign alloc_o     = req_valid_i && !match && !full;

  // ---- L2 request ----
  logic l2_fire;
  assign l2_req_valid_o = (n_unissued_q != '0);
  assign l2_req_addr_o  = {ent_line_q[iss_q], {OFFSET_W{1'b0}}};
  assign l2_req_pf_o    = ent_pf_q[iss_q];
  assign l2_fire        = l2_req_valid_o && l2_req_ready_i;

  // ---- L2 response ----
  logic last_beat;
  assign last_beat = l2_rsp_valid_i && (beat_q == BEAT_W'(L2_BEATS - 1));

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (int'(p) == NB_MSHR - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ent_valid_q  <= '0;
      ent_pf_q     <= '0;
      tail_q       <= '0;
      iss_q        <= '0;
      rsp_q        <= '0;
      n_unissued_q <= '0;
      beat_q       <= '0;
      beats_q      <= '0;
      wb_valid_q   <= 1'b0;
      wb_idx_q     <= '0;
      wb_data_q    <= '0;
      for (int e = 0; e < NB_MSHR; e++) begin
        ent_line_q[e] <= '0;
        ent_way_q[e]  <= '0;
      end
    end else begin
      // write-back frees its entry
      if (wb_valid_q) ent_valid_q[wb_idx_q] <= 1'b0;
      // merge or allocate
      if (req_valid_i && match) begin
        if (!req_i.pf) ent_pf_q[match_idx] <= 1'b0;
      end else if (req_valid_i && !full) begin
        ent_valid_q[tail_q] <= 1'b1;
        ent_line_q[tail_q]  <= req_i.line;
        ent_way_q[tail_q]   <= req_i.way;
        ent_pf_q[tail_q]    <= req_i.pf;
        tail_q              <= inc(tail_q);
      end
      n_unissued_q <= n_unissued_q + CNT_W'(alloc_o) - CNT_W'(l2_fire);
      if (l2_fire) iss_q <= inc(iss_q);
      // response beats
      wb_valid_q <= 1'b0;
      if (l2_rsp_valid_i) begin
        if (last_beat) begin
          beat_q     <= '0;
          wb_valid_q <= 1'b1;
          wb_idx_q   <= rsp_q;
          wb_data_q  <= {l2_rsp_data_i, beats_q[LINE_W-1:L2_DATA_W]};
          rsp_q      <= inc(rsp_q);
        end else begin
          beat_q  <= beat_q + 1'b1;
          beats_q <= {l2_rsp_data_i, beats_q[LINE_W-1:L2_DATA_W]};
        end
      end
    end
  end

  // ---- write-back and notification ----
  assign wr_en_o        = wb_valid_q;
  assign wr_set_o       = SET_W'(ent_line_q[wb_idx_q]);
  assign wr_way_o       = WAY_W'(ent_way_q[wb_idx_q]);
  assign wr_tag_o       = ent_line_q[wb_idx_q][LINE_ADDR_W-1 -: TAG_W];
  assign wr_line_o      = wb_data_q;
  assign acc_valid_o    = wb_valid_q && !ent_pf_q[wb_idx_q];
  assign refill_valid_o = wb_valid_q;
  assign refill_line_o  = ent_line_q[wb_idx_q];
  assign refill_data_o  = wb_data_q;

  // L2 never answers more lines than were requested.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
    l2_rsp_valid_i |-> ent_valid_q[rsp_q]);

endmodule
