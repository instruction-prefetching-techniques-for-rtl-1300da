// Multi-ported shared instruction cache with software, next-line and stream
// prefetching, for a cluster of ultra-low-power cores.
//
// Several single-issue cores share one small set-associative instruction
// cache (default 1 KB, two ways, 16-byte lines, four cores). Every core talks
// to its own private controller, which decides hit or miss on the shared
// multi-port tag array and answers a hit from the shared multi-port data
// array one cycle after the request. Misses from all controllers go through
// a round-robin miss interconnect to a single master controller that merges
// duplicates, refills lines from the off-cluster L2 memory over an 8-byte
// bus and notifies the waiting controllers.
//
// Prefetching is added at little cost: a fifth, tag-only private controller
// issues prefetch refills at the lowest priority, fed by one state machine
// that serves software prefetch commands (written to the control registers),
// next-line bursts started by every demand refill seen on the L2 request
// channel, and stream bursts that keep going after a programmable pause.
// Lines are replaced by pseudo-LRU (one bit per set, untouched by prefetches)
// or pseudo-randomly.
//
// Ports: NB_CORES fetch ports (req/gnt/addr, rvalid/rdata of one 16-byte
// line), the control register port (req/we/addr/wdata, gnt, rvalid/rdata one
// cycle later) and the L2 read port (request valid/ready with a line
// address, in-order response of two 64-bit beats per line), plus per-cycle
// hit/miss flags of every core and prefetcher events for counters. Software
// can also bracket a region with start/stop commands and read back per-core
// accesses, hits and access time, L2 traffic, cycles and cache usage from
// the statistics counters. The organisation
// follows the document; everything it leaves open (handshakes, table size,
// register map beyond two registers, arbitration) is this design's choice and
// is stated in the module that makes it.
module pulp_icache_pf
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES    = 4,
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned ASSOC       = 2,
  parameter repl_e       REPL        = REPL_PLRU,
  parameter int unsigned NB_MSHR     = 8,
  localparam int unsigned NSETS      = CACHE_BYTES / (LINE_BYTES * ASSOC),
  localparam int unsigned SET_W      = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned WAY_W      = (ASSOC > 1) ? $clog2(ASSOC) : 1,
  localparam int unsigned TAG_W      = LINE_ADDR_W - $clog2(NSETS)
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  // core fetch ports
  input  logic                 fetch_req_i    [NB_CORES],
  input  logic [ADDR_W-1:0]    fetch_addr_i   [NB_CORES],
  output logic                 fetch_gnt_o    [NB_CORES],
  output logic                 fetch_rvalid_o [NB_CORES],
  output logic [LINE_W-1:0]    fetch_rdata_o  [NB_CORES],
  // control registers
  input  logic                 reg_req_i,
  input  logic                 reg_we_i,
  input  logic [7:0]           reg_addr_i,
  input  logic [31:0]          reg_wdata_i,
  output logic                 reg_gnt_o,
  output logic                 reg_rvalid_o,
  output logic [31:0]          reg_rdata_o,
  // L2 refill port
  output logic                 l2_req_valid_o,
  output logic [ADDR_W-1:0]    l2_req_addr_o,
  input  logic                 l2_req_ready_i,
  input  logic                 l2_rsp_valid_i,
  input  logic [L2_DATA_W-1:0] l2_rsp_data_i,
  // per-cycle events for performance counting
  output logic                 hit_o          [NB_CORES],
  output logic                 miss_o         [NB_CORES],
  output cache_evt_t           evt_o
);

  localparam int unsigned NTAG = NB_CORES + 1;  // cores + prefetcher
  localparam int unsigned PF   = NB_CORES;      // index of the prefetch port
  localparam int unsigned NACC = NB_CORES + 1;  // cores + demand refill
  localparam int unsigned NV_W = $clog2(NSETS * ASSOC + 1);

  // ---- shared arrays and replacement state ----
  logic [SET_W-1:0]  tag_set   [NTAG];
  logic [TAG_W-1:0]  tag_rd    [NTAG][ASSOC];
  logic [ASSOC-1:0]  tag_valid [NTAG];
  logic [SET_W-1:0]  data_set  [NB_CORES];
  logic [LINE_W-1:0] data_rd   [NB_CORES][ASSOC];
  logic              lru_way   [NTAG];
  logic              acc_valid [NACC];
  logic [SET_W-1:0]  acc_set   [NACC];
  logic              acc_way   [NACC];
  logic [15:0]       rnd;
  logic [NV_W-1:0]   nvalid;

  logic              wr_en;
  logic [SET_W-1:0]  wr_set;
  logic [WAY_W-1:0]  wr_way;
  logic [TAG_W-1:0]  wr_tag;
  logic [LINE_W-1:0] wr_line;

  logic                   refill_valid;
  logic [LINE_ADDR_W-1:0] refill_line;
  logic [LINE_W-1:0]      refill_data;

  icache_tag_array #(.NSETS(NSETS), .ASSOC(ASSOC), .TAG_W(TAG_W), .NRD(NTAG)) u_tag (
    .clk_i, .rst_ni,
    .rd_set_i (tag_set), .rd_tag_o (tag_rd), .rd_valid_o (tag_valid),
    .wr_en_i (wr_en), .wr_set_i (wr_set), .wr_way_i (wr_way), .wr_tag_i (wr_tag),
    .nvalid_o (nvalid)
  );

  icache_data_array #(.NSETS(NSETS), .ASSOC(ASSOC), .LINE_W(LINE_W), .NRD(NB_CORES)) u_data (
    .clk_i,
    .rd_set_i (data_set), .rd_line_o (data_rd),
    .wr_en_i (wr_en), .wr_set_i (wr_set), .wr_way_i (wr_way), .wr_line_i (wr_line)
  );

  icache_plru #(.NSETS(NSETS), .NACC(NACC), .NQ(NTAG)) u_plru (
    .clk_i, .rst_ni,
    .acc_valid_i (acc_valid), .acc_set_i (acc_set), .acc_way_i (acc_way),
    .q_set_i (tag_set), .q_lru_way_o (lru_way)
  );

  icache_lfsr u_lfsr (.clk_i, .rst_ni, .rnd_o (rnd));

  // ---- core private controllers ----
  logic      core_miss_valid [NB_CORES];
  miss_req_t core_miss       [NB_CORES];
  logic      core_miss_ready [NB_CORES];

  for (genvar c = 0; c < NB_CORES; c++) begin : g_core
    icache_pri_ctrl #(.NSETS(NSETS), .ASSOC(ASSOC), .REPL(REPL)) u_pri (
      .clk_i, .rst_ni,
      .fetch_req_i    (fetch_req_i[c]),
      .fetch_addr_i   (fetch_addr_i[c]),
      .fetch_gnt_o    (fetch_gnt_o[c]),
      .fetch_rvalid_o (fetch_rvalid_o[c]),
      .fetch_rdata_o  (fetch_rdata_o[c]),
      .rd_set_o       (tag_set[c]),
      .tag_i          (tag_rd[c]),
      .valid_i        (tag_valid[c]),
      .line_i         (data_rd[c]),
      .lru_way_i      (lru_way[c]),
      .rnd_i          (rnd),
      .acc_valid_o    (acc_valid[c]),
      .acc_set_o      (acc_set[c]),
      .acc_way_o      (acc_way[c]),
      .miss_valid_o   (core_miss_valid[c]),
      .miss_o         (core_miss[c]),
      .miss_ready_i   (core_miss_ready[c]),
      .refill_valid_i (refill_valid),
      .refill_line_i  (refill_line),
      .refill_data_i  (refill_data),
      .hit_o          (hit_o[c]),
      .miss_evt_o     (miss_o[c])
    );
    assign data_set[c] = tag_set[c];
  end

  // ---- software-visible prefetch control ----
  logic              sw_pf_req;
  logic [ADDR_W-1:0] sw_pf_addr;
  logic [31:0]       sw_pf_size;
  hwpf_mode_e        hw_mode;
  logic [31:0]       hw_size;
  logic [15:0]       hw_wait;

  logic              st_start, st_stop;
  logic [4:0]        st_sel;
  logic [31:0]       st_val;

  icache_ctrl_regs u_regs (
    .clk_i, .rst_ni,
    .reg_req_i, .reg_we_i, .reg_addr_i, .reg_wdata_i,
    .reg_gnt_o, .reg_rvalid_o, .reg_rdata_o,
    .sw_pf_req_o  (sw_pf_req),
    .sw_pf_addr_o (sw_pf_addr),
    .sw_pf_size_o (sw_pf_size),
    .hw_mode_o    (hw_mode),
    .hw_size_o    (hw_size),
    .hw_wait_o    (hw_wait),
    .stats_start_o (st_start),
    .stats_stop_o  (st_stop),
    .stat_sel_o    (st_sel),
    .stat_val_i    (st_val)
  );

  // ---- prefetch state machine and its private controller ----
  logic              l2_req_pf;
  logic              demand_miss;
  logic              pf_req, pf_gnt;
  logic [ADDR_W-1:0] pf_addr;
  pf_state_e         pf_state;
  logic              pf_start_sw, pf_start_miss, pf_start_stream, pf_preempt;
  logic              pf_miss_valid, pf_miss_ready;
  miss_req_t         pf_miss;
  logic              pf_drop, pf_issue;

  // A demand refill leaving for L2 is the miss that starts a next-line burst.
  assign demand_miss = l2_req_valid_o && l2_req_ready_i && !l2_req_pf;

  icache_pf_fsm u_pf_fsm (
    .clk_i, .rst_ni,
    .sw_req_i       (sw_pf_req),
    .sw_addr_i      (sw_pf_addr),
    .sw_size_i      (sw_pf_size),
    .hw_mode_i      (hw_mode),
    .hw_size_i      (hw_size),
    .hw_wait_i      (hw_wait),
    .miss_valid_i   (demand_miss),
    .miss_addr_i    (l2_req_addr_o),
    .pf_req_o       (pf_req),
    .pf_addr_o      (pf_addr),
    .pf_gnt_i       (pf_gnt),
    .state_o        (pf_state),
    .start_sw_o     (pf_start_sw),
    .start_miss_o   (pf_start_miss),
    .start_stream_o (pf_start_stream),
    .preempt_o      (pf_preempt)
  );

  icache_pf_pri_ctrl #(.NSETS(NSETS), .ASSOC(ASSOC), .REPL(REPL)) u_pf_pri (
    .pf_req_i       (pf_req),
    .pf_addr_i      (pf_addr),
    .pf_gnt_o       (pf_gnt),
    .rd_set_o       (tag_set[PF]),
    .tag_i          (tag_rd[PF]),
    .valid_i        (tag_valid[PF]),
    .lru_way_i      (lru_way[PF]),
    .rnd_i          (rnd),
    .refill_valid_i (refill_valid),
    .refill_line_i  (refill_line),
    .miss_valid_o   (pf_miss_valid),
    .miss_o         (pf_miss),
    .miss_ready_i   (pf_miss_ready),
    .drop_o         (pf_drop),
    .issue_o        (pf_issue)
  );

  // ---- miss interconnect and master controller ----
  logic      m_valid, m_ready;
  miss_req_t m_req;
  logic      m_merge, m_alloc;
  logic      wb_acc;

  icache_miss_arb #(.NB_CORES(NB_CORES)) u_arb (
    .clk_i, .rst_ni,
    .core_valid_i (core_miss_valid),
    .core_req_i   (core_miss),
    .core_ready_o (core_miss_ready),
    .pf_valid_i   (pf_miss_valid),
    .pf_req_i     (pf_miss),
    .pf_ready_o   (pf_miss_ready),
    .out_valid_o  (m_valid),
    .out_req_o    (m_req),
    .out_ready_i  (m_ready)
  );

  icache_master_ctrl #(.NSETS(NSETS), .ASSOC(ASSOC), .NB_MSHR(NB_MSHR)) u_master (
    .clk_i, .rst_ni,
    .req_valid_i    (m_valid),
    .req_i          (m_req),
    .req_ready_o    (m_ready),
    .l2_req_valid_o,
    .l2_req_addr_o,
    .l2_req_pf_o    (l2_req_pf),
    .l2_req_ready_i,
    .l2_rsp_valid_i,
    .l2_rsp_data_i,
    .wr_en_o        (wr_en),
    .wr_set_o       (wr_set),
    .wr_way_o       (wr_way),
    .wr_tag_o       (wr_tag),
    .wr_line_o      (wr_line),
    .acc_valid_o    (wb_acc),
    .refill_valid_o (refill_valid),
    .refill_line_o  (refill_line),
    .refill_data_o  (refill_data),
    .merge_o        (m_merge),
    .alloc_o        (m_alloc)
  );

  // The demand refill write is the fifth input of the pseudo-LRU update.
  // ---- statistics counters ----
  icache_stats #(.NB_CORES(NB_CORES), .CNT_W(NV_W)) u_stats (
    .clk_i, .rst_ni,
    .start_i        (st_start),
    .stop_i         (st_stop),
    .fetch_req_i,
    .fetch_gnt_i    (fetch_gnt_o),
    .fetch_rvalid_i (fetch_rvalid_o),
    .hit_i          (hit_o),
    .miss_i         (miss_o),
    .l2_fire_i      (l2_req_valid_o && l2_req_ready_i),
    .l2_pf_i        (l2_req_pf),
    .nvalid_i       (nvalid),
    .sel_i          (st_sel),
    .val_o          (st_val)
  );

  assign acc_valid[NB_CORES] = wb_acc;
  assign acc_set[NB_CORES]   = wr_set;
  assign acc_way[NB_CORES]   = wr_way[0];

  always_comb begin
    evt_o               = '0;
    evt_o.pf_state      = pf_state;
    evt_o.pf_sw_start   = pf_start_sw;
    evt_o.pf_miss_start = pf_start_miss;
    evt_o.pf_stream     = pf_start_stream;
    evt_o.pf_preempt    = pf_preempt;
    evt_o.pf_drop       = pf_drop;
    evt_o.pf_issue      = pf_issue;
    evt_o.merge         = m_merge;
    evt_o.alloc         = m_alloc;
    evt_o.demand_miss   = demand_miss;
  end

endmodule
