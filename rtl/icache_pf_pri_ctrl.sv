// Private controller of the prefetcher.
//
// It sits between the prefetch state machine and the miss interconnect and
// is a lighter version of a core controller: it has a read port on the tag
// array only, never on the data array. For each 16-byte prefetch sub-request
// it looks the line up; a line already in the cache, or being written back
// by a refill in this cycle, is dropped and granted at once, so the L2 bus
// sees no useless traffic. A missing line gets a victim way from the
// replacement policy and is forwarded as a low-priority, prefetch-flagged
// miss request; the sub-request is granted when the interconnect accepts it.
// Prefetch lookups never touch the pseudo-LRU state.
//
// Purely combinational: the request is held by the state machine until
// granted. Dropping hits, choosing the victim and not updating the LRU bit
// follow the document; the handshake and the check against a concurrent
// refill are this design's choice.
module icache_pf_pri_ctrl
  import icache_pkg::*;
#(
  parameter int unsigned NSETS = 32,
  parameter int unsigned ASSOC = 2,
  parameter repl_e       REPL  = REPL_PLRU,
  localparam int unsigned SET_W = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned WAY_W = (ASSOC > 1) ? $clog2(ASSOC) : 1,
  localparam int unsigned TAG_W = LINE_ADDR_W - $clog2(NSETS)
) (
  // from the prefetch state machine
  input  logic                   pf_req_i,
  input  logic [ADDR_W-1:0]      pf_addr_i,
  output logic                   pf_gnt_o,
  // tag array read port
  output logic [SET_W-1:0]       rd_set_o,
  input  logic [TAG_W-1:0]       tag_i [ASSOC],
  input  logic [ASSOC-1:0]       valid_i,
  // replacement state (read only)
  input  logic                   lru_way_i,
  input  logic [15:0]            rnd_i,
  // refill notification
  input  logic                   refill_valid_i,
  input  logic [LINE_ADDR_W-1:0] refill_line_i,
  // low-priority miss request
  output logic                   miss_valid_o,
  output miss_req_t              miss_o,
  input  logic                   miss_ready_i,
  // events
  output logic                   drop_o,
  output logic                   issue_o
);

  logic [LINE_ADDR_W-1:0] req_line;
  logic [TAG_W-1:0]       req_tag;
  logic                   present;
  logic [WAY_W-1:0]       victim;

  assign req_line = pf_addr_i[ADDR_W-1:OFFSET_W];
  assign req_tag  = req_line[LINE_ADDR_W-1 -: TAG_W];
  assign rd_set_o = SET_W'(req_line);

  always_comb begin
    present = refill_valid_i && (refill_line_i == req_line);
    for (int w = 0; w < ASSOC; w++)
      if (valid_i[w] && tag_i[w] == req_tag) present = 1'b1;
  end

  icache_victim_sel #(.ASSOC(ASSOC), .REPL(REPL)) u_victim (
    .valid_i   (valid_i),
    .lru_way_i (lru_way_i),
    .rnd_i     (rnd_i),
    .victim_o  (victim)
  );

  always_comb begin
    miss_o      = '0;
    miss_o.line = req_line;
    miss_o.way  = MAX_WAY_W'(victim);
    miss_o.pf   = 1'b1;
  end

  assign miss_valid_o = pf_req_i && !present;
  assign pf_gnt_o     = pf_req_i && (present || miss_ready_i);
  assign drop_o       = pf_req_i && present;
  assign issue_o      = miss_valid_o && miss_ready_i;

endmodule
