// Private cache controller of one core.
//
// Each core has its own controller in front of the shared tag and data
// arrays. A fetch request is accepted (gnt) whenever the controller is idle.
// In the same cycle the controller reads the tags and lines of the addressed
// set; on a hit it registers the line and raises rvalid one cycle later (the
// one-cycle hit of the document) and reports the access to the pseudo-LRU
// state. On a miss it picks a victim way, sends a miss request to the master
// controller through the miss interconnect and waits for the master's refill
// notification for that line, whose data it forwards to the core. A line
// whose refill is being written back in the very cycle of the lookup is
// taken from the notification at once, and a notification that arrives while
// the miss request still waits for its grant also completes the fetch.
//
// Interface: core side fetch_req/gnt/addr and rvalid/rdata (one 16-byte
// line); array side one tag read port and one data read port; miss request
// valid/ready carrying a miss_req_t; refill notification broadcast from the
// master. The hit/miss behaviour and the 1-cycle hit follow the document; the
// handshake signals and the bypass of a concurrent refill are this design's.
module icache_pri_ctrl
  import icache_pkg::*;
#(
  parameter int unsigned NSETS = 32,
  parameter int unsigned ASSOC = 2,
  parameter repl_e       REPL  = REPL_PLRU,
  localparam int unsigned SET_W = (NSETS > 1) ? $clog2(NSETS) : 1,
  localparam int unsigned WAY_W = (ASSOC > 1) ? $clog2(ASSOC) : 1,
  localparam int unsigned TAG_W = LINE_ADDR_W - $clog2(NSETS)
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  // core fetch port
  input  logic                   fetch_req_i,
  input  logic [ADDR_W-1:0]      fetch_addr_i,
  output logic                   fetch_gnt_o,
  output logic                   fetch_rvalid_o,
  output logic [LINE_W-1:0]      fetch_rdata_o,
  // tag and data array read ports
  output logic [SET_W-1:0]       rd_set_o,
  input  logic [TAG_W-1:0]       tag_i   [ASSOC],
  input  logic [ASSOC-1:0]       valid_i,
  input  logic [LINE_W-1:0]      line_i  [ASSOC],
  // replacement state
  input  logic                   lru_way_i,
  input  logic [15:0]            rnd_i,
  output logic                   acc_valid_o,
  output logic [SET_W-1:0]       acc_set_o,
  output logic                   acc_way_o,
  // miss request
  output logic                   miss_valid_o,
  output miss_req_t              miss_o,
  input  logic                   miss_ready_i,
  // refill notification
  input  logic                   refill_valid_i,
  input  logic [LINE_ADDR_W-1:0] refill_line_i,
  input  logic [LINE_W-1:0]      refill_data_i,
  // events
  output logic                   hit_o,
  output logic                   miss_evt_o
);

  typedef enum logic [1:0] {S_IDLE, S_MISS_REQ, S_MISS_WAIT} state_e;

  state_e                 state_q, state_d;
  logic [LINE_ADDR_W-1:0] pend_line_q, pend_line_d;
  logic [WAY_W-1:0]       pend_way_q, pend_way_d;
  logic                   rvalid_q, rvalid_d;
  logic [LINE_W-1:0]      rdata_q, rdata_d;

  logic [LINE_ADDR_W-1:0] req_line;
  logic [TAG_W-1:0]       req_tag;
  logic                   hit;
  logic [WAY_W-1:0]       hit_way;
  logic [WAY_W-1:0]       victim;

  assign req_line = fetch_addr_i[ADDR_W-1:OFFSET_W];
  assign req_tag  = req_line[LINE_ADDR_W-1 -: TAG_W];
  assign rd_set_o = SET_W'(req_line);

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < ASSOC; w++) begin
      if (valid_i[w] && tag_i[w] == req_tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  icache_victim_sel #(.ASSOC(ASSOC), .REPL(REPL)) u_victim (
    .valid_i   (valid_i),
    .lru_way_i (lru_way_i),
    .rnd_i     (rnd_i),
    .victim_o  (victim)
  );

  always_comb begin
    state_d     = state_q;
    pend_line_d = pend_line_q;
    pend_way_d  = pend_way_q;
    rvalid_d    = 1'b0;
    rdata_d     = rdata_q;
    fetch_gnt_o = 1'b0;
    acc_valid_o = 1'b0;
    hit_o       = 1'b0;
    miss_evt_o  = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        fetch_gnt_o = 1'b1;
        if (fetch_req_i) begin
          if (hit) begin
            hit_o       = 1'b1;
            acc_valid_o = 1'b1;
            rvalid_d    = 1'b1;
            rdata_d     = line_i[hit_way];
          end else begin
            miss_evt_o  = 1'b1;
            if (refill_valid_i && refill_line_i == req_line) begin
              rvalid_d = 1'b1;
              rdata_d  = refill_data_i;
            end else begin
              pend_line_d = req_line;
              pend_way_d  = victim;
              state_d     = S_MISS_REQ;
            end
          end
        end
      end
      S_MISS_REQ: begin
        if (refill_valid_i && refill_line_i == pend_line_q) begin
          rvalid_d = 1'b1;
          rdata_d  = refill_data_i;
          state_d  = S_IDLE;
        end else if (miss_ready_i) begin
          state_d = S_MISS_WAIT;
        end
      end
      S_MISS_WAIT: begin
        if (refill_valid_i && refill_line_i == pend_line_q) begin
          rvalid_d = 1'b1;
          rdata_d  = refill_data_i;
          state_d  = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign acc_set_o = SET_W'(req_line);
  assign acc_way_o = hit_way[0];

  assign miss_valid_o = (state_q == S_MISS_REQ);
  always_comb begin
    miss_o      = '0;
    miss_o.line = pend_line_q;
    miss_o.way  = MAX_WAY_W'(pend_way_q);
    miss_o.pf   = 1'b0;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      pend_line_q <= '0;
      pend_way_q  <= '0;
      rvalid_q    <= 1'b0;
      rdata_q     <= '0;
    end else begin
      state_q     <= state_d;
      pend_line_q <= pend_line_d;
      pend_way_q  <= pend_way_d;
      rvalid_q    <= rvalid_d;
      rdata_q     <= rdata_d;
    end
  end

  assign fetch_rvalid_o = rvalid_q;
  assign fetch_rdata_o  = rdata_q;

  // A miss request, once raised, is held with stable contents until granted.
  property p_miss_stable;
    @(posedge clk_i) disable iff (!rst_ni)
      (miss_valid_o && !miss_ready_i && !(refill_valid_i && refill_line_i == pend_line_q))
        |=> miss_valid_o && $stable(miss_o);
  endproperty
  assert property (p_miss_stable);

endmodule
