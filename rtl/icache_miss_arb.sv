// Miss interconnect of the shared instruction cache.
//
// Collects the miss requests of the core private controllers and of the
// prefetch private controller and forwards one per cycle to the master
// controller. Core requests have high priority and are served round-robin:
// after a core is granted, the search for the next grant starts at the core
// after it, which is the behaviour of the binary tree of round-robin nodes
// drawn for the cache. The prefetch request enters a last, fixed-priority
// node and is granted only when no core requests a refill.
//
// Interface: valid/ready with a miss_req_t payload on every input and on the
// output; grant and output are combinational in the request, the round-robin
// pointer moves on an accepted core request. The tree, the high-priority
// core side and the low-priority prefetch side follow the document; the
// round-robin policy is this design's choice.
module icache_miss_arb
  import icache_pkg::*;
#(
  parameter int unsigned NB_CORES = 4
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  // core private controllers (high priority)
  input  logic      core_valid_i [NB_CORES],
  input  miss_req_t core_req_i   [NB_CORES],
  output logic      core_ready_o [NB_CORES],
  // prefetch private controller (low priority)
  input  logic      pf_valid_i,
  input  miss_req_t pf_req_i,
  output logic      pf_ready_o,
  // to the master controller
  output logic      out_valid_o,
  output miss_req_t out_req_o,
  input  logic      out_ready_i
);

  localparam int unsigned IDX_W = (NB_CORES > 1) ? $clog2(NB_CORES) : 1;

  logic [IDX_W-1:0] ptr_q;
  logic             core_any;
  logic [IDX_W-1:0] sel;

  always_comb begin
    core_any = 1'b0;
    sel      = '0;
    for (int k = NB_CORES - 1; k >= 0; k--) begin
      logic [IDX_W-1:0] idx;
      idx = IDX_W'((int'(ptr_q) + k) % NB_CORES);
      if (core_valid_i[idx]) begin
        core_any = 1'b1;
        sel      = IDX_W'(idx);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NB_CORES; i++)
      core_ready_o[i] = out_ready_i && core_any && (sel == IDX_W'(i));
    pf_ready_o  = out_ready_i && !core_any;
    out_valid_o = core_any || pf_valid_i;
    out_req_o   = core_any ? core_req_i[sel] : pf_req_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                       ptr_q <= '0;
    else if (core_any && out_ready_i)  ptr_q <= IDX_W'((int'(sel) + 1) % NB_CORES);
  end

endmodule
