// Prefetch request state machine (software, next-line and stream prefetch).
//
// One state machine turns three kinds of prefetch into 16-byte sub-requests
// for the prefetch private controller:
//  * software prefetch: a write of the prefetch address register starts a
//    burst of the programmed size at that address;
//  * next-line prefetch: a demand refill seen on the L2 request channel starts
//    a burst of the programmed hardware size at the missing line + 16;
//  * stream prefetch: when a burst ends, the machine waits a programmed number
//    of cycles and then starts a new burst of the hardware size at the last
//    prefetched line + 16, and keeps doing so until preempted.
// States: IDLE, REQ (hold a sub-request until the controller grants it),
// CHECK (size -= 16, address += 16, continue while bytes remain) and WAIT
// (stream mode only). A new software request or a new miss preempts the
// current burst: the sub-request already in REQ is always completed, the new
// burst starts from CHECK, IDLE or WAIT. Software requests win over a miss
// in the same cycle. A size of zero disables the corresponding prefetch.
//
// Timing: one sub-request every two cycles at best (REQ then CHECK); with
// wait setting W the stream pause lasts max(W,1) cycles. States, transitions,
// 16-byte steps, start at miss + 16 and preemption follow the document; the
// latching of an event during REQ, the priority between sources and the
// treatment of zero sizes are this design's choice.
module icache_pf_fsm
  import icache_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_ni,
  // software prefetch command
  input  logic              sw_req_i,
  input  logic [ADDR_W-1:0] sw_addr_i,
  input  logic [31:0]       sw_size_i,
  // hardware prefetch configuration
  input  hwpf_mode_e        hw_mode_i,
  input  logic [31:0]       hw_size_i,
  input  logic [15:0]       hw_wait_i,
  // demand miss observed on the L2 request channel
  input  logic              miss_valid_i,
  input  logic [ADDR_W-1:0] miss_addr_i,
  // sub-request to the prefetch private controller
  output logic              pf_req_o,
  output logic [ADDR_W-1:0] pf_addr_o,
  input  logic              pf_gnt_i,
  // status and events
  output pf_state_e         state_o,
  output logic              start_sw_o,
  output logic              start_miss_o,
  output logic              start_stream_o,
  output logic              preempt_o
);

  pf_state_e         state_q, state_d;
  logic [ADDR_W-1:0] addr_q, addr_d;
  logic [31:0]       size_q, size_d;
  logic [15:0]       wait_q, wait_d;
  logic              pend_q, pend_d;
  logic              pend_sw_q, pend_sw_d;
  logic [ADDR_W-1:0] pend_addr_q, pend_addr_d;
  logic [31:0]       pend_size_q, pend_size_d;

  // newest event of this cycle
  logic              ev_sw, ev_miss, ev;
  logic [ADDR_W-1:0] ev_addr;
  logic [31:0]       ev_size;
  logic              hw_on;

  assign hw_on   = (hw_mode_i != HWPF_OFF) && (hw_size_i != '0);
  assign ev_sw   = sw_req_i && (sw_size_i != '0);
  assign ev_miss = miss_valid_i && hw_on;
  assign ev      = ev_sw || ev_miss;
  assign ev_addr = ev_sw ? sw_addr_i : miss_addr_i + ADDR_W'(LINE_BYTES);
  assign ev_size = ev_sw ? sw_size_i : hw_size_i;

  always_comb begin
    state_d        = state_q;
    addr_d         = addr_q;
    size_d         = size_q;
    wait_d         = wait_q;
    pend_d         = pend_q;
    pend_sw_d      = pend_sw_q;
    pend_addr_d    = pend_addr_q;
    pend_size_d    = pend_size_q;
    start_sw_o     = 1'b0;
    start_miss_o   = 1'b0;
    start_stream_o = 1'b0;
    preempt_o      = 1'b0;
    unique case (state_q)
      PF_IDLE: begin
        if (ev) begin
          addr_d       = ev_addr;
          size_d       = ev_size;
          state_d      = PF_REQ;
          start_sw_o   = ev_sw;
          start_miss_o = !ev_sw;
        end
      end
      PF_REQ: begin
        if (ev) begin
          pend_d      = 1'b1;
          pend_sw_d   = ev_sw;
          pend_addr_d = ev_addr;
          pend_size_d = ev_size;
        end
        if (pf_gnt_i) state_d = PF_CHECK;
      end
      PF_CHECK: begin
        if (ev || pend_q) begin
          addr_d       = ev ? ev_addr : pend_addr_q;
          size_d       = ev ? ev_size : pend_size_q;
          start_sw_o   = ev ? ev_sw : pend_sw_q;
          start_miss_o = ev ? !ev_sw : !pend_sw_q;
          preempt_o    = (size_q > 32'(LINE_BYTES)) || (hw_mode_i == HWPF_STREAM);
          pend_d       = 1'b0;
          state_d      = PF_REQ;
        end else if (size_q > 32'(LINE_BYTES)) begin
          size_d  = size_q - 32'(LINE_BYTES);
          addr_d  = addr_q + ADDR_W'(LINE_BYTES);
          state_d = PF_REQ;
        end else if (hw_mode_i == HWPF_STREAM && hw_on) begin
          wait_d  = hw_wait_i;
          state_d = PF_WAIT;
        end else begin
          state_d = PF_IDLE;
        end
      end
      PF_WAIT: begin
        if (ev) begin
          addr_d       = ev_addr;
          size_d       = ev_size;
          start_sw_o   = ev_sw;
          start_miss_o = !ev_sw;
          preempt_o    = 1'b1;
          state_d      = PF_REQ;
        end else if (hw_mode_i != HWPF_STREAM || !hw_on) begin
          state_d = PF_IDLE;
        end else if (wait_q <= 16'd1) begin
          addr_d         = addr_q + ADDR_W'(LINE_BYTES);
          size_d         = hw_size_i;
          start_stream_o = 1'b1;
          state_d        = PF_REQ;
        end else begin
          wait_d = wait_q - 16'd1;
        end
      end
      default: state_d = PF_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= PF_IDLE;
      addr_q      <= '0;
      size_q      <= '0;
      wait_q      <= '0;
      pend_q      <= 1'b0;
      pend_sw_q   <= 1'b0;
      pend_addr_q <= '0;
      pend_size_q <= '0;
    end else begin
      state_q     <= state_d;
      addr_q      <= addr_d;
      size_q      <= size_d;
      wait_q      <= wait_d;
      pend_q      <= pend_d;
      pend_sw_q   <= pend_sw_d;
      pend_addr_q <= pend_addr_d;
      pend_size_q <= pend_size_d;
    end
  end

  assign pf_req_o  = (state_q == PF_REQ);
  assign pf_addr_o = addr_q;
  assign state_o   = state_q;

  // The sub-request address does not change while it waits for its grant.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
    (pf_req_o && !pf_gnt_i) |=> (pf_req_o && $stable(pf_addr_o)));

endmodule
