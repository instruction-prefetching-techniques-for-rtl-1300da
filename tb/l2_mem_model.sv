// Behavioural model of the off-cluster L2 memory as seen by the instruction
// cache refill port (testbench only, not synthesizable).
//
// Accepts one line read per cycle (optionally stalling the request channel
// pseudo-randomly), answers every request after LAT cycles, in order, with
// BEATS 64-bit beats, lower address first. The content of memory is a fixed
// function of the byte address (see word_at), so a checker can recompute any
// line. LAT = 14 gives a demand miss of about 20 cycles in the cache.
module l2_mem_model #(
  parameter int unsigned LAT       = 14,
  parameter int unsigned BEATS     = 2,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        req_valid_i,
  input  logic [31:0] req_addr_i,
  output logic        req_ready_o,
  output logic        rsp_valid_o,
  output logic [63:0] rsp_data_o,
  output int unsigned n_req_o
);

  function automatic logic [31:0] word_at(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  typedef struct { logic [31:0] addr; longint unsigned due; } pend_t;

  pend_t            q[$];
  longint unsigned  now;
  int unsigned      beat;
  logic             stall;

  always @(negedge clk_i) stall <= (STALL_PCT != 0) && (($urandom % 100) < STALL_PCT);
  assign req_ready_o = !stall;

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      q.delete();
      now         <= 0;
      beat        <= 0;
      rsp_valid_o <= 1'b0;
      rsp_data_o  <= '0;
      n_req_o     <= 0;
    end else begin
      now <= now + 1;
      if (req_valid_i && req_ready_o) begin
        q.push_back('{addr: {req_addr_i[31:4], 4'h0}, due: now + longint'(LAT)});
        n_req_o <= n_req_o + 1;
      end
      rsp_valid_o <= 1'b0;
      if (q.size() > 0 && q[0].due <= now) begin
        logic [31:0] a;
        a = q[0].addr + 32'(8 * beat);
        rsp_valid_o <= 1'b1;
        rsp_data_o  <= {word_at(a + 32'd4), word_at(a)};
        if (beat == BEATS - 1) begin
          beat <= 0;
          void'(q.pop_front());
        end else begin
          beat <= beat + 1;
        end
      end
    end
  end

endmodule
