// Unit test of the master controller with a four-entry refill table and a
// stalling L2 model. Requests for a small pool of lines arrive at random, so
// merges and a full table both occur. A reference list of pending refills
// predicts, for every cycle, ready, merge and allocation; every write-back
// must be the oldest pending line, carry the L2 data for that line, write
// the way and tag of the request that opened it, and report an LRU access
// exactly when some demand request asked for it. Also checks that each
// pending line is fetched from L2 once and that L2 sees requests in order.
// A merge in the cycle of a write-back or an L2 request is seen by the
// controller only after that cycle, so the model applies merges last.
module tb_icache_master_ctrl;
  import icache_pkg::*;
  localparam int MSHR = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic rv = 0; miss_req_t rq; logic rrdy;
  logic l2v, l2rdy, l2pf, rspv; logic [31:0] l2a; logic [63:0] rspd;
  logic we; logic [4:0] wset; logic wway; logic [22:0] wtag; logic [127:0] wline;
  logic acc, nv; logic [27:0] nline; logic [127:0] ndata; logic merge, alloc;
  int unsigned n_l2;

  icache_master_ctrl #(.NSETS(32), .ASSOC(2), .NB_MSHR(MSHR)) dut (
    .clk_i (clk), .rst_ni (rst_n),
    .req_valid_i (rv), .req_i (rq), .req_ready_o (rrdy),
    .l2_req_valid_o (l2v), .l2_req_addr_o (l2a), .l2_req_pf_o (l2pf), .l2_req_ready_i (l2rdy),
    .l2_rsp_valid_i (rspv), .l2_rsp_data_i (rspd),
    .wr_en_o (we), .wr_set_o (wset), .wr_way_o (wway), .wr_tag_o (wtag), .wr_line_o (wline),
    .acc_valid_o (acc), .refill_valid_o (nv), .refill_line_o (nline), .refill_data_o (ndata),
    .merge_o (merge), .alloc_o (alloc));

  l2_mem_model #(.LAT(6), .STALL_PCT(25)) u_l2 (
    .clk_i (clk), .rst_ni (rst_n), .req_valid_i (l2v), .req_addr_i (l2a), .req_ready_o (l2rdy),
    .rsp_valid_o (rspv), .rsp_data_o (rspd), .n_req_o (n_l2));

  function automatic logic [31:0] word_at(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  int checks = 0, failures = 0;
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  typedef struct { logic [27:0] line; logic way; logic pf; logic sent; } ent_t;
  ent_t pend[$];
  logic [27:0] pool [12];
  int n_merge = 0, n_full = 0, n_done = 0;

  initial begin
    for (int i = 0; i < 12; i++) pool[i] = 28'h1C0_0000 + 28'($urandom % 4096);
    rq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6300; cyc++) begin
      @(negedge clk);
      if (cyc >= 6000) rv = 0;
      else if (!rv || rrdy_taken) begin
        rv = ($urandom % 3) != 0;
        rq.line = pool[$urandom % 12];
        rq.way  = 3'($urandom % 2);
        rq.pf   = ($urandom % 2) == 0;
      end
      #1;
      begin
        int idx; logic in_list;
        idx = -1;
        for (int e = 0; e < pend.size(); e++) if (pend[e].line == rq.line) idx = e;
        in_list = (idx >= 0);
        chk("ready", rrdy == (in_list || pend.size() < MSHR));
        if (!in_list && pend.size() >= MSHR && rv) n_full++;
        // L2 request: oldest unsent entry
        if (l2v && l2rdy) begin
          int k; k = -1;
          for (int e = pend.size() - 1; e >= 0; e--) if (!pend[e].sent) k = e;
          chk("L2 request in order", k >= 0 && l2a == {pend[k].line, 4'h0} && l2pf == pend[k].pf);
          if (k >= 0) pend[k].sent = 1;
        end
        if (nv) begin
          logic [31:0] b;
          b = {pend[0].line, 4'h0};
          chk("write-back of oldest", pend.size() > 0 && nline == pend[0].line && we);
          chk("refill data", ndata == {word_at(b+12), word_at(b+8), word_at(b+4), word_at(b)} && wline == ndata);
          chk("write position", wset == pend[0].line[4:0] && wtag == pend[0].line[27:5] && wway == pend[0].way);
          chk("LRU access for demand", acc == !pend[0].pf);
          void'(pend.pop_front());
          n_done++;
        end else begin
          chk("no write without notify", !we);
        end
        rrdy_taken = rv && rrdy;
        if (rv && rrdy) begin
          chk("merge flag", merge == in_list && alloc == !in_list);
          if (in_list) begin
            n_merge++;
            // the entry may have been written back in this very cycle
            for (int e = 0; e < pend.size(); e++)
              if (pend[e].line == rq.line && !rq.pf) pend[e].pf = 0;
          end else begin
            pend.push_back('{line: rq.line, way: rq.way[0], pf: rq.pf, sent: 0});
          end
        end
      end
    end
    chk("all refills completed", pend.size() == 0);
    chk("one L2 request per allocation", int'(n_l2) == n_done + pend.size());
    chk("merges happened", n_merge > 10);
    chk("table filled up", n_full > 0);
    $display("done=%0d merges=%0d full=%0d l2=%0d", n_done, n_merge, n_full, n_l2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rrdy_taken = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
