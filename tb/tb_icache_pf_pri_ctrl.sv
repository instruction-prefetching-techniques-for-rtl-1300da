// Unit test of the prefetch private controller: a sub-request to a present
// line (or one being refilled right now) is granted and dropped without a
// miss request; a missing line raises a prefetch-flagged miss request with
// a free or LRU victim way and is granted only when the interconnect is ready.
// A directed part covers each case; a random part then compares every output
// with a reference computed from random tag contents, addresses, refills,
// ready and LRU inputs.
module tb_icache_pf_pri_ctrl;
  import icache_pkg::*;
  logic req = 0; logic [31:0] addr = 0; logic gnt;
  logic [4:0] rd_set; logic [22:0] tag [2]; logic [1:0] valid;
  logic lru = 0; logic refill_valid = 0; logic [27:0] refill_line = 0;
  logic miss_valid; miss_req_t mreq; logic miss_ready = 0; logic drop, issue;

  icache_pf_pri_ctrl #(.NSETS(32), .ASSOC(2), .REPL(REPL_PLRU)) dut (
    .pf_req_i (req), .pf_addr_i (addr), .pf_gnt_o (gnt),
    .rd_set_o (rd_set), .tag_i (tag), .valid_i (valid),
    .lru_way_i (lru), .rnd_i (16'h0),
    .refill_valid_i (refill_valid), .refill_line_i (refill_line),
    .miss_valid_o (miss_valid), .miss_o (mreq), .miss_ready_i (miss_ready),
    .drop_o (drop), .issue_o (issue));

  logic [22:0] m_tag [32][2];
  logic        m_v   [32][2];
  always_comb for (int w = 0; w < 2; w++) begin tag[w] = m_tag[rd_set][w]; valid[w] = m_v[rd_set][w]; end

  int checks = 0, failures = 0;
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int s = 0; s < 32; s++) for (int w = 0; w < 2; w++) begin m_v[s][w] = 0; m_tag[s][w] = 0; end
    m_v[3][0] = 1; m_tag[3][0] = 23'(28'h1C0_0003 >> 5);
    #1 chk("no request, nothing out", !gnt && !miss_valid);
    req = 1; addr = 32'h1C00_0030;
    #1 chk("present line dropped", gnt && drop && !miss_valid);
    addr = 32'h1C00_0230; miss_ready = 0;
    #1 chk("missing line requested, way 1 free", miss_valid && mreq.pf && mreq.way == 1 && mreq.line == 28'h1C0_0023 && !gnt);
    miss_ready = 1;
    #1 chk("granted with interconnect", gnt && issue);
    m_v[3][1] = 1; m_tag[3][1] = 23'(28'h1C0_0023 >> 5);
    addr = 32'h1C00_0430; lru = 1; miss_ready = 0;
    #1 chk("full set: LRU way", miss_valid && mreq.way == 1);
    lru = 0;
    #1 chk("full set: LRU way 0", miss_valid && mreq.way == 0);
    refill_valid = 1; refill_line = 28'h1C0_0043;
    #1 chk("line being refilled is dropped", gnt && drop && !miss_valid);

    // random part
    for (int i = 0; i < 3000; i++) begin
      logic [27:0] line;
      logic        pres, exp_v;
      int          free_way;
      logic        exp_way;
      if (i % 50 == 0)
        for (int s = 0; s < 32; s++) for (int w = 0; w < 2; w++) begin
          m_v[s][w]   = ($urandom % 3) != 0;
          m_tag[s][w] = 23'($urandom % 4);
        end
      line = {23'($urandom % 4), 5'($urandom)};
      req          = ($urandom % 5) != 0;
      addr         = {line, 4'($urandom)};
      refill_valid = ($urandom % 4) == 0;
      refill_line  = (($urandom % 2) == 0) ? line : {23'($urandom % 4), 5'($urandom)};
      miss_ready   = ($urandom % 2) == 0;
      lru          = 1'($urandom);
      pres = refill_valid && refill_line == line;
      free_way = -1;
      for (int w = 1; w >= 0; w--) begin
        if (m_v[line[4:0]][w] && m_tag[line[4:0]][w] == line[27:5]) pres = 1;
        if (!m_v[line[4:0]][w]) free_way = w;
      end
      exp_way = (free_way >= 0) ? 1'(free_way) : lru;
      exp_v = req && !pres;
      #1;
      chk("random: set index", rd_set == line[4:0]);
      chk("random: miss valid", miss_valid == exp_v);
      chk("random: grant", gnt == (req && (pres || miss_ready)));
      chk("random: drop", drop == (req && pres));
      chk("random: issue", issue == (exp_v && miss_ready));
      if (exp_v) chk($sformatf("random: request %h way %0d", mreq.line, mreq.way),
                     mreq.line == line && mreq.way == 3'(exp_way) && mreq.pf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
