// Unit test of a core private controller with the tag, data and LRU state
// held in the testbench: a hit answers one cycle after the request with the
// stored line and reports an LRU access; a miss raises a miss request for the
// right line with a free way (or the LRU way for a full set), holds it until
// granted, and completes with the refill data when the matching notification
// arrives (notifications for other lines are ignored). It also checks the
// direct completion when the refill of the requested line is broadcast in
// the lookup cycle, and when it arrives before the miss request is granted.
// A random part then plays the master controller for 1500 fetches over a
// small address space: random grant delays, refills before or after the
// grant or in the lookup cycle, refilled lines written into the array copy;
// hits, victims, responses and data are checked against the array copy.
module tb_icache_pri_ctrl;
  import icache_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic req = 0; logic [31:0] addr = 0; logic gnt, rvalid; logic [127:0] rdata;
  logic [4:0] rd_set; logic [22:0] tag [2]; logic [1:0] valid; logic [127:0] line [2];
  logic lru = 0; logic acc_valid; logic [4:0] acc_set; logic acc_way;
  logic miss_valid; miss_req_t miss_req; logic miss_ready = 0;
  logic refill_valid = 0; logic [27:0] refill_line = 0; logic [127:0] refill_data = 0;
  logic hit_e, miss_e;

  icache_pri_ctrl #(.NSETS(32), .ASSOC(2), .REPL(REPL_PLRU)) dut (
    .clk_i (clk), .rst_ni (rst_n),
    .fetch_req_i (req), .fetch_addr_i (addr), .fetch_gnt_o (gnt),
    .fetch_rvalid_o (rvalid), .fetch_rdata_o (rdata),
    .rd_set_o (rd_set), .tag_i (tag), .valid_i (valid), .line_i (line),
    .lru_way_i (lru), .rnd_i (16'h0), .acc_valid_o (acc_valid), .acc_set_o (acc_set), .acc_way_o (acc_way),
    .miss_valid_o (miss_valid), .miss_o (miss_req), .miss_ready_i (miss_ready),
    .refill_valid_i (refill_valid), .refill_line_i (refill_line), .refill_data_i (refill_data),
    .hit_o (hit_e), .miss_evt_o (miss_e));

  // testbench copy of the arrays
  logic [22:0]  m_tag  [32][2];
  logic         m_v    [32][2];
  logic [127:0] m_line [32][2];
  always_comb begin
    for (int w = 0; w < 2; w++) begin
      tag[w]   = m_tag[rd_set][w];
      valid[w] = m_v[rd_set][w];
      line[w]  = m_line[rd_set][w];
    end
  end

  int checks = 0, failures = 0;
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [127:0] pat(logic [27:0] l);
    return {4{l * 32'h0101_0107 + 32'h33}};
  endfunction

  // Issue one request; return cycles until rvalid (hit path) or -1 on miss.
  task automatic request(logic [31:0] a);
    @(negedge clk);
    req = 1; addr = a;
    #1 chk("granted when idle", gnt);
    @(negedge clk);
    req = 0;
  endtask

  initial begin
    for (int s = 0; s < 32; s++) for (int w = 0; w < 2; w++) begin
      m_v[s][w] = 0; m_tag[s][w] = 0; m_line[s][w] = 0;
    end
    // set 5 way 1 holds line 0x1C00_0050
    m_v[5][1] = 1; m_tag[5][1] = 23'(28'h1C0_0005 >> 5); m_line[5][1] = pat(28'h1C0_0005);
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- hit: response one cycle after acceptance ----
    @(negedge clk);
    req = 1; addr = 32'h1C00_0058;
    #1 chk("hit flagged", hit_e && gnt && acc_valid && acc_set == 5'd5 && acc_way == 1'b1);
    @(negedge clk);
    req = 0;
    chk("hit rvalid after 1 cycle", rvalid && rdata == pat(28'h1C0_0005));
    @(negedge clk);
    chk("rvalid is a pulse", !rvalid);

    // ---- miss: free way 0 chosen, request held until ready ----
    @(negedge clk);
    req = 1; addr = 32'h1C00_0454;   // line 0x1C00045, set 5
    #1 chk("miss flagged", miss_e && !hit_e);
    @(negedge clk);
    req = 0;
    for (int i = 0; i < 3; i++) begin
      #1 chk("miss request held", miss_valid && miss_req.line == 28'h1C0_0045 && miss_req.way == 0 && !miss_req.pf);
      chk("busy: no grant", !gnt);
      @(negedge clk);
    end
    miss_ready = 1;
    @(negedge clk);
    miss_ready = 0;
    chk("request dropped after grant", !miss_valid);
    // unrelated refill ignored
    refill_valid = 1; refill_line = 28'h1C0_0099; refill_data = pat(28'h1C0_0099);
    @(negedge clk);
    refill_valid = 0;
    @(negedge clk);
    chk("other refill ignored", !rvalid);
    refill_valid = 1; refill_line = 28'h1C0_0045; refill_data = pat(28'h1C0_0045);
    @(negedge clk);
    refill_valid = 0;
    chk("refill completes the fetch", rvalid && rdata == pat(28'h1C0_0045));
    @(negedge clk);

    // ---- full set: LRU way is the victim ----
    m_v[5][0] = 1; m_tag[5][0] = 23'(28'h1C0_0045 >> 5);
    lru = 0;
    @(negedge clk);
    req = 1; addr = 32'h1C00_0850;   // line 0x1C00085, set 5
    @(negedge clk);
    req = 0;
    #1 chk("LRU way 0 as victim", miss_valid && miss_req.way == 0);
    // notification before the grant completes the fetch
    refill_valid = 1; refill_line = 28'h1C0_0085; refill_data = pat(28'h1C0_0085);
    @(negedge clk);
    refill_valid = 0;
    chk("refill before grant completes", rvalid && rdata == pat(28'h1C0_0085) && !miss_valid);
    lru = 1;
    @(negedge clk);
    req = 1; addr = 32'h1C00_0C50;
    @(negedge clk);
    req = 0;
    #1 chk("LRU way 1 as victim", miss_valid && miss_req.way == 1);
    miss_ready = 1;
    @(negedge clk);
    miss_ready = 0;
    refill_valid = 1; refill_line = 28'h1C0_00C5; refill_data = pat(28'h1C0_00C5);
    @(negedge clk);
    refill_valid = 0;
    chk("second miss done", rvalid && rdata == pat(28'h1C0_00C5));

    // ---- refill of the requested line in the lookup cycle ----
    @(negedge clk);
    req = 1; addr = 32'h1C00_1070;
    refill_valid = 1; refill_line = 28'h1C0_0107; refill_data = pat(28'h1C0_0107);
    @(negedge clk);
    req = 0; refill_valid = 0;
    chk("bypass of concurrent refill", rvalid && rdata == pat(28'h1C0_0107) && !miss_valid);

    // ---- random part ----
    for (int s = 0; s < 32; s++) for (int w = 0; w < 2; w++) m_v[s][w] = 0;
    begin
      int n_hit, n_miss, n_byp, n_early;
      n_hit = 0; n_miss = 0; n_byp = 0; n_early = 0;
      for (int i = 0; i < 1500; i++) begin
        logic [27:0] l;
        logic [4:0]  st;
        logic        exp_hit, exp_hw, exp_vic, byp;
        l  = {23'(28'h1C0_0000 >> 5) + 23'($urandom % 4), 5'($urandom % 8)};
        st = l[4:0];
        @(negedge clk);
        lru  = 1'($urandom);
        req  = 1; addr = {l, 4'($urandom)};
        exp_hit = 0; exp_hw = 0;
        for (int w = 0; w < 2; w++)
          if (m_v[st][w] && m_tag[st][w] == l[27:5]) begin exp_hit = 1; exp_hw = 1'(w); end
        exp_vic = !m_v[st][0] ? 1'b0 : !m_v[st][1] ? 1'b1 : lru;
        byp = !exp_hit && (($urandom % 10) == 0);
        if (byp) begin
          refill_valid = 1; refill_line = l; refill_data = pat(l);
        end
        #1;
        chk("random: grant when idle", gnt);
        chk("random: hit flag", hit_e == exp_hit && miss_e == !exp_hit);
        if (exp_hit) chk("random: LRU access", acc_valid && acc_set == st && acc_way == exp_hw);
        @(negedge clk);
        req = 0; refill_valid = 0;
        if (exp_hit || byp) begin
          chk("random: hit/bypass response", rvalid && rdata == pat(l) && !miss_valid);
          if (exp_hit) n_hit++; else n_byp++;
          continue;
        end
        n_miss++;
        #1 chk($sformatf("random: miss request line %h way %0d", miss_req.line, miss_req.way),
               miss_valid && miss_req.line == l && miss_req.way == 3'(exp_vic) && !rvalid);
        if (($urandom % 4) == 0) begin
          // refill arrives before the request is granted
          n_early++;
          repeat ($urandom % 3) @(negedge clk);
        end else begin
          repeat ($urandom % 4) begin
            @(negedge clk);
            #1 chk("random: request held", miss_valid && miss_req.line == l);
          end
          @(negedge clk);
          miss_ready = 1;
          @(negedge clk);
          miss_ready = 0;
          #1 chk("random: request released", !miss_valid);
          repeat ($urandom % 5) begin
            @(negedge clk);
            #1 chk("random: still waiting", !rvalid && !gnt);
          end
        end
        @(negedge clk);
        // the refill writes the line into its victim way and notifies
        m_v[st][exp_vic] = 1; m_tag[st][exp_vic] = l[27:5]; m_line[st][exp_vic] = pat(l);
        refill_valid = 1; refill_line = l; refill_data = pat(l);
        @(negedge clk);
        refill_valid = 0;
        chk("random: refill completes fetch", rvalid && rdata == pat(l) && !miss_valid);
      end
      $display("random: %0d hits, %0d misses (%0d refilled before grant), %0d bypasses",
               n_hit, n_miss, n_early, n_byp);
      chk("random: all cases seen", n_hit > 100 && n_miss > 100 && n_early > 10 && n_byp > 10);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
