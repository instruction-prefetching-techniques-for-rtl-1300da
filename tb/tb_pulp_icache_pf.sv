// End-to-end test of the shared instruction cache with prefetching, at the
// default configuration (4 cores, 1 KB, two ways, pseudo-LRU, 8 refills
// outstanding) against a behavioural L2 memory with 14 cycles of latency.
//
// Directed phases exercise, and count, every mechanism of the cache: a miss
// and its refill latency, a one-cycle hit, merging of simultaneous misses to
// one line, pseudo-LRU victim choice, a software prefetch burst (and the
// later hits it produces), dropping of prefetches to present lines,
// preemption of a software burst, next-line bursts started by a demand miss,
// and stream bursts after the programmed pause. Two final phases let all four
// cores fetch concurrently: first through loops, then random lines while the
// prefetcher settings change randomly and software prefetches are issued.
// Every returned line is compared with the L2 memory contents. Expected
// values come from the memory content function and from latencies derived
// from the pipeline description.
module tb_pulp_icache_pf;
  import icache_pkg::*;

  localparam int unsigned NC  = 4;
  localparam int unsigned LAT = 14;
  // demand miss: lookup (1) + miss request (1) + L2 request (1) + LAT +
  // 2 beats (1 after the first) + write-back (1) + response register (1)
  localparam int unsigned MISS_MAT = LAT + 6;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic              fetch_req    [NC];
  logic [31:0]       fetch_addr   [NC];
  logic              fetch_gnt    [NC];
  logic              fetch_rvalid [NC];
  logic [127:0]      fetch_rdata  [NC];
  logic              reg_req = 0, reg_we = 0;
  logic [7:0]        reg_addr = 0;
  logic [31:0]       reg_wdata = 0;
  logic              reg_gnt, reg_rvalid;
  logic [31:0]       reg_rdata;
  logic              l2_req_valid, l2_req_ready, l2_rsp_valid;
  logic [31:0]       l2_req_addr;
  logic [63:0]       l2_rsp_data;
  logic              hit [NC], miss [NC];
  cache_evt_t        evt;
  int unsigned       n_l2;

  pulp_icache_pf dut (
    .clk_i (clk), .rst_ni (rst_n),
    .fetch_req_i (fetch_req), .fetch_addr_i (fetch_addr), .fetch_gnt_o (fetch_gnt),
    .fetch_rvalid_o (fetch_rvalid), .fetch_rdata_o (fetch_rdata),
    .reg_req_i (reg_req), .reg_we_i (reg_we), .reg_addr_i (reg_addr), .reg_wdata_i (reg_wdata),
    .reg_gnt_o (reg_gnt), .reg_rvalid_o (reg_rvalid), .reg_rdata_o (reg_rdata),
    .l2_req_valid_o (l2_req_valid), .l2_req_addr_o (l2_req_addr), .l2_req_ready_i (l2_req_ready),
    .l2_rsp_valid_i (l2_rsp_valid), .l2_rsp_data_i (l2_rsp_data),
    .hit_o (hit), .miss_o (miss), .evt_o (evt)
  );

  l2_mem_model #(.LAT(LAT)) u_l2 (
    .clk_i (clk), .rst_ni (rst_n),
    .req_valid_i (l2_req_valid), .req_addr_i (l2_req_addr), .req_ready_o (l2_req_ready),
    .rsp_valid_o (l2_rsp_valid), .rsp_data_o (l2_rsp_data), .n_req_o (n_l2)
  );

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_merge = 0, n_sw = 0, n_nl = 0, n_stream = 0;
  int n_rnd_hit = 0, n_rnd_sw = 0;
  int n_preempt = 0, n_drop = 0, n_pfissue = 0, n_wait = 0, n_plru = 0, n_conc = 0;
  int c_hit [NC], c_acc [NC], c_mat [NC];
  initial for (int c = 0; c < NC; c++) begin
    c_hit[c] = 0; c_acc[c] = 0; c_mat[c] = 0;
  end
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      n_hit  += int'(hit[c]);
      n_miss += int'(miss[c]);
      c_hit[c] += int'(hit[c]);
      c_acc[c] += int'(hit[c] || miss[c]);
    end
    n_merge   += int'(evt.merge);
    n_sw      += int'(evt.pf_sw_start);
    n_nl      += int'(evt.pf_miss_start);
    n_stream  += int'(evt.pf_stream);
    n_preempt += int'(evt.pf_preempt);
    n_drop    += int'(evt.pf_drop);
    n_pfissue += int'(evt.pf_issue);
    n_wait    += int'(evt.pf_state == PF_WAIT);
  end

  function automatic logic [31:0] word_at(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction
  function automatic logic [127:0] line_at(logic [31:0] a);
    logic [31:0] b;
    b = {a[31:4], 4'h0};
    return {word_at(b + 12), word_at(b + 8), word_at(b + 4), word_at(b)};
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // One fetch by core c; returns the memory access time in cycles and checks
  // the returned line.
  task automatic fetch(int c, logic [31:0] a, output int mat);
    longint unsigned t0;
    @(negedge clk);
    fetch_req[c]  = 1'b1;
    fetch_addr[c] = a;
    while (!fetch_gnt[c]) @(negedge clk);
    t0 = cycle;
    @(negedge clk);
    fetch_req[c] = 1'b0;
    while (!fetch_rvalid[c]) @(negedge clk);
    mat = int'(cycle - t0);
    c_mat[c] += mat;
    check($sformatf("core %0d data at %h", c, a), fetch_rdata[c] == line_at(a));
  endtask

  task automatic reg_write(logic [7:0] off, logic [31:0] v);
    @(negedge clk);
    reg_req = 1; reg_we = 1; reg_addr = off; reg_wdata = v;
    @(negedge clk);
    reg_req = 0; reg_we = 0;
  endtask

  task automatic reg_read(logic [7:0] off, output logic [31:0] v);
    @(negedge clk);
    reg_req = 1; reg_we = 0; reg_addr = off;
    @(negedge clk);
    reg_req = 0;
    v = reg_rdata;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  // core c runs three times through a 48-line loop of its own
  task automatic core_loop(int c);
    int m;
    for (int it = 0; it < 3; it++)
      for (int i = 0; i < 48; i++) begin
        fetch(c, 32'h1C01_0000 + 32'(c * 32'h300) + 32'(16 * i) + 32'(4 * (i % 4)), m);
        if (m == 1) n_conc++;
      end
  endtask

  // core c fetches n random lines of a 2 KB region, with random gaps
  bit rnd_busy = 0;
  task automatic core_random(int c, int n);
    int m;
    for (int i = 0; i < n; i++) begin
      fetch(c, 32'h1C02_0000 + 32'(16 * ($urandom % 128)) + 32'(4 * ($urandom % 4)), m);
      if (m == 1) n_rnd_hit++;
      idle($urandom % 4);
    end
  endtask

  // while the cores run randomly, change the prefetcher configuration and
  // issue software prefetches into the same region
  task automatic reg_random();
    while (rnd_busy) begin
      idle(20 + $urandom % 60);
      case ($urandom % 5)
        0: reg_write(REG_HWPF_MODE, 32'($urandom % 3));
        1: reg_write(REG_HWPF_SIZE, 32'(16 * ($urandom % 9)));
        2: reg_write(REG_HWPF_WAIT, 32'($urandom % 40));
        default: begin
          reg_write(REG_PF_SIZE, 32'(16 * (1 + $urandom % 8)));
          reg_write(REG_PF_ADDR, 32'h1C02_0000 + 32'(16 * ($urandom % 128)));
          n_rnd_sw++;
        end
      endcase
    end
  endtask

  // Lines are chosen in distinct regions so phases do not disturb each other:
  // set index = address bits [8:4], 32 sets, 512 bytes per way.
  int mat, mat2;
  int l2_before;
  int sw_before, nl_before, st_before, drop_before, pre_before, merge_before, pfi_before;
  logic [31:0] rv;
  int st_hit [NC], st_acc [NC], st_mat [NC];
  int st_l2, st_cyc0;

  initial begin
    for (int c = 0; c < NC; c++) begin
      fetch_req[c]  = 0;
      fetch_addr[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- reset values and register read-back ----
    reg_read(REG_HWPF_MODE, rv); check("reset hw mode is stream", rv == 32'(HWPF_STREAM));
    reg_read(REG_HWPF_SIZE, rv); check("reset hw size 256", rv == 32'd256);
    reg_read(REG_HWPF_WAIT, rv); check("reset hw wait 60", rv == 32'd60);
    reg_write(REG_HWPF_MODE, 32'(HWPF_OFF));
    reg_read(REG_HWPF_MODE, rv); check("hw mode off", rv == 32'(HWPF_OFF));

    // statistics gathered over the whole run (the bus is quiet here)
    reg_write(REG_STATS_START, 32'd1);
    idle(1);
    for (int c = 0; c < NC; c++) begin
      st_hit[c] = c_hit[c]; st_acc[c] = c_acc[c]; st_mat[c] = c_mat[c];
    end
    st_l2   = n_l2;
    st_cyc0 = int'(cycle);

    // ---- 1. miss then hit ----
    l2_before = n_l2;
    fetch(0, 32'h1C00_0000, mat);
    check($sformatf("miss latency %0d == %0d", mat, MISS_MAT), mat == MISS_MAT);
    fetch(0, 32'h1C00_0004, mat);
    check($sformatf("hit latency %0d == 1", mat), mat == 1);
    check("one L2 refill for one miss", n_l2 == l2_before + 1);

    // ---- 2. merge of simultaneous misses ----
    l2_before = n_l2; merge_before = n_merge;
    fork
      fetch(1, 32'h1C00_1010, mat);
      fetch(2, 32'h1C00_1010, mat2);
      fetch(3, 32'h1C00_1014, mat2);
    join
    check("merged misses need one refill", n_l2 == l2_before + 1);
    check("merge happened", n_merge >= merge_before + 2);

    // ---- 3. pseudo-LRU victim: set 3 holds X (way0) and Y (way1) ----
    fetch(0, 32'h1C00_2030, mat);             // X -> way 0
    fetch(0, 32'h1C00_2230, mat);             // Y -> way 1 (set 3 again)
    fetch(0, 32'h1C00_2030, mat);             // touch X: Y becomes LRU
    check("X hit", mat == 1);
    fetch(0, 32'h1C00_2430, mat);             // Z replaces the LRU line Y
    check("Z missed", mat == MISS_MAT);
    fetch(0, 32'h1C00_2030, mat);
    check("X kept by pseudo-LRU", mat == 1);
    n_plru += int'(mat == 1);
    fetch(0, 32'h1C00_2230, mat);
    check("Y evicted by pseudo-LRU", mat > 1);

    // ---- 4. software prefetch of 64 bytes, then hits ----
    l2_before = n_l2; sw_before = n_sw; pfi_before = n_pfissue;
    reg_write(REG_PF_SIZE, 32'd64);
    reg_write(REG_PF_ADDR, 32'h1C00_3000);
    idle(LAT + 20);
    check("software burst started", n_sw == sw_before + 1);
    check("four prefetch refills", n_pfissue == pfi_before + 4 && n_l2 == l2_before + 4);
    for (int i = 0; i < 4; i++) begin
      fetch(i % NC, 32'h1C00_3000 + 32'(16 * i), mat);
      check($sformatf("prefetched line %0d hits", i), mat == 1);
    end

    // ---- 5. prefetch of present lines is dropped ----
    drop_before = n_drop; l2_before = n_l2;
    reg_write(REG_PF_SIZE, 32'd32);
    reg_write(REG_PF_ADDR, 32'h1C00_3000);
    idle(10);
    check("present lines dropped", n_drop == drop_before + 2 && n_l2 == l2_before);

    // ---- 6. preemption of a software burst ----
    pre_before = n_preempt;
    reg_write(REG_PF_SIZE, 32'd256);
    reg_write(REG_PF_ADDR, 32'h1C00_4000);
    reg_write(REG_PF_SIZE, 32'd16);
    reg_write(REG_PF_ADDR, 32'h1C00_5000);
    idle(LAT + 40);
    check("software burst preempted", n_preempt > pre_before);
    fetch(0, 32'h1C00_5000, mat);
    check("preempting request served", mat == 1);
    fetch(0, 32'h1C00_40F0, mat);
    check("preempted burst did not reach its end", mat > 1);

    // ---- 7. next-line prefetch ----
    reg_write(REG_HWPF_MODE, 32'(HWPF_NEXTLINE));
    reg_write(REG_HWPF_SIZE, 32'd64);
    nl_before = n_nl; st_before = n_stream;
    fetch(1, 32'h1C00_6000, mat);
    check("next-line trigger miss", mat == MISS_MAT);
    idle(LAT + 20);
    check("next-line burst started", n_nl == nl_before + 1);
    for (int i = 1; i <= 4; i++) begin
      fetch(1, 32'h1C00_6000 + 32'(16 * i), mat);
      check($sformatf("next line %0d hits", i), mat == 1);
    end
    fetch(1, 32'h1C00_6050, mat);
    check("line beyond the burst misses", mat > 1);
    idle(LAT + 20);
    check("no stream in next-line mode", n_stream == st_before);

    // ---- 8. stream prefetch ----
    reg_write(REG_HWPF_MODE, 32'(HWPF_STREAM));
    reg_write(REG_HWPF_SIZE, 32'd32);
    reg_write(REG_HWPF_WAIT, 32'd10);
    st_before = n_stream;
    fetch(2, 32'h1C00_7000, mat);
    idle(60);
    check("stream bursts started", n_stream >= st_before + 2);
    for (int i = 1; i <= 6; i++) begin
      fetch(2, 32'h1C00_7000 + 32'(16 * i), mat);
      check($sformatf("stream line %0d hits", i), mat == 1);
    end

    // ---- 9. four cores looping concurrently, stream prefetch on ----
    reg_write(REG_HWPF_SIZE, 32'd128);
    reg_write(REG_HWPF_WAIT, 32'd30);
    fork
      core_loop(0);
      core_loop(1);
      core_loop(2);
      core_loop(3);
    join
    check("concurrent traffic produced hits", n_conc > 0);

    // ---- 10. random fetches from all cores, random prefetch settings ----
    rnd_busy = 1;
    fork
      begin
        fork
          core_random(0, 400);
          core_random(1, 400);
          core_random(2, 400);
          core_random(3, 400);
        join
        rnd_busy = 0;
      end
      reg_random();
    join
    check($sformatf("random phase: hits %0d, software prefetches %0d", n_rnd_hit, n_rnd_sw),
          n_rnd_hit > 0 && n_rnd_sw > 0);
    reg_write(REG_HWPF_MODE, 32'(HWPF_OFF));
    idle(100);

    // ---- statistics counters against the testbench's own counts ----
    reg_write(REG_STATS_STOP, 32'd1);
    st_cyc0 = int'(cycle) - st_cyc0;
    idle(1);
    reg_read(REG_STATS_BASE + 8'(4 * STAT_ACTIVE), rv); check("statistics stopped", rv == 0);
    reg_read(REG_STATS_BASE + 8'(4 * STAT_CYCLES), rv);
    check($sformatf("statistics cycles %0d ~ %0d", rv, st_cyc0),
          int'(rv) <= st_cyc0 && int'(rv) + 4 >= st_cyc0);
    reg_read(REG_STATS_BASE + 8'(4 * STAT_L2_LINES), rv);
    check($sformatf("statistics L2 lines %0d == %0d", rv, n_l2 - st_l2), int'(rv) == n_l2 - st_l2);
    reg_read(REG_STATS_BASE + 8'(4 * STAT_L2_PF), rv);
    check($sformatf("statistics L2 prefetch lines %0d", rv), rv > 0 && int'(rv) <= n_pfissue);
    reg_read(REG_STATS_BASE + 8'(4 * STAT_USED), rv);
    check($sformatf("statistics cache usage %0d == 1024 bytes", rv), rv == 32'd1024);
    for (int c = 0; c < NC; c++) begin
      reg_read(REG_STATS_BASE + 8'(4 * (STAT_CORE0 + 3 * c)), rv);
      check($sformatf("core %0d statistics accesses %0d == %0d", c, rv, c_acc[c] - st_acc[c]),
            int'(rv) == c_acc[c] - st_acc[c]);
      reg_read(REG_STATS_BASE + 8'(4 * (STAT_CORE0 + 3 * c + 1)), rv);
      check($sformatf("core %0d statistics hits %0d == %0d", c, rv, c_hit[c] - st_hit[c]),
            int'(rv) == c_hit[c] - st_hit[c]);
      reg_read(REG_STATS_BASE + 8'(4 * (STAT_CORE0 + 3 * c + 2)), rv);
      check($sformatf("core %0d statistics access time %0d == %0d", c, rv, c_mat[c] - st_mat[c]),
            int'(rv) == c_mat[c] - st_mat[c]);
    end

    // ---- every mechanism happened ----
    check("hits seen",              n_hit > 0);
    check("misses seen",            n_miss > 0);
    check("merges seen",            n_merge > 0);
    check("software prefetch seen", n_sw > 0);
    check("next-line prefetch seen",n_nl > 0);
    check("stream prefetch seen",   n_stream > 0);
    check("stream wait seen",       n_wait > 0);
    check("preemption seen",        n_preempt > 0);
    check("prefetch drop seen",     n_drop > 0);
    check("prefetch refill seen",   n_pfissue > 0);
    check("pseudo-LRU keep seen",   n_plru > 0);
    $display("mechanisms: hit=%0d miss=%0d merge=%0d sw=%0d nextline=%0d stream=%0d wait=%0d preempt=%0d drop=%0d pf_refill=%0d plru=%0d l2=%0d",
             n_hit, n_miss, n_merge, n_sw, n_nl, n_stream, n_wait, n_preempt, n_drop, n_pfissue, n_plru, n_l2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
