// Workload test: the two artificial benchmarks run on the shared cache in
// the configurations that were evaluated for it.
//
// Thirty-two independent copies of the cache run side by side, each with its
// own L2 model (14 cycles latency) and four core models
// (core_fetch_model). Each of the two programs (a 3200-byte single loop,
// and a main loop calling four 2400-byte function loops) runs on sixteen
// configurations:
//   0: 1 KB, 2-way, pseudo-LRU, no hardware prefetch
//   1: 1 KB, 2-way, pseudo-LRU, next-line prefetch of 128 bytes
//   2: 1 KB, 2-way, pseudo-LRU, stream prefetch of 256 bytes, 60-cycle pause
//   3: 1 KB, 2-way, pseudo-random, no hardware prefetch
//   4: 1 KB, 2-way, pseudo-random, next-line prefetch of 128 bytes
//   5: 4 KB, 2-way, pseudo-LRU, no hardware prefetch
//   6: 16 KB, 2-way, pseudo-LRU, no hardware prefetch
//   7, 8: as 1 with next-line sizes of 32 and 288 bytes
//   9, 10: as 2 with pauses of 0 and 30 cycles
//   11, 12: 1 KB, pseudo-random, direct-mapped and 8-way, no prefetch
//   13: 512 bytes, 2-way, pseudo-LRU, no prefetch
//   14: as 0 with a software prefetch of 512 bytes at every call
//   15: as 1 (next-line, 128 bytes) plus the software prefetch of 14
// The software prefetch is issued by the testbench on the register port
// when the first core is about to enter a function (or restart the loop).
// All four cores run the same program, started a few cycles apart. The
// testbench checks every fetched line against the memory contents, the
// number of fetches against the program structure, and the effects the
// cache is built for: next-line and stream prefetching raise the hit rate
// and shorten the run of both programs on the 1 KB cache, longer next-line
// bursts hit more, a shorter stream pause moves more lines over the L2 bus,
// and a cache large enough to hold the program beats the 1 KB cache without
// prefetching. It
// prints hit rate, run time and L2 traffic (at a 20 ns clock) of every run.
// The programs, the prefetch sizes, the pause and the cache sizes are those
// of the evaluation; the thresholds are this testbench's own.
module tb_icache_workloads;
  import icache_pkg::*;

  localparam int unsigned NC     = 4;
  localparam int unsigned NCFG   = 16;
  localparam int unsigned ITER   = 3;
  localparam int unsigned FITER  = 2;
  localparam int unsigned EXEC   = 4;

  localparam int unsigned CFG_BYTES [NCFG] = '{1024, 1024, 1024, 1024, 1024, 4096, 16384,
                                               1024, 1024, 1024, 1024, 1024, 1024, 512,
                                               1024, 1024};
  localparam int unsigned CFG_ASSOC [NCFG] = '{2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 1, 8, 2, 2, 2};
  localparam repl_e       CFG_REPL  [NCFG] = '{REPL_PLRU, REPL_PLRU, REPL_PLRU, REPL_PRAND,
                                               REPL_PRAND, REPL_PLRU, REPL_PLRU, REPL_PLRU,
                                               REPL_PLRU, REPL_PLRU, REPL_PLRU, REPL_PRAND,
                                               REPL_PRAND, REPL_PLRU, REPL_PLRU, REPL_PLRU};
  localparam hwpf_mode_e  CFG_MODE  [NCFG] = '{HWPF_OFF, HWPF_NEXTLINE, HWPF_STREAM, HWPF_OFF,
                                               HWPF_NEXTLINE, HWPF_OFF, HWPF_OFF, HWPF_NEXTLINE,
                                               HWPF_NEXTLINE, HWPF_STREAM, HWPF_STREAM, HWPF_OFF,
                                               HWPF_OFF, HWPF_OFF, HWPF_OFF, HWPF_NEXTLINE};
  localparam int unsigned CFG_SIZE  [NCFG] = '{0, 128, 256, 0, 128, 0, 0, 32, 288, 256, 256,
                                               0, 0, 0, 0, 128};
  localparam int unsigned CFG_WAIT  [NCFG] = '{60, 60, 60, 60, 60, 60, 60, 60, 60, 0, 30,
                                               60, 60, 60, 60, 60};
  // software prefetch size written before every call (0: none)
  localparam int unsigned CFG_SW    [NCFG] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
                                               512, 512};

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  initial #22 rst_n = 1;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  // results per workload and configuration
  logic            run_done [2][NCFG];
  longint unsigned run_cyc  [2][NCFG];
  int unsigned     run_hit  [2][NCFG];
  int unsigned     run_miss [2][NCFG];
  int unsigned     run_l2   [2][NCFG];
  int unsigned     run_fet  [2][NCFG];
  int unsigned     run_err  [2][NCFG];

  for (genvar w = 0; w < 2; w++) begin : g_wl
    for (genvar k = 0; k < NCFG; k++) begin : g_cfg
      logic              freq [NC], fgnt [NC], frv [NC];
      logic [31:0]       faddr [NC];
      logic [127:0]      frdata [NC];
      logic              hit [NC], miss [NC];
      cache_evt_t        evt;
      logic              rreq = 0, rwe = 0, rgnt, rrv;
      logic [7:0]        raddr = 0;
      logic [31:0]       rwdata = 0, rrdata;
      logic              l2v, l2r, l2rv;
      logic [31:0]       l2a;
      logic [63:0]       l2d;
      logic              cdone [NC], ccall [NC];
      logic [31:0]       ccall_addr [NC];
      int unsigned       cfet [NC], cerr [NC];
      int unsigned       n_l2;
      int unsigned       nh, nm;

      pulp_icache_pf #(
        .CACHE_BYTES (CFG_BYTES[k]),
        .ASSOC       (CFG_ASSOC[k]),
        .REPL        (CFG_REPL[k])
      ) i_dut (
        .clk_i (clk), .rst_ni (rst_n),
        .fetch_req_i (freq), .fetch_addr_i (faddr), .fetch_gnt_o (fgnt),
        .fetch_rvalid_o (frv), .fetch_rdata_o (frdata),
        .reg_req_i (rreq), .reg_we_i (rwe), .reg_addr_i (raddr), .reg_wdata_i (rwdata),
        .reg_gnt_o (rgnt), .reg_rvalid_o (rrv), .reg_rdata_o (rrdata),
        .l2_req_valid_o (l2v), .l2_req_addr_o (l2a), .l2_req_ready_i (l2r),
        .l2_rsp_valid_i (l2rv), .l2_rsp_data_i (l2d),
        .hit_o (hit), .miss_o (miss), .evt_o (evt)
      );

      l2_mem_model #(.LAT (14)) i_l2 (
        .clk_i (clk), .rst_ni (rst_n),
        .req_valid_i (l2v), .req_addr_i (l2a), .req_ready_o (l2r),
        .rsp_valid_o (l2rv), .rsp_data_o (l2d), .n_req_o (n_l2)
      );

      for (genvar c = 0; c < NC; c++) begin : g_core
        core_fetch_model #(
          .WORKLOAD (w), .BASE (32'h0000_1000), .ITER (ITER), .FITER (FITER),
          .EXEC (EXEC), .START (20 + 3 * c)
        ) i_core (
          .clk_i (clk), .rst_ni (rst_n),
          .req_o (freq[c]), .addr_o (faddr[c]), .gnt_i (fgnt[c]),
          .rvalid_i (frv[c]), .rdata_i (frdata[c]),
          .call_o (ccall[c]), .call_addr_o (ccall_addr[c]), .done_o (cdone[c]), .fetches_o (cfet[c]), .errors_o (cerr[c])
        );
      end

      // hit and miss counters over all cores
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          nh <= 0;
          nm <= 0;
        end else begin
          nh <= nh + 32'(hit[0]) + 32'(hit[1]) + 32'(hit[2]) + 32'(hit[3]);
          nm <= nm + 32'(miss[0]) + 32'(miss[1]) + 32'(miss[2]) + 32'(miss[3]);
        end
      end

      task automatic wr(logic [7:0] a, logic [31:0] v);
        @(negedge clk);
        rreq = 1; rwe = 1; raddr = a; rwdata = v;
        @(negedge clk);
        rreq = 0; rwe = 0;
      endtask

      initial begin
        longint unsigned t0;
        run_done[w][k] = 1'b0;
        @(posedge rst_n);
        wr(REG_HWPF_MODE, 32'(CFG_MODE[k]));
        wr(REG_HWPF_SIZE, CFG_SIZE[k]);
        wr(REG_HWPF_WAIT, CFG_WAIT[k]);
        wr(REG_PF_SIZE, CFG_SW[k]);
        t0 = cycle;
        if (CFG_SW[k] != 0)
          fork
            forever begin
              @(posedge clk);
              if (ccall[0]) wr(REG_PF_ADDR, ccall_addr[0]);
            end
          join_none
        wait (cdone[0] && cdone[1] && cdone[2] && cdone[3]);
        @(negedge clk);
        run_cyc[w][k]  = cycle - t0;
        run_hit[w][k]  = nh;
        run_miss[w][k] = nm;
        run_l2[w][k]   = n_l2;
        run_fet[w][k]  = cfet[0] + cfet[1] + cfet[2] + cfet[3];
        run_err[w][k]  = cerr[0] + cerr[1] + cerr[2] + cerr[3];
        run_done[w][k] = 1'b1;
      end
    end
  end

  function automatic int unsigned pct(int unsigned h, int unsigned m);
    return (h + m == 0) ? 0 : (100 * h) / (h + m);
  endfunction

  task automatic chk(string s, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", s);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_fet [2];
    int unsigned hr [2][NCFG];
    string       wname [2];
    exp_fet[0] = NC * ITER * 200;
    exp_fet[1] = NC * ITER * 4 * (1 + FITER * 150);
    wname[0]   = "singleloop";
    wname[1]   = "multifunc ";
    @(posedge rst_n);
    for (int w = 0; w < 2; w++)
      for (int k = 0; k < NCFG; k++)
        wait (run_done[w][k]);
    $display("workload    cfg  size  ways   repl  hwpf  pf B  wait  sw B  hit%%  cycles  fetches  l2 lines  l2 MB/s");
    for (int w = 0; w < 2; w++) begin
      for (int k = 0; k < NCFG; k++) begin
        hr[w][k] = pct(run_hit[w][k], run_miss[w][k]);
        $display("%s  %2d  %5d  %4d  %5s  %4s  %4d  %4d  %4d  %3d  %7d  %7d  %8d  %7d", wname[w], k,
                 CFG_BYTES[k], CFG_ASSOC[k], CFG_REPL[k] == REPL_PLRU ? "PLRU" : "PRAND",
                 CFG_MODE[k] == HWPF_OFF ? "off" : CFG_MODE[k] == HWPF_NEXTLINE ? "NLP" : "STP",
                 CFG_SIZE[k], CFG_WAIT[k], CFG_SW[k],
                 hr[w][k], run_cyc[w][k], run_fet[w][k], run_l2[w][k],
                 // 16 bytes per line over cycles of 20 ns, in MB/s
                 (run_l2[w][k] * 16 * 50) / int'(run_cyc[w][k]));
        chk($sformatf("%s cfg %0d data", wname[w], k), run_err[w][k] == 0);
        chk($sformatf("%s cfg %0d fetch count", wname[w], k), run_fet[w][k] == exp_fet[w]);
        chk($sformatf("%s cfg %0d every fetch is a hit or a miss", wname[w], k),
            run_hit[w][k] + run_miss[w][k] == exp_fet[w]);
        // the L2 bus of 8 bytes at 20 ns cannot exceed 400 MB/s
        chk($sformatf("%s cfg %0d L2 bandwidth", wname[w], k),
            (run_l2[w][k] * 16 * 50) / int'(run_cyc[w][k]) <= 400);
      end
      chk({wname[w], " NLP raises hit rate (PLRU)"},   hr[w][1] >= hr[w][0] + 20);
      chk({wname[w], " NLP shortens run (PLRU)"},      run_cyc[w][1] < run_cyc[w][0]);
      chk({wname[w], " STP raises hit rate"},          hr[w][2] >= hr[w][0] + 20);
      chk({wname[w], " STP shortens run"},             run_cyc[w][2] < run_cyc[w][0]);
      chk({wname[w], " NLP raises hit rate (PRAND)"},  hr[w][4] >= hr[w][3] + 20);
      chk({wname[w], " 16 KB beats 1 KB"},             hr[w][6] > hr[w][0] && run_cyc[w][6] < run_cyc[w][0]);
      chk({wname[w], " 16 KB hit rate not below 4 KB"}, hr[w][6] >= hr[w][5]);
      chk({wname[w], " longer next-line bursts hit more"}, hr[w][7] < hr[w][1] && hr[w][1] <= hr[w][8]);
      chk({wname[w], " shorter stream pause moves more lines"},
          run_l2[w][9] > run_l2[w][10] && run_l2[w][10] > run_l2[w][2]);
      chk({wname[w], " software prefetch raises hit rate"}, hr[w][14] > hr[w][0]);
      chk({wname[w], " software plus next-line beats next-line"}, hr[w][15] >= hr[w][1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
