// Unit test of the statistics counters.
//
// Drives random per-core fetch activity (requests, grants, responses, hit
// and miss flags), random L2 refill requests, a random valid-line count and
// random start and stop commands, and keeps its own copy of every counter.
// Each cycle one random statistic is read and compared with that copy; after
// a stop every statistic is read and compared, and the counters must stay
// frozen while no gathering runs. The access-time copy follows the rule: a
// cycle counts for a core when it requests, or when its accepted fetch has
// not yet been answered.
module tb_icache_stats;
  import icache_pkg::*;

  localparam int unsigned NC = 4;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, stop = 0;
  logic        freq [NC], fgnt [NC], frv [NC], hit [NC], miss [NC];
  logic        l2f = 0, l2pf = 0;
  logic [6:0]  nvalid = 0;
  logic [4:0]  sel = 0;
  logic [31:0] val;

  icache_stats #(.NB_CORES (NC), .CNT_W (7)) dut (
    .clk_i (clk), .rst_ni (rst_n),
    .start_i (start), .stop_i (stop),
    .fetch_req_i (freq), .fetch_gnt_i (fgnt), .fetch_rvalid_i (frv),
    .hit_i (hit), .miss_i (miss),
    .l2_fire_i (l2f), .l2_pf_i (l2pf), .nvalid_i (nvalid),
    .sel_i (sel), .val_o (val)
  );

  int checks = 0, failures = 0;
  task automatic chk(string s, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", s);
    end
  endtask

  // reference copy
  logic        r_act;
  int unsigned r_cyc, r_l2, r_l2pf, r_used;
  int unsigned r_acc [NC], r_hit [NC], r_mat [NC];
  logic        r_out [NC];

  function automatic int unsigned ref_val(int unsigned i);
    if (i == STAT_CYCLES)   return r_cyc;
    if (i == STAT_L2_LINES) return r_l2;
    if (i == STAT_L2_PF)    return r_l2pf;
    if (i == STAT_USED)     return r_used;
    if (i == STAT_ACTIVE)   return 32'(r_act);
    for (int c = 0; c < NC; c++) begin
      if (i == STAT_CORE0 + 3 * c)     return r_acc[c];
      if (i == STAT_CORE0 + 3 * c + 1) return r_hit[c];
      if (i == STAT_CORE0 + 3 * c + 2) return r_mat[c];
    end
    return 0;
  endfunction

  // apply one clock edge of the reference
  task automatic ref_step();
    for (int c = 0; c < NC; c++) begin
      if (r_act && !start && !stop) begin
        if (freq[c] || (r_out[c] && !frv[c])) r_mat[c]++;
        if (hit[c] || miss[c]) r_acc[c]++;
        if (hit[c]) r_hit[c]++;
      end
      if (freq[c] && fgnt[c]) r_out[c] = 1'b1;
      else if (frv[c])        r_out[c] = 1'b0;
    end
    if (start) begin
      r_act = 1'b1;
      r_cyc = 0; r_l2 = 0; r_l2pf = 0; r_used = 0;
      for (int c = 0; c < NC; c++) begin
        r_acc[c] = 0; r_hit[c] = 0; r_mat[c] = 0;
      end
    end else if (stop) begin
      if (r_act) r_used = 16 * int'(nvalid);
      r_act = 1'b0;
    end else if (r_act) begin
      r_cyc++;
      if (l2f) r_l2++;
      if (l2f && l2pf) r_l2pf++;
    end
  endtask

  initial begin
    int unsigned n_start, n_stop, n_frozen;
    int unsigned snap [32];
    r_act = 0; r_cyc = 0; r_l2 = 0; r_l2pf = 0; r_used = 0;
    n_start = 0; n_stop = 0; n_frozen = 0;
    for (int c = 0; c < NC; c++) begin
      freq[c] = 0; fgnt[c] = 0; frv[c] = 0; hit[c] = 0; miss[c] = 0;
      r_acc[c] = 0; r_hit[c] = 0; r_mat[c] = 0; r_out[c] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      sel = 5'(i);
      #1 chk($sformatf("statistic %0d zero after reset", i), val == 0);
    end
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      start = ($urandom % 400) == 0;
      stop  = !start && (($urandom % 250) == 0);
      for (int c = 0; c < NC; c++) begin
        freq[c] = ($urandom % 3) == 0;
        fgnt[c] = ($urandom % 4) != 0;
        frv[c]  = ($urandom % 3) == 0;
        hit[c]  = ($urandom % 3) == 0;
        miss[c] = !hit[c] && (($urandom % 4) == 0);
      end
      l2f    = ($urandom % 4) == 0;
      l2pf   = ($urandom % 2) == 0;
      nvalid = 7'($urandom % 65);
      sel    = 5'($urandom);
      #1 chk($sformatf("statistic %0d = %0d (expected %0d)", sel, val, ref_val(int'(sel))),
             val == ref_val(int'(sel)));
      if (stop) n_stop++;
      if (start) n_start++;
      @(posedge clk);
      ref_step();
      if (stop) begin
        // after a stop every statistic matches, and stays frozen
        @(negedge clk);
        start = 0; stop = 0;
        for (int i = 0; i < 32; i++) begin
          sel = 5'(i);
          #1 chk($sformatf("after stop statistic %0d", i), val == ref_val(i));
          snap[i] = val;
        end
        repeat (5) begin
          @(posedge clk);
          ref_step();
        end
        @(negedge clk);
        for (int i = 0; i < 32; i++) begin
          sel = 5'(i);
          #1 chk($sformatf("frozen statistic %0d", i), val == snap[i]);
        end
        n_frozen++;
      end
    end
    chk("start and stop both happened", n_start > 2 && n_frozen > 2);
    $display("starts %0d stops %0d frozen checks %0d", n_start, n_stop, n_frozen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
