// Unit test of the miss interconnect: with random requests and back-pressure
// at most one input is granted per cycle, the output carries the granted
// payload, the prefetch port is granted only when no core requests, core
// grants follow round-robin order, and a core with a standing request is
// served within NB_CORES grants.
module tb_icache_miss_arb;
  import icache_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic cv [NC]; miss_req_t cr [NC]; logic crdy [NC];
  logic pv = 0; miss_req_t pr; logic prdy;
  logic ov; miss_req_t orq; logic ordy = 0;

  icache_miss_arb #(.NB_CORES(NC)) dut (
    .clk_i (clk), .rst_ni (rst_n),
    .core_valid_i (cv), .core_req_i (cr), .core_ready_o (crdy),
    .pf_valid_i (pv), .pf_req_i (pr), .pf_ready_o (prdy),
    .out_valid_o (ov), .out_req_o (orq), .out_ready_i (ordy));

  int checks = 0, failures = 0;
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  int last = NC - 1;   // last granted core (reset pointer is 0)
  int wait_cnt [NC];
  int n_pf = 0;
  logic granted [NC];

  initial begin
    for (int c = 0; c < NC; c++) begin cv[c] = 0; cr[c] = '0; wait_cnt[c] = 0; granted[c] = 0; end
    pr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        if (!cv[c] || granted[c]) begin   // new request after a grant
          cv[c] = ($urandom % 3) == 0;
          cr[c].line = 28'($urandom); cr[c].way = 3'(c); cr[c].pf = 0;
        end
      end
      pv = ($urandom % 2) == 0; pr.line = 28'($urandom); pr.pf = 1; pr.way = 0;
      ordy = ($urandom % 4) != 0;
      #1;
      begin
        int ng, g, expc; logic anyc;
        ng = 0; g = -1; anyc = 0; expc = -1;
        for (int c = 0; c < NC; c++) begin
          if (crdy[c]) begin ng++; g = c; end
          anyc |= cv[c];
        end
        for (int k = 1; k <= NC; k++) if (expc < 0 && cv[(last + k) % NC]) expc = (last + k) % NC;
        chk("output valid", ov == (anyc || pv));
        if (ordy && anyc) begin
          chk("one core granted", ng == 1 && !prdy);
          chk("round robin order", g == expc);
          chk("payload", orq == cr[g]);
          last = g;
        end else if (ordy && pv) begin
          chk("prefetch granted when cores idle", prdy && ng == 0 && orq == pr);
          n_pf++;
        end else begin
          chk("no grant", ng == 0 && !(prdy && pv));
        end
        for (int c = 0; c < NC; c++) begin
          if (cv[c] && !crdy[c] && ordy) wait_cnt[c]++;
          granted[c] = crdy[c];
          if (crdy[c]) begin
            chk("starvation bound", wait_cnt[c] < NC);
            wait_cnt[c] = 0;
          end
        end
      end
      @(posedge clk);
    end
    chk("prefetch port used", n_pf > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
