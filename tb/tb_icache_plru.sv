// Unit test of the pseudo-LRU bits: random access patterns on five ports;
// after every cycle each set's LRU way must equal the rule "any access to
// way 0 makes way 1 LRU, else any access to way 1 makes way 0 LRU, else
// unchanged", evaluated in the testbench.
module tb_icache_plru;
  localparam int NSETS = 32, NACC = 5, NQ = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic       acc_valid [NACC];
  logic [4:0] acc_set   [NACC];
  logic       acc_way   [NACC];
  logic [4:0] q_set     [NQ];
  logic       q_lru     [NQ];

  icache_plru #(.NSETS(NSETS), .NACC(NACC), .NQ(NQ)) dut (
    .clk_i (clk), .rst_ni (rst_n), .acc_valid_i (acc_valid), .acc_set_i (acc_set),
    .acc_way_i (acc_way), .q_set_i (q_set), .q_lru_way_o (q_lru));

  int checks = 0, failures = 0;
  logic ref_lru [NSETS];
  int   n_mixed = 0;

  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int p = 0; p < NACC; p++) begin acc_valid[p] = 0; acc_set[p] = 0; acc_way[p] = 0; end
    for (int q = 0; q < NQ; q++) q_set[q] = 0;
    for (int s = 0; s < NSETS; s++) ref_lru[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // mostly few sets so that several ports collide on one set
      for (int p = 0; p < NACC; p++) begin
        acc_valid[p] = ($urandom % 3) != 0;
        acc_set[p]   = 5'($urandom % 4);
        acc_way[p]   = 1'($urandom);
      end
      for (int q = 0; q < NQ; q++) q_set[q] = 5'($urandom % 6);
      #1;
      for (int q = 0; q < NQ; q++) chk("lru query", q_lru[q] == ref_lru[q_set[q]]);
      begin
        logic a0 [NSETS]; logic a1 [NSETS];
        for (int s = 0; s < NSETS; s++) begin a0[s] = 0; a1[s] = 0; end
        for (int p = 0; p < NACC; p++) if (acc_valid[p]) begin
          if (acc_way[p]) a1[acc_set[p]] = 1; else a0[acc_set[p]] = 1;
        end
        for (int s = 0; s < NSETS; s++) begin
          if (a0[s] && a1[s]) n_mixed++;
          if (a0[s]) ref_lru[s] = 1; else if (a1[s]) ref_lru[s] = 0;
        end
      end
    end
    chk("conflicting accesses exercised", n_mixed > 0);
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
