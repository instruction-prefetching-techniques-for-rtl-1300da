// Unit test of victim selection, exhaustive over valid bits, LRU bit and the
// low random bits, for the pseudo-LRU two-way and pseudo-random four-way
// configurations: a free way is always chosen first (the lowest one), a
// full set gives the LRU way or the random number modulo the ways.
module tb_icache_victim_sel;
  import icache_pkg::*;
  logic [1:0]  v2; logic lru; logic [15:0] rnd; logic [0:0] vic2;
  logic [3:0]  v4; logic [1:0] vic4;

  icache_victim_sel #(.ASSOC(2), .REPL(REPL_PLRU))  u2 (.valid_i (v2), .lru_way_i (lru), .rnd_i (rnd), .victim_o (vic2));
  icache_victim_sel #(.ASSOC(4), .REPL(REPL_PRAND)) u4 (.valid_i (v4), .lru_way_i (lru), .rnd_i (rnd), .victim_o (vic4));

  int checks = 0, failures = 0;
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int v = 0; v < 16; v++)
      for (int l = 0; l < 2; l++)
        for (int r = 0; r < 8; r++) begin
          int exp2, exp4;
          v2 = 2'(v); v4 = 4'(v); lru = 1'(l); rnd = 16'(r * 4099 + r);
          #1;
          exp2 = (v2 == 2'b11) ? l : (v2[0] ? 1 : 0);
          exp4 = int'(rnd[1:0]);
          for (int w = 3; w >= 0; w--) if (!v4[w]) exp4 = w;
          chk("2-way PLRU", int'(vic2) == exp2);
          chk("4-way PRAND", int'(vic4) == exp4);
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
