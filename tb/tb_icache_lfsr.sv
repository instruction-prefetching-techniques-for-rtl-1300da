// Unit test of the replacement LFSR: its sequence matches an independently
// written Fibonacci-equivalent step of the same polynomial, it never reaches
// zero, it has the maximal period 65535 and both victim ways (bit 0) appear
// about equally often.
module tb_icache_lfsr;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] rnd;
  icache_lfsr dut (.clk_i (clk), .rst_ni (rst_n), .rnd_o (rnd));

  int checks = 0, failures = 0;
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [15:0] model, first;
  int ones = 0, period = 0;
  initial begin
    repeat (2) @(negedge clk);
    chk("seed", rnd == 16'hACE1);
    rst_n = 1;
    model = 16'hACE1;
    first = rnd;
    for (int i = 1; i <= 65535; i++) begin
      @(negedge clk);
      // Galois step written bit by bit: shift right, feedback bit into taps 15,13,12,10
      begin
        logic fb; logic [15:0] n;
        fb = model[0];
        n  = {1'b0, model[15:1]};
        n[15] = n[15] ^ fb; n[13] = n[13] ^ fb; n[12] = n[12] ^ fb; n[10] = n[10] ^ fb;
        model = n;
      end
      if (i < 300 || i % 1000 == 0) chk("sequence", rnd == model);
      if (rnd == 16'h0) chk("never zero", 1'b0);
      ones += int'(rnd[0]);
      if (period == 0 && rnd == first) period = i;
    end
    chk($sformatf("period %0d", period), period == 65535);
    chk("balanced way choice", ones > 32000 && ones < 33600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
