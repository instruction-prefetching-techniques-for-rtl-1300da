// Unit test of the multi-port data array: random line writes are visible on
// every read port from the next cycle; compared with a reference copy.
module tb_icache_data_array;
  localparam int NSETS = 32, ASSOC = 2, NRD = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0]   rd_set [NRD];
  logic [127:0] rd_line [NRD][ASSOC];
  logic wr_en = 0; logic [4:0] wr_set = 0; logic wr_way = 0; logic [127:0] wr_line = 0;

  icache_data_array #(.NSETS(NSETS), .ASSOC(ASSOC), .LINE_W(128), .NRD(NRD)) dut (
    .clk_i (clk), .rd_set_i (rd_set), .rd_line_o (rd_line),
    .wr_en_i (wr_en), .wr_set_i (wr_set), .wr_way_i (wr_way), .wr_line_i (wr_line));

  int checks = 0, failures = 0;
  logic [127:0] ref_line [NSETS][ASSOC];
  logic         ref_v    [NSETS][ASSOC];

  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int p = 0; p < NRD; p++) rd_set[p] = 0;
    for (int s = 0; s < NSETS; s++) for (int w = 0; w < ASSOC; w++) ref_v[s][w] = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      wr_en   = ($urandom % 2) == 0;
      wr_set  = 5'($urandom);
      wr_way  = 1'($urandom);
      wr_line = {$urandom, $urandom, $urandom, $urandom};
      for (int p = 0; p < NRD; p++) rd_set[p] = 5'($urandom);
      #1;
      for (int p = 0; p < NRD; p++)
        for (int w = 0; w < ASSOC; w++)
          if (ref_v[rd_set[p]][w]) chk("line", rd_line[p][w] == ref_line[rd_set[p]][w]);
      @(posedge clk);
      if (wr_en) begin
        ref_v[wr_set][wr_way]    = 1;
        ref_line[wr_set][wr_way] = wr_line;
      end
    end
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
