// Unit test of the multi-port tag array: reset clears all valid bits,
// written tags appear on every read port from the next cycle with their
// valid bit set, and unwritten ways stay invalid; the count of valid lines
// follows the writes. Random writes are checked against a reference copy
// kept in the testbench.
module tb_icache_tag_array;
  localparam int NSETS = 32, ASSOC = 2, TAG_W = 23, NRD = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0]       rd_set [NRD];
  logic [TAG_W-1:0] rd_tag [NRD][ASSOC];
  logic [ASSOC-1:0] rd_valid [NRD];
  logic [6:0] nvalid;
  logic wr_en = 0; logic [4:0] wr_set = 0; logic wr_way = 0; logic [TAG_W-1:0] wr_tag = 0;

  icache_tag_array #(.NSETS(NSETS), .ASSOC(ASSOC), .TAG_W(TAG_W), .NRD(NRD)) dut (
    .clk_i (clk), .rst_ni (rst_n), .rd_set_i (rd_set), .rd_tag_o (rd_tag), .rd_valid_o (rd_valid),
    .wr_en_i (wr_en), .wr_set_i (wr_set), .wr_way_i (wr_way), .wr_tag_i (wr_tag),
    .nvalid_o (nvalid));

  int checks = 0, failures = 0;
  logic [TAG_W-1:0] ref_tag [NSETS][ASSOC];
  logic             ref_v   [NSETS][ASSOC];

  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int p = 0; p < NRD; p++) rd_set[p] = 0;
    for (int s = 0; s < NSETS; s++) for (int w = 0; w < ASSOC; w++) ref_v[s][w] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NSETS; s++) begin
      rd_set[s % NRD] = 5'(s);
      #1 chk($sformatf("set %0d invalid after reset", s), rd_valid[s % NRD] == '0);
    end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      wr_en  = ($urandom % 2) == 0;
      wr_set = 5'($urandom);
      wr_way = 1'($urandom);
      wr_tag = TAG_W'($urandom);
      for (int p = 0; p < NRD; p++) rd_set[p] = 5'($urandom);
      #1;
      for (int p = 0; p < NRD; p++)
        for (int w = 0; w < ASSOC; w++) begin
          chk("valid", rd_valid[p][w] == ref_v[rd_set[p]][w]);
          if (ref_v[rd_set[p]][w]) chk("tag", rd_tag[p][w] == ref_tag[rd_set[p]][w]);
        end
      begin
        int n;
        n = 0;
        for (int s = 0; s < NSETS; s++) for (int w = 0; w < ASSOC; w++) n += int'(ref_v[s][w]);
        chk($sformatf("valid line count %0d (expected %0d)", nvalid, n), int'(nvalid) == n);
      end
      @(posedge clk);
      if (wr_en) begin
        ref_v[wr_set][wr_way]   = 1;
        ref_tag[wr_set][wr_way] = wr_tag;
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
