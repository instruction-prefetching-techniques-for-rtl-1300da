// Unit test of the cache control registers: reset values, write and read
// back of every register, the one-cycle prefetch command pulse on a write of
// the address register (and on no other write), one-cycle read latency,
// the statistics start/stop pulses and reads through the statistics window.
// A random phase then issues back-to-back random reads and writes (known and
// unknown offsets, statistics window) and checks every cycle all outputs
// against a model of the register file.
module tb_icache_ctrl_regs;
  import icache_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic req = 0, we = 0; logic [7:0] a = 0; logic [31:0] wd = 0;
  logic gnt, rvalid; logic [31:0] rd;
  logic st_start, st_stop; logic [4:0] st_sel; logic [31:0] st_val;
  int n_start = 0, n_stop = 0;
  assign st_val = 32'hA500_0000 | 32'(st_sel);
  logic sw_req; logic [31:0] sw_addr, sw_size, hw_size; hwpf_mode_e hw_mode; logic [15:0] hw_wait;

  icache_ctrl_regs dut (
    .clk_i (clk), .rst_ni (rst_n),
    .reg_req_i (req), .reg_we_i (we), .reg_addr_i (a), .reg_wdata_i (wd),
    .reg_gnt_o (gnt), .reg_rvalid_o (rvalid), .reg_rdata_o (rd),
    .sw_pf_req_o (sw_req), .sw_pf_addr_o (sw_addr), .sw_pf_size_o (sw_size),
    .hw_mode_o (hw_mode), .hw_size_o (hw_size), .hw_wait_o (hw_wait),
    .stats_start_o (st_start), .stats_stop_o (st_stop), .stat_sel_o (st_sel), .stat_val_i (st_val));

  int checks = 0, failures = 0, n_pulse = 0;
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  always @(posedge clk) if (rst_n) n_pulse += int'(sw_req);
  always @(posedge clk) if (rst_n) n_start += int'(st_start);
  always @(posedge clk) if (rst_n) n_stop  += int'(st_stop);

  task automatic wr(logic [7:0] o, logic [31:0] v);
    @(negedge clk); req = 1; we = 1; a = o; wd = v;
    #1 chk("grant", gnt);
    @(negedge clk); req = 0; we = 0;
    chk("write response", rvalid);
  endtask
  task automatic rdreg(logic [7:0] o, output logic [31:0] v);
    @(negedge clk); req = 1; we = 0; a = o;
    @(negedge clk); req = 0;
    chk("read response after one cycle", rvalid);
    v = rd;
  endtask

  logic [31:0] v;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk("reset values", sw_size == 16 && hw_mode == HWPF_STREAM && hw_size == 256 && hw_wait == 60 && !sw_req);
    wr(REG_PF_SIZE, 32'd64);
    chk("no pulse on size write", n_pulse == 0);
    chk("size out", sw_size == 64);
    wr(REG_PF_ADDR, 32'h1C00_0290);
    chk("command pulse", sw_req && sw_addr == 32'h1C00_0290 && sw_size == 64);
    @(negedge clk);
    chk("pulse lasts one cycle", !sw_req && n_pulse == 1);
    wr(REG_HWPF_MODE, 32'd1); chk("mode nextline", hw_mode == HWPF_NEXTLINE);
    wr(REG_HWPF_SIZE, 32'd128); chk("hw size", hw_size == 128);
    wr(REG_HWPF_WAIT, 32'd50); chk("hw wait", hw_wait == 50);
    rdreg(REG_PF_ADDR, v);   chk("read addr", v == 32'h1C00_0290);
    rdreg(REG_PF_SIZE, v);   chk("read size", v == 64);
    rdreg(REG_HWPF_MODE, v); chk("read mode", v == 1);
    rdreg(REG_HWPF_SIZE, v); chk("read hw size", v == 128);
    rdreg(REG_HWPF_WAIT, v); chk("read wait", v == 50);
    rdreg(8'h44, v);         chk("unknown reads zero", v == 0);
    chk("reads give no pulse", n_pulse == 1);
    chk("no statistics pulse yet", n_start == 0 && n_stop == 0);
    wr(REG_STATS_START, 32'd1);
    chk("start pulse", st_start && !st_stop);
    @(negedge clk);
    chk("start pulse lasts one cycle", !st_start && n_start == 1);
    wr(REG_STATS_STOP, 32'd1);
    chk("stop pulse", st_stop && !st_start);
    @(negedge clk);
    chk("stop pulse lasts one cycle", !st_stop && n_stop == 1 && n_start == 1);
    rdreg(8'h80, v); chk("statistic 0", v == 32'hA500_0000);
    rdreg(8'h9C, v); chk("statistic 7", v == 32'hA500_0007);
    rdreg(8'hFC, v); chk("statistic 31", v == 32'hA500_001F);
    chk("no prefetch pulse from statistics", n_pulse == 1);

    // random back-to-back accesses against a model of the registers
    begin
      logic [31:0] m_addr, m_size, m_hsize, x_rdata;
      hwpf_mode_e  m_mode;
      logic [15:0] m_wait;
      logic        x_rvalid, x_pf, x_start, x_stop;
      logic [7:0]  offs [8];
      offs = '{REG_PF_ADDR, REG_PF_SIZE, REG_HWPF_MODE, REG_HWPF_SIZE,
               REG_HWPF_WAIT, REG_STATS_START, REG_STATS_STOP, 8'h80};
      m_addr = sw_addr; m_size = sw_size; m_mode = hw_mode; m_hsize = hw_size; m_wait = hw_wait;
      x_rvalid = 0; x_rdata = 0; x_pf = 0; x_start = 0; x_stop = 0;
      for (int cyc = 0; cyc < 3000; cyc++) begin
        @(negedge clk);
        chk("random: response valid", rvalid == x_rvalid);
        chk($sformatf("random: read data %h (expected %h)", rd, x_rdata), rd == x_rdata);
        chk("random: command pulses", {sw_req, st_start, st_stop} == {x_pf, x_start, x_stop});
        chk("random: register outputs", sw_addr == m_addr && sw_size == m_size &&
            hw_mode == m_mode && hw_size == m_hsize && hw_wait == m_wait);
        req = ($urandom % 3) != 0;
        we  = ($urandom % 2) == 1;
        a   = ($urandom % 4 == 0) ? 8'($urandom) : offs[$urandom % 8];
        if (a == 8'h80) a = 8'h80 | 8'(($urandom % 32) << 2);
        wd  = $urandom;
        if (($urandom % 2) == 1) wd = wd % 300;
        #1 chk("random: grant", gnt);
        x_rvalid = req;
        x_pf     = req && we && a == REG_PF_ADDR;
        x_start  = req && we && a == REG_STATS_START;
        x_stop   = req && we && a == REG_STATS_STOP;
        x_rdata  = 0;
        if (req && !we) begin
          if (a >= 8'h80)              x_rdata = 32'hA500_0000 | 32'(a[6:2]);
          else if (a == REG_PF_ADDR)   x_rdata = m_addr;
          else if (a == REG_PF_SIZE)   x_rdata = m_size;
          else if (a == REG_HWPF_MODE) x_rdata = 32'(m_mode);
          else if (a == REG_HWPF_SIZE) x_rdata = m_hsize;
          else if (a == REG_HWPF_WAIT) x_rdata = 32'(m_wait);
        end
        if (req && we) begin
          if (a == REG_PF_ADDR)   m_addr  = wd;
          if (a == REG_PF_SIZE)   m_size  = wd;
          if (a == REG_HWPF_MODE) m_mode  = (wd[1:0] == 2'd3) ? HWPF_OFF : hwpf_mode_e'(wd[1:0]);
          if (a == REG_HWPF_SIZE) m_hsize = wd;
          if (a == REG_HWPF_WAIT) m_wait  = wd[15:0];
        end
      end
      @(negedge clk);
      req = 0; we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
