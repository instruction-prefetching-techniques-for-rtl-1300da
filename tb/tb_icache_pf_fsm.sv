// Unit test of the prefetch state machine. The granted sub-request addresses
// and their cycles are logged and compared with sequences worked out from the
// described behaviour:
//  * a 64-byte software burst gives four 16-byte sub-requests two cycles apart;
//  * a miss in next-line mode gives hw_size/16 sub-requests from miss + 16;
//  * zero sizes and the off mode start nothing;
//  * a miss during a software burst preempts it from the CHECK state, and an
//    event during a held REQ lets that sub-request finish first;
//  * stream mode restarts after the burst from last + 16 with a gap of
//    wait + 2 cycles between grants, and a software request preempts WAIT.
// A random phase then drives random software requests, misses, modes, sizes,
// wait times and grant stalls, and compares every cycle the request, its
// address, the state and the start/preempt flags with a reference model of
// that behaviour kept in this testbench.
module tb_icache_pf_fsm;
  import icache_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic sw_req = 0; logic [31:0] sw_addr = 0, sw_size = 0;
  hwpf_mode_e mode = HWPF_OFF; logic [31:0] hw_size = 0; logic [15:0] hw_wait = 0;
  logic miss_v = 0; logic [31:0] miss_a = 0;
  logic pf_req; logic [31:0] pf_addr; logic allow = 1; pf_state_e st;
  logic s_sw, s_miss, s_stream, s_pre;

  icache_pf_fsm dut (
    .clk_i (clk), .rst_ni (rst_n),
    .sw_req_i (sw_req), .sw_addr_i (sw_addr), .sw_size_i (sw_size),
    .hw_mode_i (mode), .hw_size_i (hw_size), .hw_wait_i (hw_wait),
    .miss_valid_i (miss_v), .miss_addr_i (miss_a),
    .pf_req_o (pf_req), .pf_addr_o (pf_addr), .pf_gnt_i (pf_req && allow),
    .state_o (st), .start_sw_o (s_sw), .start_miss_o (s_miss), .start_stream_o (s_stream), .preempt_o (s_pre));

  int checks = 0, failures = 0;
  task automatic chk(string s, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  longint unsigned cycle = 0;
  logic [31:0] ga[$]; longint unsigned gt[$];
  int n_pre = 0, n_stream = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && pf_req && allow) begin ga.push_back(pf_addr); gt.push_back(cycle); end
    if (rst_n) begin n_pre += int'(s_pre); n_stream += int'(s_stream); end
  end

  task automatic pulse_sw(logic [31:0] a, logic [31:0] s);
    @(negedge clk); sw_req = 1; sw_addr = a; sw_size = s;
    @(negedge clk); sw_req = 0;
  endtask
  task automatic pulse_miss(logic [31:0] a);
    @(negedge clk); miss_v = 1; miss_a = a;
    @(negedge clk); miss_v = 0;
  endtask
  task automatic clear(); ga.delete(); gt.delete(); endtask


  // reference model of the described behaviour, for the random phase
  pf_state_e   m_st;
  logic [31:0] m_addr, m_size, m_paddr, m_psize;
  logic [15:0] m_wait;
  logic        m_pend, m_psw;

  // evaluate one cycle with the present inputs; checks the outputs and flags,
  // then (at the clock edge) applies the next state
  task automatic ref_cycle();
    logic on, esw, ev; logic [31:0] ea, es;
    pf_state_e nst; logic [31:0] na, ns; logic [15:0] nw;
    logic np, npsw; logic [31:0] npa, nps;
    logic f_sw, f_miss, f_str, f_pre;
    on  = mode != HWPF_OFF && hw_size != 0;
    esw = sw_req && sw_size != 0;
    ev  = esw || (miss_v && on);
    ea  = esw ? sw_addr : miss_a + 16;
    es  = esw ? sw_size : hw_size;
    nst = m_st; na = m_addr; ns = m_size; nw = m_wait;
    np = m_pend; npsw = m_psw; npa = m_paddr; nps = m_psize;
    f_sw = 0; f_miss = 0; f_str = 0; f_pre = 0;
    case (m_st)
      PF_IDLE: if (ev) begin
        na = ea; ns = es; nst = PF_REQ; f_sw = esw; f_miss = !esw;
      end
      PF_REQ: begin
        if (ev) begin np = 1; npsw = esw; npa = ea; nps = es; end
        if (allow) nst = PF_CHECK;
      end
      PF_CHECK: begin
        if (ev || m_pend) begin
          // a newer event wins over the latched one
          na = ev ? ea : m_paddr; ns = ev ? es : m_psize;
          f_sw = ev ? esw : m_psw; f_miss = !f_sw;
          f_pre = m_size > 16 || mode == HWPF_STREAM;
          np = 0; nst = PF_REQ;
        end else if (m_size > 16) begin
          ns = m_size - 16; na = m_addr + 16; nst = PF_REQ;
        end else if (mode == HWPF_STREAM && on) begin
          nw = hw_wait; nst = PF_WAIT;
        end else nst = PF_IDLE;
      end
      default: begin
        if (ev) begin
          na = ea; ns = es; f_sw = esw; f_miss = !esw; f_pre = 1; nst = PF_REQ;
        end else if (mode != HWPF_STREAM || !on) nst = PF_IDLE;
        else if (m_wait <= 1) begin
          na = m_addr + 16; ns = hw_size; f_str = 1; nst = PF_REQ;
        end else nw = m_wait - 1;
      end
    endcase
    chk($sformatf("random: state %0d (expected %0d)", st, m_st), st == m_st);
    chk("random: request", pf_req == (m_st == PF_REQ));
    if (m_st == PF_REQ) chk($sformatf("random: address %h (expected %h)", pf_addr, m_addr), pf_addr == m_addr);
    chk("random: start/preempt flags",
        {s_sw, s_miss, s_stream, s_pre} == {f_sw, f_miss, f_str, f_pre});
    @(posedge clk);
    m_st = nst; m_addr = na; m_size = ns; m_wait = nw;
    m_pend = np; m_psw = npsw; m_paddr = npa; m_psize = nps;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;

    // software burst of 64 bytes
    clear();
    pulse_sw(32'h1C00_0290, 64);
    repeat (12) @(negedge clk);
    chk("sw burst: 4 sub-requests", ga.size() == 4);
    for (int i = 0; i < 4 && i < ga.size(); i++) chk("sw burst address", ga[i] == 32'h1C00_0290 + 32'(16 * i));
    for (int i = 1; i < 4 && i < gt.size(); i++) chk("one sub-request per 2 cycles", gt[i] - gt[i-1] == 2);
    chk("back to idle", st == PF_IDLE);

    // misses ignored when the hardware prefetcher is off; size 0 ignored
    clear();
    hw_size = 48;
    pulse_miss(32'h1C00_1000);
    pulse_sw(32'h1C00_2000, 0);
    repeat (6) @(negedge clk);
    chk("nothing started", ga.size() == 0);

    // next-line burst
    clear();
    mode = HWPF_NEXTLINE;
    pulse_miss(32'h1C00_1000);
    repeat (12) @(negedge clk);
    chk("next-line: 3 sub-requests", ga.size() == 3);
    for (int i = 0; i < 3 && i < ga.size(); i++) chk("next-line address", ga[i] == 32'h1C00_1010 + 32'(16 * i));
    chk("idle after next-line", st == PF_IDLE);

    // preemption of a software burst by a miss
    clear();
    pulse_sw(32'h1C00_4000, 256);
    repeat (3) @(negedge clk);
    pulse_miss(32'h1C00_8000);
    repeat (16) @(negedge clk);
    begin
      int k; k = -1;
      for (int i = 0; i < ga.size(); i++) if (k < 0 && ga[i] == 32'h1C00_8010) k = i;
      chk("preempting burst started", k > 0);
      chk("preempted burst cut short", k > 0 && k < 6 && ga[k-1] < 32'h1C00_4100);
      chk("preempting burst complete", k >= 0 && ga.size() == k + 3);
    end
    chk("preempt flagged", n_pre > 0);

    // event while REQ is held: current sub-request finishes first
    clear();
    allow = 0;
    pulse_sw(32'h1C00_A000, 64);
    pulse_miss(32'h1C00_B000);
    repeat (2) @(negedge clk);
    allow = 1;
    repeat (14) @(negedge clk);
    chk("held sub-request completed", ga.size() == 4 && ga[0] == 32'h1C00_A000);
    chk("then latched miss served", ga.size() == 4 && ga[1] == 32'h1C00_B010 && ga[3] == 32'h1C00_B030);

    // stream prefetch
    clear();
    mode = HWPF_STREAM; hw_size = 32; hw_wait = 10;
    pulse_miss(32'h1C00_C000);
    repeat (40) @(negedge clk);
    chk("stream restarted", n_stream >= 2 && ga.size() >= 6);
    for (int i = 0; i < 6 && i < ga.size(); i++) chk("stream address", ga[i] == 32'h1C00_C010 + 32'(16 * i));
    if (gt.size() >= 3) chk($sformatf("stream gap %0d == wait + 2", gt[2] - gt[1]), gt[2] - gt[1] == 12);
    // software request preempts WAIT
    while (st != PF_WAIT) @(negedge clk);
    clear();
    pulse_sw(32'h1C00_F000, 16);
    repeat (3) @(negedge clk);
    chk("software request served from WAIT", ga.size() >= 1 && ga[0] == 32'h1C00_F000);
    mode = HWPF_OFF;
    repeat (30) @(negedge clk);
    chk("stream stops when switched off", st == PF_IDLE);

    // random phase against the reference model
    while (st != PF_IDLE) @(negedge clk);
    m_st = PF_IDLE; m_addr = 0; m_size = 0; m_wait = 0;
    m_pend = 0; m_psw = 0; m_paddr = 0; m_psize = 0;
    begin
      int n_ev; n_ev = 0;
      for (int cyc = 0; cyc < 4000; cyc++) begin
        @(negedge clk);
        if (($urandom % 300) == 0) mode = hwpf_mode_e'($urandom % 3);
        if (($urandom % 200) == 0) hw_size = 32'(16 * ($urandom % 9));
        if (($urandom % 200) == 0) hw_wait = 16'($urandom % 25);
        sw_req  = ($urandom % 40) == 0;
        sw_addr = $urandom & 32'hFFFF_FFF0;
        sw_size = 32'(16 * ($urandom % 10));
        miss_v  = ($urandom % 12) == 0;
        miss_a  = $urandom & 32'hFFFF_FFF0;
        allow   = ($urandom % 4) != 0;
        n_ev += int'(sw_req || miss_v);
        #1 ref_cycle();
      end
      sw_req = 0; miss_v = 0; allow = 1;
      chk("random phase saw events", n_ev > 200);
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
