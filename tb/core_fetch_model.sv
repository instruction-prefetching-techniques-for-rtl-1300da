// Instruction fetch model of one single-issue core running a synthetic
// program (testbench only, not synthesizable).
//
// The core fetches one 16-byte line at a time through the cache's
// request/grant port, waits for the response, checks the returned line
// against the known memory contents, "executes" the line's four 32-bit
// instructions so that a hit costs EXEC cycles per line, and then fetches
// the next line of its program.
// Two programs are generated from their structure, not stored:
//  * WORKLOAD 0, single loop: a loop body of 800 straight-line instructions
//    (200 lines) at BASE, run ITER times;
//  * WORKLOAD 1, main loop with four functions: a main loop of four lines,
//    each line calling one function whose body is a loop of 600 straight-line
//    instructions (150 lines) run FITER times; the main loop runs ITER times.
//    The functions lie one after the other behind the main loop.
// The two programs mirror the artificial benchmarks used to study the cache
// (loop and function sizes in instructions); one cycle per instruction, the
// function loop count and the code placement are this model's own choice.
//
// Outputs: call_o for one cycle, with call_addr_o, just before the core
// enters a function (or restarts the single loop), where a program would
// issue a software prefetch of it; done_o once the program has ended, the number of fetches and the
// number of wrong lines seen. Memory contents: the 32-bit word at byte
// address a is (a * 0x9E3779B1) ^ 0x5A5A0F0F, as in the L2 model.
module core_fetch_model #(
  parameter int unsigned WORKLOAD = 0,
  parameter logic [31:0] BASE     = 32'h0000_1000,
  parameter int unsigned ITER     = 3,
  parameter int unsigned FITER    = 2,
  parameter int unsigned EXEC     = 4,
  parameter int unsigned START    = 0
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  output logic         req_o,
  output logic [31:0]  addr_o,
  input  logic         gnt_i,
  input  logic         rvalid_i,
  input  logic [127:0] rdata_i,
  output logic         call_o,
  output logic [31:0]  call_addr_o,
  output logic         done_o,
  output int unsigned  fetches_o,
  output int unsigned  errors_o
);

  localparam int unsigned LOOP_LINES = 800 * 4 / 16;  // single loop
  localparam int unsigned FUNC_LINES = 600 * 4 / 16;  // one function body
  localparam int unsigned MAIN_LINES = 4;             // main loop, one call each
  localparam logic [31:0] FUNC_BASE  = BASE + 32'h100;

  function automatic logic [31:0] word_at(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [127:0] line_at(logic [31:0] a);
    logic [31:0] b;
    b = {a[31:4], 4'h0};
    return {word_at(b + 12), word_at(b + 8), word_at(b + 4), word_at(b)};
  endfunction

  // program position
  int unsigned iter, mline, fiter, fline;
  logic        in_func;

  function automatic logic [31:0] cur_addr();
    if (WORKLOAD == 0)
      return BASE + 32'(fline * 16);
    else if (!in_func)
      return BASE + 32'(mline * 16);
    else
      return FUNC_BASE + 32'(mline * FUNC_LINES * 16 + fline * 16);
  endfunction

  // advance to the next line of the program; returns 1 at the end
  function automatic logic advance();
    if (WORKLOAD == 0) begin
      if (fline == LOOP_LINES - 1) begin
        fline = 0;
        iter++;
        return iter == ITER;
      end
      fline++;
      return 1'b0;
    end
    if (!in_func) begin
      in_func = 1'b1;          // call the function of this main line
      fline   = 0;
      fiter   = 0;
      return 1'b0;
    end
    if (fline < FUNC_LINES - 1) begin
      fline++;
      return 1'b0;
    end
    fline = 0;
    fiter++;
    if (fiter < FITER) return 1'b0;
    in_func = 1'b0;            // return to the next main line
    if (mline == MAIN_LINES - 1) begin
      mline = 0;
      iter++;
      return iter == ITER;
    end
    mline++;
    return 1'b0;
  endfunction

  initial begin
    logic [31:0] a;
    req_o     = 1'b0;
    addr_o    = '0;
    done_o    = 1'b0;
    call_o    = 1'b0;
    call_addr_o = '0;
    fetches_o = 0;
    errors_o  = 0;
    iter = 0; mline = 0; fiter = 0; fline = 0; in_func = 1'b0;
    @(posedge rst_ni);
    repeat (START + 2) @(posedge clk_i);
    forever begin
      a = cur_addr();
      @(negedge clk_i);
      req_o  = 1'b1;
      addr_o = a;
      #1;
      while (!gnt_i) begin
        @(negedge clk_i);
        #1;
      end
      @(negedge clk_i);          // granted at the clock edge in between
      req_o = 1'b0;
      #1;
      while (!rvalid_i) begin
        @(negedge clk_i);
        #1;
      end
      fetches_o++;
      if (rdata_i !== line_at(a)) begin
        errors_o++;
        $display("core at %h: wrong line %h", a, rdata_i);
      end
      repeat (EXEC - 2) @(negedge clk_i);
      if (advance()) break;
      // entering a function body (or restarting the loop): one-cycle call
      // pulse with the target address, where software would prefetch it
      if (fline == 0 && fiter == 0 && (WORKLOAD == 0 || in_func)) begin
        call_o      = 1'b1;
        call_addr_o = cur_addr();
        @(negedge clk_i);
        call_o      = 1'b0;
      end
    end
    done_o = 1'b1;
  end

endmodule
