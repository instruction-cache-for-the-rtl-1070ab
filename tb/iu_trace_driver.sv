// iu_trace_driver - instruction-unit model for the cache testbenches.
//
// Issues N_REQ double-quad requests following a synthetic instruction
// trace and checks every returned quad against the memory content
// function. The trace is built from events drawn with fixed probabilities
// (in %): cache flush 1, sequence 34 (0-20 requests), small loop 10/7
// (0-20 requests, 0-10 iterations), large loop 10/3 (0-100 requests),
// near jump 10/15 (0-500 quads), far jump 5/10 (0-100000 quads), near call
// 10, far call 5 (followed by 0-50 requests, nesting up to 3), return 15;
// the first figure is trace A, the second trace B (TRACE_B = 1). Jumps go
// forward 9 times out of 10, calls 2 times out of 3. Consecutive requests
// differ by 2 quads. The driver waits GAP cycles between receiving the
// quads and the next request. With PID_SWITCH the process id changes now
// and then, so several processes share the cache. The trace comes from
// a seeded generator of its own, so equal SEED gives equal traces.
`timescale 1ns/1ps
module iu_trace_driver
  import icache_pkg::*;
#(
  parameter int N_REQ      = 5000,
  parameter bit TRACE_B    = 1'b0,
  parameter int GAP        = 1,
  parameter bit PID_SWITCH = 1'b1,
  parameter int unsigned SEED = 32'h1234_5678
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            req_valid,
  output logic [VA_W-1:0] req_addr,
  input  logic            req_ready,
  input  quad_t           rsp_quad0,
  input  quad_t           rsp_quad1,
  input  logic            rsp_rdy0,
  input  logic            rsp_rdy1,
  input  logic            rsp_err,
  output logic            flush_req,
  output logic            finished,
  output int              checks,
  output int              failures,
  output int              n_req,
  output int              n_flush,
  output longint          total_cycles
);

  function automatic quad_t expect_q(input logic [VA_W-1:0] va);
    return va[31:0] ^ {va[45:30], va[45:30]} ^ 32'h5A00_00A5;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Own xorshift generator, so that every driver with the same SEED and
  // trace produces the same request sequence, whatever else runs.
  int unsigned rs = SEED;
  function automatic int unsigned rnd(input int unsigned max);
    rs ^= rs << 13;
    rs ^= rs >> 17;
    rs ^= rs << 5;
    return rs % (max + 1);
  endfunction

  logic [29:0] pc;
  logic [15:0] pid;
  logic [29:0] stack [3];
  int          depth;

  task automatic request();
    logic [VA_W-1:0] va;
    int cycles;
    pc[29:24] = 6'h00;      // stay off the unavailable pages of the model
    va = {pid, pc};
    while (!req_ready) @(posedge clk);
    req_valid <= 1'b1;
    req_addr  <= va;
    @(posedge clk);
    req_valid <= 1'b0;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!(rsp_rdy0 && rsp_rdy1) && cycles < 1000);
    n_req++;
    total_cycles += cycles;
    check(!rsp_err && rsp_rdy0 && rsp_rdy1, "request completed");
    check(rsp_quad0 == expect_q(va), $sformatf("quad0 of %h", va));
    check(rsp_quad1 == expect_q(va + 1), $sformatf("quad1 of %h", va));
    repeat (GAP) @(posedge clk);
  endtask

  task automatic seq(input int n);
    for (int i = 0; i < n; i++) begin
      request();
      pc = pc + 30'd2;
    end
  endtask

  task automatic trace_event();
    int r, len, cnt;
    int lim [8];
    logic [29:0] start;
    // cumulative limits: flush, sequence, small loop, large loop, near jump,
    // far jump, near call, far call; the rest is return
    lim = TRACE_B ? '{1, 35, 42, 45, 60, 70, 80, 85} : '{1, 35, 45, 55, 65, 70, 80, 85};
    r = rnd(99);
    if (r < lim[0]) begin
      while (!req_ready) @(posedge clk);
      flush_req <= 1'b1;
      @(posedge clk);
      flush_req <= 1'b0;
      @(posedge clk);
      n_flush++;
      if (PID_SWITCH) pid = pid + 16'd1;
    end else if (r < lim[1]) begin
      seq(rnd(20));
    end else if (r < lim[3]) begin
      len   = (r < lim[2]) ? rnd(20) : rnd(100);
      cnt   = rnd(10);
      start = pc;
      for (int k = 0; k < cnt; k++) begin
        pc = start;
        seq(len);
      end
    end else if (r < lim[5]) begin
      len = (r < lim[4]) ? rnd(500) : rnd(100000);
      if (rnd(9) == 0) pc = pc - 30'(len); else pc = pc + 30'(len);
    end else if (r < lim[7]) begin
      if (depth < 3) begin
        stack[depth] = pc;
        depth++;
      end
      len = (r < lim[6]) ? rnd(500) : rnd(100000);
      if (rnd(2) == 0) pc = pc - 30'(len); else pc = pc + 30'(len);
      seq(rnd(50));
    end else if (depth > 0) begin
      depth--;
      pc = stack[depth];
    end
  endtask

  initial begin
    req_valid = 1'b0; req_addr = '0; flush_req = 1'b0; finished = 1'b0;
    checks = 0; failures = 0; n_req = 0; n_flush = 0; total_cycles = 0;
    pc = 30'h0000_2000; pid = 16'h0000; depth = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    repeat (2) @(posedge clk);
    while (n_req < N_REQ) trace_event();
    finished = 1'b1;
  end

endmodule
