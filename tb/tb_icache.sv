// tb_icache - end-to-end test of the instruction cache at its default size
// (1024 quads, 2 ways, 32-quad blocks, 8-quad transfer blocks).
//
// An instruction-unit model issues double-quad requests and waits one
// cycle after the data before the next request. The memory side is the
// bus_mem_model with the timing of the cache study (cycle 100, latency
// 200, access 150 time units). Every delivered quad is compared with the
// memory's content function, which is computed here independently.
//
// Phase 1 is directed: it checks the cycle counts of a read buffer hit, a
// RAM hit and a wrap-around demand miss, a request that crosses transfer
// blocks, a "not available" page, a flush and a process switch.
// Phase 2 replays a synthetic instruction trace built from sequences,
// small and large loops, near and far jumps, calls and returns and cache
// flushes, with the event mix of the study's trace A, for 100000
// requests (the length of the study's traces).
// At the end every mechanism of the cache must have happened at least once.
`timescale 1ns/1ps
module tb_icache;
  import icache_pkg::*;

  localparam int N_TRACE = 100000;   // length of the study's traces

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            req_valid = 1'b0;
  logic [VA_W-1:0] req_addr = '0;
  logic            req_ready;
  quad_t           rsp_quad0, rsp_quad1;
  logic            rsp_rdy0, rsp_rdy1, rsp_err;
  logic            flush_req = 1'b0;
  logic            mem_req, mem_abort, mem_valid, mem_na;
  logic [VA_W-1:0] mem_addr;
  quad_t           mem_data;
  icache_events_t  events;
  int              bursts, quads_sent;

  icache dut (
    .clk, .rst_n, .req_valid, .req_addr, .req_ready, .rsp_quad0, .rsp_quad1,
    .rsp_rdy0, .rsp_rdy1, .rsp_err, .flush_req, .mem_req, .mem_addr, .mem_abort,
    .mem_valid, .mem_data, .mem_na, .events);

  bus_mem_model #(.TB_QUADS(8)) u_mem (
    .clk, .mem_req, .mem_addr, .mem_abort, .mem_valid, .mem_data, .mem_na,
    .bursts, .quads_sent);

  int checks = 0, failures = 0;
  int n_rb, n_ram, n_fb, n_miss, n_pf, n_stop, n_split, n_cross, n_coll, n_done,
      n_repl, n_wrap, n_err, n_flush, n_req;
  longint total_cycles;

  always @(posedge clk) if (rst_n) begin
    n_rb    += int'(events.rb_hit);
    n_ram   += int'(events.ram_hit);
    n_fb    += int'(events.fb_hit);
    n_miss  += int'(events.miss);
    n_pf    += int'(events.prefetch);
    n_stop  += int'(events.stop);
    n_split += int'(events.split_read);
    n_cross += int'(events.crossing);
    n_coll  += int'(events.collision);
    n_done  += int'(events.fetch_done);
    n_repl  += int'(events.replace);
    n_wrap  += int'(events.wrap);
  end

  // Expected memory content (same rule as the memory model, written here
  // independently of the cache).
  function automatic quad_t expect_q(input logic [VA_W-1:0] va);
    return va[31:0] ^ {va[45:30], va[45:30]} ^ 32'h5A00_00A5;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Issue one request and wait for both quads; returns the cycles from
  // acceptance until both ready signals are high.
  task automatic request(input logic [15:0] pid, input logic [29:0] qa,
                         output int cycles, input bit expect_err = 1'b0);
    logic [VA_W-1:0] va;
    va = {pid, qa};
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
    if (expect_err) begin
      check(rsp_err, "not-available request flagged");
    end else begin
      check(!rsp_err && rsp_rdy0 && rsp_rdy1, "request completed");
      check(rsp_quad0 == expect_q(va), $sformatf("quad0 of %h", va));
      check(rsp_quad1 == expect_q(va + 1), $sformatf("quad1 of %h", va));
    end
    if (rsp_err) n_err++;
    @(posedge clk);       // one cycle before the next request
  endtask

  task automatic do_flush();
    while (!req_ready) @(posedge clk);
    flush_req <= 1'b1;
    @(posedge clk);
    flush_req <= 1'b0;
    @(posedge clk);
    n_flush++;
  endtask

  // Synthetic trace generator state.
  logic [29:0] pc;
  logic [15:0] cur_pid;
  logic [29:0] stack [3];
  int          depth;

  task automatic seq(input int n);
    int c;
    for (int i = 0; i < n; i++) begin
      pc[29:24] = 6'h00;   // keep the trace off the unavailable pages
      request(cur_pid, pc, c);
      pc = pc + 30'd2;
    end
  endtask

  task automatic trace_event();
    int r, len, cnt, c;
    logic [29:0] start;
    r = $urandom_range(99);
    if (r < 1) begin
      do_flush();
    end else if (r < 35) begin
      seq($urandom_range(20));
    end else if (r < 55) begin
      len   = (r < 45) ? $urandom_range(20) : $urandom_range(100);
      cnt   = $urandom_range(10);
      start = pc;
      for (int k = 0; k < cnt; k++) begin
        pc = start;
        seq(len);
      end
    end else if (r < 70) begin
      len = (r < 65) ? $urandom_range(500) : $urandom_range(100000);
      if ($urandom_range(9) == 0) pc = pc - 30'(len); else pc = pc + 30'(len);
    end else if (r < 85) begin
      if (depth < 3) begin
        stack[depth] = pc;
        depth++;
      end
      len = (r < 80) ? $urandom_range(500) : $urandom_range(100000);
      if ($urandom_range(2) == 0) pc = pc - 30'(len); else pc = pc + 30'(len);
      seq($urandom_range(50));
    end else begin
      if (depth > 0) begin
        depth--;
        pc = stack[depth];
      end
    end
    pc[29:24] = 6'h00;   // keep the trace off the unavailable pages
  endtask

  initial begin
    int c, c_miss;
    n_rb = 0; n_ram = 0; n_fb = 0; n_miss = 0; n_pf = 0; n_stop = 0; n_split = 0;
    n_cross = 0; n_coll = 0; n_done = 0; n_repl = 0; n_wrap = 0; n_err = 0;
    n_flush = 0; n_req = 0; total_cycles = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // ---- directed part ----
    // Demand miss at quad 6 of a transfer block: with wrap-around the two
    // quads arrive first: latency + 2 accesses = 500 time units = 5 cycles,
    // plus one cycle to look up, one to pass the fetch buffer and one to
    // register the ready signals. Without wrap-around it would be 8 quads.
    request(16'h0001, 30'h0000_1006, c_miss);
    check(c_miss == 8, $sformatf("wrap-around miss served in %0d cycles", c_miss));
    check(n_wrap == 1, "demand fetch started mid transfer block");
    repeat (20) @(posedge clk);
    // Now in the RAM: RAM hit takes 3 cycles, then the read buffer 2.
    request(16'h0001, 30'h0000_1002, c);
    check(c == 3, $sformatf("RAM hit in %0d cycles", c));
    request(16'h0001, 30'h0000_1004, c);
    check(c == 2, $sformatf("read buffer hit in %0d cycles", c));
    // Same quad address under another process id is a different block.
    request(16'h0002, 30'h0000_1004, c);
    check(c > 3, "other process misses");
    repeat (20) @(posedge clk);
    // Crossing a transfer block boundary (quad 7 and quad 0 of the next).
    request(16'h0001, 30'h0000_1007, c);
    // Page not available.
    request(16'h0001, 30'h3F00_0010, c, 1'b1);
    check(rsp_err, "error reported");
    // Flush, then the block that was cached misses again.
    do_flush();
    n_miss = 0;
    request(16'h0001, 30'h0000_1002, c);
    check(n_miss == 1, "miss after flush");

    // ---- trace part ----
    pc = 30'h0000_4000; cur_pid = 16'h0000; depth = 0;
    while (n_req < N_TRACE) trace_event();
    repeat (50) @(posedge clk);

    $display("requests=%0d cycles/request=%0.3f rb_hit=%0d ram_hit=%0d fb_hit=%0d miss=%0d",
             n_req, real'(total_cycles) / n_req, n_rb, n_ram, n_fb, n_miss);
    $display("prefetch=%0d stop=%0d split_read=%0d crossing=%0d collision=%0d stored=%0d replace=%0d wrap=%0d flush=%0d na=%0d traffic_quads=%0d",
             n_pf, n_stop, n_split, n_cross, n_coll, n_done, n_repl, n_wrap, n_flush, n_err, quads_sent);
    check(n_rb    > 0, "read buffer hits happened");
    check(n_ram   > 0, "RAM hits happened");
    check(n_fb    > 0, "fetch buffer hits happened");
    check(n_miss  > 0, "misses happened");
    check(n_pf    > 0, "prefetches happened");
    check(n_stop  > 0, "fetcher stops happened");
    check(n_split > 0, "split RAM reads happened");
    check(n_cross > 0, "crossing requests happened");
    check(n_coll  > 0, "RAM collisions happened");
    check(n_repl  > 0, "replacements happened");
    check(n_wrap  > 0, "wrap-around fetches happened");
    check(n_flush > 0, "flushes happened");
    check(n_err   > 0, "not-available pages happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
