// tb_icache_sweep - runs the cache over the configurations that the cache
// study evaluates, side by side, each on its own copy of the memory model
// and trace driver (see icache_run).
//
// Configurations: cache sizes 64, 256, 4096 and 16384 quads (the default
// is 1024); set sizes 1 and 4 with blocks = transfer blocks = 8 quads and
// prefetch_always; block sizes 8 and 64 with transfer block = block; for
// blocks of 32 quads, transfer block sizes 2, 4, 16 and 32; FIFO and random
// replacement; the five other prefetch algorithms; trace B; and the
// default cache with wrap-around, prefetch_stop and demand_fetch_stop off,
// and the default cache itself for reference. All trace-A runs replay the
// same request sequence.
// Every run replays N_REQ requests and every quad is checked. Afterwards
// the test checks that every run finished without a wrong quad, that
// prefetch_never never prefetched while every other algorithm did, and
// that the largest cache missed less than the smallest. It prints the
// miss ratio, the average cycles per request and the memory traffic of
// each run. Every run replays 100000 requests, the length of the traces
// used in the study.
`timescale 1ns/1ps
module tb_icache_sweep;
  import icache_pkg::*;

  localparam int N_RUNS = 22;
  localparam int N_REQ  = 100000;   // length of the study's traces

  typedef struct packed {
    int        cache_quads;
    int        ways;
    int        block_quads;
    int        tb_quads;
    repl_e     repl;
    prefetch_e prefetch;
    bit        options;
    bit        trace_b;
  } cfg_t;

  localparam cfg_t CFG [N_RUNS] = '{
    '{   64, 2, 32,  8, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b0 },  //  0 cache size
    '{  256, 2, 32,  8, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b0 },  //  1
    '{ 4096, 2, 32,  8, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b0 },  //  2
    '{16384, 2, 32,  8, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b0 },  //  3
    '{ 1024, 1,  8,  8, REPL_LRU,    PF_ALWAYS,        1'b0, 1'b0 },  //  4 set size
    '{ 1024, 4,  8,  8, REPL_LRU,    PF_ALWAYS,        1'b0, 1'b0 },  //  5
    '{ 1024, 2,  8,  8, REPL_LRU,    PF_LOOKUP_HIT,    1'b0, 1'b0 },  //  6 block size
    '{ 1024, 2, 64, 64, REPL_LRU,    PF_LOOKUP_HIT,    1'b0, 1'b0 },  //  7
    '{ 1024, 2, 32,  4, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b0 },  //  8 transfer block
    '{ 1024, 2, 32, 16, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b0 },  //  9
    '{ 1024, 2, 32, 32, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b0 },  // 10
    '{ 1024, 2, 32,  8, REPL_FIFO,   PF_LOOKUP_HIT,    1'b1, 1'b0 },  // 11 replacement
    '{ 1024, 2, 32,  8, REPL_RANDOM, PF_LOOKUP_HIT,    1'b1, 1'b0 },  // 12
    '{ 1024, 2, 32,  8, REPL_LRU,    PF_NEVER,         1'b1, 1'b0 },  // 13 prefetch
    '{ 1024, 2, 32,  8, REPL_LRU,    PF_ALWAYS,        1'b1, 1'b0 },  // 14
    '{ 1024, 2, 32,  8, REPL_LRU,    PF_ON_MISSES,     1'b1, 1'b0 },  // 15
    '{ 1024, 2, 32,  8, REPL_LRU,    PF_TAGGED,        1'b1, 1'b0 },  // 16
    '{ 1024, 2, 32,  8, REPL_LRU,    PF_LOOKUP_ALWAYS, 1'b1, 1'b0 },  // 17
    '{ 1024, 2, 32,  8, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b1 },  // 18 trace B
    '{ 1024, 2, 32,  8, REPL_LRU,    PF_LOOKUP_HIT,    1'b0, 1'b0 },  // 19 options off
    '{ 1024, 2, 32,  2, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b0 },  // 20 transfer block
    '{ 1024, 2, 32,  8, REPL_LRU,    PF_LOOKUP_HIT,    1'b1, 1'b0 }   // 21 default
  };

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   finished [N_RUNS];
  int     r_checks [N_RUNS], r_failures [N_RUNS], r_req [N_RUNS], r_miss [N_RUNS];
  int     r_pf [N_RUNS], r_hit [N_RUNS], r_quads [N_RUNS];
  longint r_cycles [N_RUNS];

  for (genvar i = 0; i < N_RUNS; i++) begin : g_run
    icache_run #(
      .CACHE_QUADS(CFG[i].cache_quads), .WAYS(CFG[i].ways), .BLOCK_QUADS(CFG[i].block_quads),
      .TB_QUADS(CFG[i].tb_quads), .REPL(CFG[i].repl), .PREFETCH(CFG[i].prefetch),
      .OPTIONS(CFG[i].options), .N_REQ(N_REQ), .TRACE_B(CFG[i].trace_b)
    ) u_run (
      .clk, .rst_n, .finished(finished[i]), .checks(r_checks[i]), .failures(r_failures[i]),
      .n_req(r_req[i]), .n_miss(r_miss[i]), .n_prefetch(r_pf[i]), .n_hit(r_hit[i]),
      .quads_sent(r_quads[i]), .total_cycles(r_cycles[i]));
  end

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit all_done();
    foreach (finished[i]) if (!finished[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    $display("run quads ways block tb repl prefetch opt trace  miss_ratio cycles/req traffic_quads");
    for (int i = 0; i < N_RUNS; i++) begin
      $display("%3d %5d %4d %5d %2d %0d %0d %0d %s  %0.4f %0.3f %0d", i, CFG[i].cache_quads,
               CFG[i].ways, CFG[i].block_quads, CFG[i].tb_quads, CFG[i].repl, CFG[i].prefetch,
               CFG[i].options, CFG[i].trace_b ? "B" : "A", real'(r_miss[i]) / r_req[i],
               real'(r_cycles[i]) / r_req[i], r_quads[i]);
      check(r_req[i] >= N_REQ, $sformatf("run %0d completed its requests", i));
      check(r_failures[i] == 0, $sformatf("run %0d returned correct quads", i));
      check(r_miss[i] > 0 && r_hit[i] > 0, $sformatf("run %0d saw hits and misses", i));
      if (CFG[i].prefetch == PF_NEVER) check(r_pf[i] == 0, $sformatf("run %0d never prefetched", i));
      else check(r_pf[i] > 0, $sformatf("run %0d prefetched", i));
      checks += r_checks[i];
    end
    check(r_miss[3] < r_miss[0], "16384-quad cache misses less than 64-quad cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
