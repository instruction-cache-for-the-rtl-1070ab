// icache_run - one cache configuration with its memory model and trace
// driver, for the workload testbench.
//
// Instantiates the top-level cache with the given parameters, the
// behavioural bus/MMU/memory model (default timing: latency 200, access
// 150, cycle 100 time units) and the instruction-unit trace driver, which
// replays N_REQ requests of trace A or B and checks every quad returned.
// The cache's event pulses are counted. When the driver is done, finished
// rises and the counters are final. All outputs are plain counters; the
// run starts when rst_n is released.
`timescale 1ns/1ps
module icache_run
  import icache_pkg::*;
#(
  parameter int        CACHE_QUADS = 1024,
  parameter int        WAYS        = 2,
  parameter int        BLOCK_QUADS = 32,
  parameter int        TB_QUADS    = 8,
  parameter repl_e     REPL        = REPL_LRU,
  parameter prefetch_e PREFETCH    = PF_LOOKUP_HIT,
  parameter bit        OPTIONS     = 1'b1,   // wrap-around and both stops
  parameter int        N_REQ       = 2000,
  parameter bit        TRACE_B     = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   finished,
  output int     checks,
  output int     failures,
  output int     n_req,
  output int     n_miss,
  output int     n_prefetch,
  output int     n_hit,
  output int     quads_sent,
  output longint total_cycles
);

  logic            req_valid, req_ready, rsp_rdy0, rsp_rdy1, rsp_err, flush_req;
  logic [VA_W-1:0] req_addr, mem_addr;
  quad_t           rsp_quad0, rsp_quad1, mem_data;
  logic            mem_req, mem_abort, mem_valid, mem_na;
  icache_events_t  events;
  int              bursts, n_flush;

  icache #(
    .CACHE_QUADS(CACHE_QUADS), .WAYS(WAYS), .BLOCK_QUADS(BLOCK_QUADS), .TB_QUADS(TB_QUADS),
    .REPL(REPL), .PREFETCH(PREFETCH), .WRAP_AROUND(OPTIONS), .PREFETCH_STOP(OPTIONS),
    .DEMAND_FETCH_STOP(OPTIONS), .SPLIT_READ(1'b1)
  ) u_cache (
    .clk, .rst_n, .req_valid, .req_addr, .req_ready, .rsp_quad0, .rsp_quad1, .rsp_rdy0,
    .rsp_rdy1, .rsp_err, .flush_req, .mem_req, .mem_addr, .mem_abort, .mem_valid, .mem_data,
    .mem_na, .events);

  bus_mem_model #(.TB_QUADS(TB_QUADS)) u_mem (
    .clk, .mem_req, .mem_addr, .mem_abort, .mem_valid, .mem_data, .mem_na, .bursts, .quads_sent);

  iu_trace_driver #(.N_REQ(N_REQ), .TRACE_B(TRACE_B), .GAP(1)) u_iu (
    .clk, .rst_n, .req_valid, .req_addr, .req_ready, .rsp_quad0, .rsp_quad1, .rsp_rdy0,
    .rsp_rdy1, .rsp_err, .flush_req, .finished, .checks, .failures, .n_req, .n_flush,
    .total_cycles);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_miss <= 0; n_prefetch <= 0; n_hit <= 0;
    end else begin
      n_miss     <= n_miss + int'(events.miss);
      n_prefetch <= n_prefetch + int'(events.prefetch);
      n_hit      <= n_hit + int'(events.rb_hit) + int'(events.ram_hit) + int'(events.fb_hit);
    end
  end

endmodule
