// icache - instruction cache of the C-processor.
//
// A set-associative, virtual-address instruction cache. Addresses are
// 46-bit virtual quad addresses (16-bit process identification number and
// 30-bit quad address), so process switches need no flush. The instruction
// unit asks for two consecutive quads (64 bits) at any quad address; main
// memory is reached over a 32-bit bus through the bus unit and the memory
// management unit, which translates addresses only after a miss.
//
// Structure: the server answers the instruction unit and the fetcher
// fetches transfer blocks from memory; the two run in parallel. Tag and
// status bits sit in the status RAM, quads in the data RAM (one transfer
// block per row, split into two halves with a +1 adder). A read buffer
// holds the last transfer block read from the RAM; a fetch buffer receives
// the transfer block being fetched and is copied into the RAM at once.
// The data RAM has one port; the server's reads take precedence over the
// fetcher's writes.
//
// Default configuration: 1024 quads, 2-way sets, blocks of 32 quads split
// into 4 transfer blocks of 8 quads, LRU replacement, prefetch_lookup on
// hits, both buffers, wrap-around demand fetches, prefetch_stop and
// demand_fetch_stop. The widths of the address fields follow from these
// sizes: 3 word bits, 2 transfer block bits, 4 set bits, 37 tag bits.
// Other sizes are set by parameter (powers of 2; transfer blocks of at
// least 2 quads); a field may shrink to zero bits, so one set, one transfer
// block per block and a direct-mapped cache all work.
//
// Interfaces
//   instruction unit : req_valid/req_ready, req_addr; rsp_quad0/1 with
//                      rsp_rdy0/1 held until the next request; rsp_err.
//   flush_req        : invalidate all cached data (taken when idle).
//   memory           : mem_req pulse + mem_addr, mem_abort pulse; quads come
//                      back on mem_valid/mem_data in wrap-around order;
//                      mem_na = requested page not available.
//   events           : one-cycle pulses for monitoring.
module icache
  import icache_pkg::*;
#(
  parameter int        CACHE_QUADS       = 1024,
  parameter int        WAYS              = 2,
  parameter int        BLOCK_QUADS       = 32,
  parameter int        TB_QUADS          = 8,
  parameter repl_e     REPL              = REPL_LRU,
  parameter prefetch_e PREFETCH          = PF_LOOKUP_HIT,
  parameter bit        WRAP_AROUND       = 1'b1,
  parameter bit        PREFETCH_STOP     = 1'b1,
  parameter bit        DEMAND_FETCH_STOP = 1'b1,
  parameter bit        SPLIT_READ        = 1'b1,
  localparam int SETS  = CACHE_QUADS / (WAYS * BLOCK_QUADS),
  localparam int TBPB  = BLOCK_QUADS / TB_QUADS,
  localparam int ROWS  = CACHE_QUADS / TB_QUADS,
  localparam int QW    = (TB_QUADS > 1) ? $clog2(TB_QUADS) : 1,
  localparam int TBA_W = VA_W - QW,
  localparam int SETW  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int TBW   = (TBPB > 1) ? $clog2(TBPB) : 1,
  localparam int AW    = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int SETB  = $clog2(SETS),   // field widths, 0 for a single set,
  localparam int TBB   = $clog2(TBPB),   // one transfer block per block
  localparam int AB    = $clog2(WAYS),   // or a direct-mapped cache
  localparam int TAG_W = TBA_W - TBB - SETB,
  localparam int RW    = (SETB + AB + TBB > 0) ? SETB + AB + TBB : 1,
  localparam int TBD_W = TB_QUADS * QUAD_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  input  logic [VA_W-1:0] req_addr,
  output logic            req_ready,
  output quad_t           rsp_quad0,
  output quad_t           rsp_quad1,
  output logic            rsp_rdy0,
  output logic            rsp_rdy1,
  output logic            rsp_err,
  input  logic            flush_req,
  output logic            mem_req,
  output logic [VA_W-1:0] mem_addr,
  output logic            mem_abort,
  input  logic            mem_valid,
  input  quad_t           mem_data,
  input  logic            mem_na,
  output icache_events_t  events
);

  // Sizes must describe a realisable cache.
  initial begin
    assert (SETS >= 1 && SETS * WAYS * BLOCK_QUADS == CACHE_QUADS && (SETS & (SETS - 1)) == 0)
      else $error("CACHE_QUADS must be WAYS*BLOCK_QUADS times a power of 2");
    assert (TBPB >= 1 && TBPB * TB_QUADS == BLOCK_QUADS && (TB_QUADS & (TB_QUADS - 1)) == 0 && TB_QUADS >= 2)
      else $error("BLOCK_QUADS must be a multiple of a power-of-2 TB_QUADS >= 2");
    assert ((WAYS & (WAYS - 1)) == 0) else $error("WAYS must be a power of 2");
  end

  // read buffer
  logic [TBA_W-1:0] rb_lookup_tag, rb_load_tag;
  logic             rb_hit, rb_load, rb_inv;
  logic [TBD_W-1:0] rb_data;
  // fetch buffer
  logic             fb_start, fb_start_demand, fb_release, fb_wr, fb_set_used;
  logic [TBA_W-1:0] fb_start_tag, fb_tag;
  logic [QW-1:0]    fb_wr_idx;
  quad_t            fb_wr_data;
  logic             fb_active, fb_demand, fb_used;
  logic [TB_QUADS-1:0] fb_qvalid;
  logic [TBD_W-1:0] fb_data;
  // status RAM
  logic [SETW-1:0]            a_set, p_set, b_set, use_set, fill_set;
  logic [WAYS-1:0][TAG_W-1:0] a_tag, p_tag, b_tag;
  logic [WAYS-1:0][TBPB-1:0]  a_valid, a_used, p_valid;
  logic [AW-1:0]              b_victim, use_way, fill_way;
  logic [TBW-1:0]             use_tb, fill_tb;
  logic [TAG_W-1:0]           fill_tag;
  logic                       use_en, fill_en, fill_new, fill_used, flush;
  // data RAM
  logic             s_ram_rd, s_ram_inc, f_ram_req, f_ram_gnt;
  logic [RW-1:0]    s_ram_addr, f_ram_addr;
  logic [TBD_W-1:0] ram_rdata, f_ram_wdata;
  // fetcher control
  logic             f_start, f_start_demand, f_stop, f_busy, f_storing, f_done, f_na, f_wrapped;
  logic [TBA_W-1:0] f_start_tba;
  logic [QW-1:0]    f_start_word;
  // random replacement counter, one for all sets
  logic [AW-1:0]    rnd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rnd_q <= '0;
    else        rnd_q <= rnd_q + AW'(1);
  end

  server #(
    .SETS(SETS), .WAYS(WAYS), .TBPB(TBPB), .TB_QUADS(TB_QUADS), .PREFETCH(PREFETCH),
    .PREFETCH_STOP(PREFETCH_STOP), .DEMAND_FETCH_STOP(DEMAND_FETCH_STOP), .SPLIT_READ(SPLIT_READ)
  ) u_server (
    .clk, .rst_n,
    .req_valid, .req_addr, .req_ready, .rsp_quad0, .rsp_quad1, .rsp_rdy0, .rsp_rdy1, .rsp_err,
    .flush_req, .flush,
    .rb_lookup_tag, .rb_hit, .rb_data, .rb_load, .rb_load_tag, .rb_inv,
    .fb_active, .fb_tag, .fb_demand, .fb_qvalid, .fb_data, .fb_set_used,
    .a_set, .a_tag, .a_valid, .a_used, .p_set, .p_tag, .p_valid,
    .use_en, .use_set, .use_way, .use_tb,
    .ram_rd(s_ram_rd), .ram_inc(s_ram_inc), .ram_addr(s_ram_addr), .ram_rdata,
    .f_start, .f_start_tba, .f_start_demand, .f_start_word, .f_stop, .f_busy, .f_storing, .f_na,
    .ev_rb_hit(events.rb_hit), .ev_ram_hit(events.ram_hit), .ev_fb_hit(events.fb_hit),
    .ev_miss(events.miss), .ev_prefetch(events.prefetch), .ev_stop(events.stop),
    .ev_split(events.split_read), .ev_cross(events.crossing)
  );

  fetcher #(
    .SETS(SETS), .WAYS(WAYS), .TBPB(TBPB), .TB_QUADS(TB_QUADS), .WRAP_AROUND(WRAP_AROUND)
  ) u_fetcher (
    .clk, .rst_n,
    .start(f_start), .start_tba(f_start_tba), .start_demand(f_start_demand),
    .start_word(f_start_word), .stop(f_stop), .flush,
    .busy(f_busy), .storing(f_storing), .done(f_done), .na(f_na), .wrapped(f_wrapped),
    .mem_req, .mem_addr, .mem_abort, .mem_valid, .mem_data, .mem_na,
    .fb_start, .fb_start_tag, .fb_start_demand, .fb_release, .fb_wr, .fb_wr_idx, .fb_wr_data,
    .fb_tag, .fb_used, .fb_data,
    .b_set, .b_tag, .b_victim,
    .fill_en, .fill_new, .fill_set, .fill_way, .fill_tb, .fill_tag, .fill_used,
    .ram_req(f_ram_req), .ram_gnt(f_ram_gnt), .ram_addr(f_ram_addr), .ram_wdata(f_ram_wdata)
  );

  read_buffer #(.TB_QUADS(TB_QUADS), .TBA_W(TBA_W)) u_rb (
    .clk, .rst_n, .load(rb_load), .load_tag(rb_load_tag), .load_data(ram_rdata),
    .inv(rb_inv), .lookup_tag(rb_lookup_tag), .hit(rb_hit), .data(rb_data));

  fetch_buffer #(.TB_QUADS(TB_QUADS), .TBA_W(TBA_W)) u_fb (
    .clk, .rst_n, .start(fb_start), .start_tag(fb_start_tag), .start_demand(fb_start_demand),
    .release_buf(fb_release), .wr(fb_wr), .wr_idx(fb_wr_idx), .wr_data(fb_wr_data),
    .set_used(fb_set_used), .active(fb_active), .tag(fb_tag), .demand(fb_demand),
    .used(fb_used), .qvalid(fb_qvalid), .data(fb_data));

  status_ram #(
    .SETS(SETS), .WAYS(WAYS), .TBPB(TBPB), .TAG_W(TAG_W), .REPL(REPL)
  ) u_status (
    .clk, .rst_n,
    .a_set, .a_tag, .a_valid, .a_used, .p_set, .p_tag, .p_valid,
    .b_set, .b_tag, .b_victim,
    .use_en, .use_set, .use_way, .use_tb,
    .fill_en, .fill_new, .fill_set, .fill_way, .fill_tb, .fill_tag, .fill_used,
    .flush, .rnd_way(rnd_q));

  // Single-ported data RAM: server reads first, fetcher writes when free.
  assign f_ram_gnt = !s_ram_rd;

  data_ram #(.ROWS(ROWS), .TB_QUADS(TB_QUADS)) u_data (
    .clk, .en(s_ram_rd || f_ram_req), .we(!s_ram_rd && f_ram_req), .inc(s_ram_inc),
    .addr(s_ram_rd ? s_ram_addr : f_ram_addr), .wdata(f_ram_wdata), .rdata(ram_rdata));

  assign events.collision  = s_ram_rd && f_ram_req;
  assign events.fetch_done = f_done;
  assign events.replace    = fill_en && fill_new;
  assign events.wrap       = f_wrapped;

endmodule
