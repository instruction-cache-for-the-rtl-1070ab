// tb_server - checks the server in a second cache configuration, built
// here from the cache's parts: 512 quads, 4-way sets, blocks of 16 quads
// in transfer blocks of 4, FIFO replacement, tagged prefetching, no
// wrap-around, prefetch_stop without demand_fetch_stop and no split RAM
// reads. The instruction-unit model replays a trace-B style trace and
// checks every quad. The test also checks that the fetcher is stopped only
// while it prefetches, that no split read happens, and that every lookup
// path of the server (read buffer, fetch buffer, RAM, miss) and the
// prefetch and stop mechanisms were used.
`timescale 1ns/1ps
module tb_server;
  import icache_pkg::*;

  localparam int CACHE_QUADS = 512, WAYS = 4, BLOCK_QUADS = 16, TB_QUADS = 4;
  localparam int SETS = CACHE_QUADS / (WAYS * BLOCK_QUADS);   // 8
  localparam int TBPB = BLOCK_QUADS / TB_QUADS;               // 4
  localparam int ROWS = CACHE_QUADS / TB_QUADS;
  localparam int QW = 2, TBA_W = VA_W - QW, SETW = 3, TBW = 2, AW = 2;
  localparam int TAG_W = TBA_W - TBW - SETW, RW = SETW + AW + TBW, TBD_W = TB_QUADS * QUAD_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            req_valid, req_ready, rsp_rdy0, rsp_rdy1, rsp_err, flush_req, flush;
  logic [VA_W-1:0] req_addr;
  quad_t           rsp_quad0, rsp_quad1;
  logic [TBA_W-1:0] rb_lookup_tag, rb_load_tag, fb_start_tag, fb_tag, f_start_tba;
  logic             rb_hit, rb_load, rb_inv;
  logic [TBD_W-1:0] rb_data, fb_data, ram_rdata, f_ram_wdata;
  logic             fb_start, fb_start_demand, fb_release, fb_wr, fb_set_used;
  logic [QW-1:0]    fb_wr_idx, f_start_word;
  quad_t            fb_wr_data, mem_data;
  logic             fb_active, fb_demand, fb_used;
  logic [TB_QUADS-1:0] fb_qvalid;
  logic [SETW-1:0]  a_set, p_set, b_set, use_set, fill_set;
  logic [WAYS-1:0][TAG_W-1:0] a_tag, p_tag, b_tag;
  logic [WAYS-1:0][TBPB-1:0]  a_valid, a_used, p_valid;
  logic [AW-1:0]    b_victim, use_way, fill_way;
  logic [TBW-1:0]   use_tb, fill_tb;
  logic [TAG_W-1:0] fill_tag;
  logic             use_en, fill_en, fill_new, fill_used;
  logic             s_ram_rd, s_ram_inc, f_ram_req;
  logic [RW-1:0]    s_ram_addr, f_ram_addr;
  logic             f_start, f_start_demand, f_stop, f_busy, f_storing, f_done, f_na, f_wrapped;
  logic             mem_req, mem_abort, mem_valid, mem_na;
  logic [VA_W-1:0]  mem_addr;
  logic             ev_rb, ev_ram, ev_fb, ev_miss, ev_pf, ev_stop, ev_split, ev_cross;
  logic [AW-1:0]    rnd = '0;
  int               bursts, quads_sent;

  server #(
    .SETS(SETS), .WAYS(WAYS), .TBPB(TBPB), .TB_QUADS(TB_QUADS), .PREFETCH(PF_TAGGED),
    .PREFETCH_STOP(1'b1), .DEMAND_FETCH_STOP(1'b0), .SPLIT_READ(1'b0)
  ) dut (
    .clk, .rst_n, .req_valid, .req_addr, .req_ready, .rsp_quad0, .rsp_quad1, .rsp_rdy0,
    .rsp_rdy1, .rsp_err, .flush_req, .flush,
    .rb_lookup_tag, .rb_hit, .rb_data, .rb_load, .rb_load_tag, .rb_inv,
    .fb_active, .fb_tag, .fb_demand, .fb_qvalid, .fb_data, .fb_set_used,
    .a_set, .a_tag, .a_valid, .a_used, .p_set, .p_tag, .p_valid,
    .use_en, .use_set, .use_way, .use_tb,
    .ram_rd(s_ram_rd), .ram_inc(s_ram_inc), .ram_addr(s_ram_addr), .ram_rdata,
    .f_start, .f_start_tba, .f_start_demand, .f_start_word, .f_stop, .f_busy, .f_storing, .f_na,
    .ev_rb_hit(ev_rb), .ev_ram_hit(ev_ram), .ev_fb_hit(ev_fb), .ev_miss(ev_miss),
    .ev_prefetch(ev_pf), .ev_stop(ev_stop), .ev_split(ev_split), .ev_cross(ev_cross));

  fetcher #(.SETS(SETS), .WAYS(WAYS), .TBPB(TBPB), .TB_QUADS(TB_QUADS), .WRAP_AROUND(1'b0)) u_f (
    .clk, .rst_n, .start(f_start), .start_tba(f_start_tba), .start_demand(f_start_demand),
    .start_word(f_start_word), .stop(f_stop), .flush, .busy(f_busy), .storing(f_storing),
    .done(f_done), .na(f_na), .wrapped(f_wrapped),
    .mem_req, .mem_addr, .mem_abort, .mem_valid, .mem_data, .mem_na,
    .fb_start, .fb_start_tag, .fb_start_demand, .fb_release, .fb_wr, .fb_wr_idx, .fb_wr_data,
    .fb_tag, .fb_used, .fb_data, .b_set, .b_tag, .b_victim,
    .fill_en, .fill_new, .fill_set, .fill_way, .fill_tb, .fill_tag, .fill_used,
    .ram_req(f_ram_req), .ram_gnt(!s_ram_rd), .ram_addr(f_ram_addr), .ram_wdata(f_ram_wdata));

  read_buffer #(.TB_QUADS(TB_QUADS), .TBA_W(TBA_W)) u_rb (
    .clk, .rst_n, .load(rb_load), .load_tag(rb_load_tag), .load_data(ram_rdata),
    .inv(rb_inv), .lookup_tag(rb_lookup_tag), .hit(rb_hit), .data(rb_data));

  fetch_buffer #(.TB_QUADS(TB_QUADS), .TBA_W(TBA_W)) u_fb (
    .clk, .rst_n, .start(fb_start), .start_tag(fb_start_tag), .start_demand(fb_start_demand),
    .release_buf(fb_release), .wr(fb_wr), .wr_idx(fb_wr_idx), .wr_data(fb_wr_data),
    .set_used(fb_set_used), .active(fb_active), .tag(fb_tag), .demand(fb_demand),
    .used(fb_used), .qvalid(fb_qvalid), .data(fb_data));

  status_ram #(.SETS(SETS), .WAYS(WAYS), .TBPB(TBPB), .TAG_W(TAG_W), .REPL(REPL_FIFO)) u_st (
    .clk, .rst_n, .a_set, .a_tag, .a_valid, .a_used, .p_set, .p_tag, .p_valid,
    .b_set, .b_tag, .b_victim, .use_en, .use_set, .use_way, .use_tb,
    .fill_en, .fill_new, .fill_set, .fill_way, .fill_tb, .fill_tag, .fill_used,
    .flush, .rnd_way(rnd));

  data_ram #(.ROWS(ROWS), .TB_QUADS(TB_QUADS)) u_ram (
    .clk, .en(s_ram_rd || f_ram_req), .we(!s_ram_rd && f_ram_req), .inc(s_ram_inc),
    .addr(s_ram_rd ? s_ram_addr : f_ram_addr), .wdata(f_ram_wdata), .rdata(ram_rdata));

  bus_mem_model #(.TB_QUADS(TB_QUADS)) u_mem (
    .clk, .mem_req, .mem_addr, .mem_abort, .mem_valid, .mem_data, .mem_na, .bursts, .quads_sent);

  logic   finished;
  int     d_checks, d_failures, n_req, n_flush;
  longint total_cycles;

  iu_trace_driver #(.N_REQ(8000), .TRACE_B(1'b1), .GAP(1)) u_iu (
    .clk, .rst_n, .req_valid, .req_addr, .req_ready, .rsp_quad0, .rsp_quad1, .rsp_rdy0,
    .rsp_rdy1, .rsp_err, .flush_req, .finished, .checks(d_checks), .failures(d_failures),
    .n_req, .n_flush, .total_cycles);

  int checks = 0, failures = 0;
  int n_rb = 0, n_ram = 0, n_fb = 0, n_miss = 0, n_pf = 0, n_stop = 0, n_split = 0, n_wrap = 0;
  always @(posedge clk) if (rst_n) begin
    n_rb += int'(ev_rb); n_ram += int'(ev_ram); n_fb += int'(ev_fb); n_miss += int'(ev_miss);
    n_pf += int'(ev_pf); n_stop += int'(ev_stop); n_split += int'(ev_split); n_wrap += int'(f_wrapped);
    if (ev_stop) begin
      checks++;
      if (fb_demand) begin failures++; $display("FAIL demand fetch stopped"); end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!finished) @(posedge clk);
    $display("requests=%0d cycles/request=%0.3f rb=%0d ram=%0d fb=%0d miss=%0d pf=%0d stop=%0d",
             n_req, real'(total_cycles) / n_req, n_rb, n_ram, n_fb, n_miss, n_pf, n_stop);
    check(n_rb > 0 && n_ram > 0 && n_fb > 0 && n_miss > 0, "all lookup paths used");
    check(n_pf > 0, "prefetches happened");
    check(n_stop > 0, "prefetches stopped");
    check(n_split == 0, "no split reads when disabled");
    check(n_wrap == 0, "no wrap-around when disabled");
    check(n_flush > 0, "flushes happened");
    checks += d_checks;
    failures += d_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
