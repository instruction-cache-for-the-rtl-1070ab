// tb_fetcher - checks the fetcher with a real fetch buffer and the memory
// model: wrap-around demand fetch (first quad address, fill of a new block
// in the victim way, used_before = 1, row address and row data, waiting for
// the data RAM grant), prefetch into a block already present (no
// reallocation, used_before = 0, burst from quad 0), stop during a burst
// (abort, nothing stored), stop while storing (ignored), a page that is not
// available, and the burst timing of latency + 8 accesses.
`timescale 1ns/1ps
module tb_fetcher;
  import icache_pkg::*;
  localparam int SETS = 16, WAYS = 2, TBPB = 4, TBQ = 8;
  localparam int TBA_W = 43, TAG_W = 37, RW = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, start_demand = 0, stop = 0, flush = 0;
  logic [TBA_W-1:0] start_tba = 0;
  logic [2:0] start_word = 0;
  logic busy, storing, done, na, wrapped;
  logic mem_req, mem_abort, mem_valid, mem_na;
  logic [VA_W-1:0] mem_addr;
  quad_t mem_data;
  logic fb_start, fb_start_demand, fb_release, fb_wr, fb_used, fb_active, fb_demand;
  logic [TBA_W-1:0] fb_start_tag, fb_tag;
  logic [2:0] fb_wr_idx;
  quad_t fb_wr_data;
  logic [TBQ-1:0] fb_qvalid;
  logic [TBQ*QUAD_W-1:0] fb_data, ram_wdata;
  logic [3:0] b_set, fill_set;
  logic [WAYS-1:0][TAG_W-1:0] b_tag = '0;
  logic b_victim = 1'b0;
  logic fill_en, fill_new, fill_way, fill_used, ram_req, ram_gnt = 1'b0;
  logic [1:0] fill_tb;
  logic [TAG_W-1:0] fill_tag;
  logic [RW-1:0] ram_addr;
  int bursts, quads_sent;

  fetcher #(.SETS(SETS), .WAYS(WAYS), .TBPB(TBPB), .TB_QUADS(TBQ), .WRAP_AROUND(1'b1)) dut (
    .clk, .rst_n, .start, .start_tba, .start_demand, .start_word, .stop, .flush,
    .busy, .storing, .done, .na, .wrapped,
    .mem_req, .mem_addr, .mem_abort, .mem_valid, .mem_data, .mem_na,
    .fb_start, .fb_start_tag, .fb_start_demand, .fb_release, .fb_wr, .fb_wr_idx, .fb_wr_data,
    .fb_tag, .fb_used, .fb_data, .b_set, .b_tag, .b_victim,
    .fill_en, .fill_new, .fill_set, .fill_way, .fill_tb, .fill_tag, .fill_used,
    .ram_req, .ram_gnt, .ram_addr, .ram_wdata);

  fetch_buffer #(.TB_QUADS(TBQ), .TBA_W(TBA_W)) u_fb (
    .clk, .rst_n, .start(fb_start), .start_tag(fb_start_tag), .start_demand(fb_start_demand),
    .release_buf(fb_release), .wr(fb_wr), .wr_idx(fb_wr_idx), .wr_data(fb_wr_data),
    .set_used(1'b0), .active(fb_active), .tag(fb_tag), .demand(fb_demand), .used(fb_used),
    .qvalid(fb_qvalid), .data(fb_data));

  bus_mem_model #(.TB_QUADS(TBQ)) u_mem (
    .clk, .mem_req, .mem_addr, .mem_abort, .mem_valid, .mem_data, .mem_na, .bursts, .quads_sent);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic quad_t expect_q(input logic [VA_W-1:0] va);
    return va[31:0] ^ {va[45:30], va[45:30]} ^ 32'h5A00_00A5;
  endfunction

  int n_done = 0, n_na = 0;
  always @(posedge clk) begin
    n_done += int'(done);
    n_na   += int'(na);
  end

  task automatic kick(input logic [TBA_W-1:0] tba, input bit dem, input logic [2:0] w);
    @(negedge clk);
    start = 1; start_tba = tba; start_demand = dem; start_word = w;
    #1;
    check(mem_req, "burst requested");
    check(mem_addr == {tba, (dem ? w : 3'd0)}, "first quad address");
    check(wrapped == (dem && w != 0), "wrap-around flag");
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    logic [TBA_W-1:0] tba;
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. demand fetch with wrap-around into a new block
    tba = {TAG_W'(37'h12345), 4'd5, 2'd2};
    b_victim = 1'b1;
    kick(tba, 1'b1, 3'd5);
    cyc = 1;
    while (!storing) begin @(negedge clk); cyc++; end
    // latency 200 + 8 * 150 = 1400 time units = 14 cycles, plus the
    // cycle in which the last quad enters the buffer
    check(cyc == 15, $sformatf("burst took %0d cycles", cyc));
    check(b_set == 4'd5, "status lookup of the right set");
    repeat (3) begin
      @(negedge clk);
      check(storing && ram_req && !fill_en, "waits for the data RAM");
    end
    ram_gnt = 1;
    #1;
    check(fill_en && fill_new && fill_way == 1'b1 && fill_set == 4'd5 && fill_tb == 2'd2, "fill of victim way");
    check(fill_tag == TAG_W'(37'h12345) && fill_used, "fill tag / used_before");
    check(ram_addr == {4'd5, 1'b1, 2'd2}, "row address");
    for (int q = 0; q < TBQ; q++)
      check(ram_wdata[q*QUAD_W +: QUAD_W] == expect_q({tba, 3'(q)}), $sformatf("row quad %0d", q));
    @(negedge clk);
    check(!busy && n_done == 1, "done");

    // 2. prefetch into a block whose tag is present in way 0
    tba = {TAG_W'(37'h777), 4'd3, 2'd1};
    b_tag[0] = TAG_W'(37'h777);
    b_tag[1] = TAG_W'(37'h1);
    b_victim = 1'b1;
    kick(tba, 1'b0, 3'd6);
    while (!fill_en) @(negedge clk);
    check(!fill_new && fill_way == 1'b0 && !fill_used, "prefetch into existing block");
    for (int q = 0; q < TBQ; q++)
      check(ram_wdata[q*QUAD_W +: QUAD_W] == expect_q({tba, 3'(q)}), "prefetched quad");
    @(negedge clk);

    // 3. stop during the burst
    kick({TAG_W'(37'h5), 4'd1, 2'd0}, 1'b0, 3'd0);
    repeat (5) @(negedge clk);
    stop = 1;
    #1;
    check(mem_abort, "abort sent to the bus");
    @(negedge clk);
    stop = 0;
    check(!busy && !fb_active, "stopped");
    repeat (20) @(negedge clk);
    check(n_done == 2, "nothing stored after stop");

    // 4. stop while storing is ignored
    ram_gnt = 0;
    kick({TAG_W'(37'h6), 4'd2, 2'd3}, 1'b1, 3'd0);
    while (!storing) @(negedge clk);
    stop = 1;
    @(negedge clk);
    stop = 0;
    check(storing, "store not stopped");
    ram_gnt = 1;
    @(negedge clk);
    check(n_done == 3, "stored");

    // 5. page not available
    kick(TBA_W'(6'h3F) << 21, 1'b1, 3'd1);   // quad address bits 29:24 all ones
    repeat (6) @(negedge clk);
    check(n_na == 1 && !busy, "not-available reported");
    check(n_done == 3, "nothing stored for unavailable page");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
