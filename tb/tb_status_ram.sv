// tb_status_ram - checks the status RAM (16 sets, 2 ways, 4 transfer
// blocks per block, LRU) against a reference model kept in the testbench:
// fills of new and existing blocks, use updates (LRU order, used_before),
// victim selection, the three read ports, and flush.
`timescale 1ns/1ps
module tb_status_ram;
  import icache_pkg::*;

  localparam int SETS = 16, WAYS = 2, TBPB = 4, TAG_W = 37;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] a_set = 0, p_set = 0, b_set = 0, use_set = 0, fill_set = 0;
  logic [WAYS-1:0][TAG_W-1:0] a_tag, p_tag, b_tag;
  logic [WAYS-1:0][TBPB-1:0]  a_valid, a_used, p_valid;
  logic       b_victim, use_way = 0, fill_way = 0;
  logic [1:0] use_tb = 0, fill_tb = 0;
  logic       use_en = 0, fill_en = 0, fill_new = 0, fill_used = 0, flush = 0;
  logic [TAG_W-1:0] fill_tag = 0;

  status_ram #(.SETS(SETS), .WAYS(WAYS), .TBPB(TBPB), .TAG_W(TAG_W), .REPL(REPL_LRU)) dut (
    .clk, .rst_n, .a_set, .a_tag, .a_valid, .a_used, .p_set, .p_tag, .p_valid,
    .b_set, .b_tag, .b_victim, .use_en, .use_set, .use_way, .use_tb,
    .fill_en, .fill_new, .fill_set, .fill_way, .fill_tb, .fill_tag, .fill_used,
    .flush, .rnd_way(1'b0));

  // reference
  logic [TAG_W-1:0] r_tag   [SETS][WAYS];
  logic [TBPB-1:0]  r_valid [SETS][WAYS];
  logic [TBPB-1:0]  r_used  [SETS][WAYS];
  int               r_lru   [SETS];     // least recently used way

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic compare_all();
    for (int s = 0; s < SETS; s++) begin
      a_set = 4'(s); p_set = 4'(s); b_set = 4'(s);
      #1;
      for (int w = 0; w < WAYS; w++) begin
        check(a_valid[w] == r_valid[s][w], $sformatf("valid set %0d way %0d", s, w));
        check(p_valid[w] == r_valid[s][w], "p port valid");
        if (r_valid[s][w] != 0) begin
          check(a_tag[w] == r_tag[s][w], "tag");
          check(p_tag[w] == r_tag[s][w], "p port tag");
          check(b_tag[w] == r_tag[s][w], "b port tag");
          check((a_used[w] & r_valid[s][w]) == (r_used[s][w] & r_valid[s][w]), "used_before");
        end
      end
      check(int'(b_victim) == r_lru[s], $sformatf("victim set %0d", s));
    end
  endtask

  initial begin
    for (int s = 0; s < SETS; s++) begin
      r_lru[s] = 1;
      for (int w = 0; w < WAYS; w++) begin r_valid[s][w] = 0; r_used[s][w] = 0; r_tag[s][w] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    compare_all();
    for (int step = 0; step < 600; step++) begin
      int op;
      op = $urandom_range(9);
      @(negedge clk);
      use_en = 0; fill_en = 0; flush = 0;
      if (op == 0 && step % 50 == 49) begin
        flush = 1;
        for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) r_valid[s][w] = 0;
      end else if (op < 5) begin
        int s, w, t;
        bit nw;
        s = $urandom_range(SETS - 1); t = $urandom_range(TBPB - 1);
        b_set = 4'(s); #1;
        nw = $urandom_range(1);
        w  = nw ? int'(b_victim) : $urandom_range(1);
        fill_en = 1; fill_new = nw; fill_set = 4'(s); fill_way = 1'(w); fill_tb = 2'(t);
        fill_tag = {5'(0), 32'($urandom)}; fill_used = 1'($urandom_range(1));
        if (nw) begin
          r_tag[s][w] = fill_tag; r_valid[s][w] = 0; r_used[s][w] = 0;
          r_lru[s] = 1 - w;
        end
        r_valid[s][w][t] = 1; r_used[s][w][t] = fill_used;
      end else begin
        int s, w, t;
        s = $urandom_range(SETS - 1); w = $urandom_range(1); t = $urandom_range(TBPB - 1);
        use_en = 1; use_set = 4'(s); use_way = 1'(w); use_tb = 2'(t);
        r_lru[s] = 1 - w; r_used[s][w][t] = 1;
      end
      @(posedge clk); #1;
      use_en = 0; fill_en = 0; flush = 0;
      compare_all();
    end
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
