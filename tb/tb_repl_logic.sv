// tb_repl_logic - checks the replacement decision logic against reference
// models: an explicit LRU order list (4 ways and 2 ways), a FIFO pointer
// and the random way counter. Random touch/fill sequences are applied to
// the state, and the victim is compared with the reference after each step.
`timescale 1ns/1ps
module tb_repl_logic;
  import icache_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // 4-way LRU
  logic [7:0] s4, s4_next, s4_init;
  logic [1:0] v4, tw4, fw4;
  logic       t4, f4;
  repl_logic #(.WAYS(4), .REPL(REPL_LRU)) u_lru4 (
    .state_in(s4), .rnd_way(2'd0), .touch(t4), .touch_way(tw4), .fill(f4), .fill_way(fw4),
    .victim(v4), .state_out(s4_next), .init_state(s4_init));

  // 2-way LRU
  logic [1:0] s2, s2_next, s2_init;
  logic       v2, tw2, t2;
  repl_logic #(.WAYS(2), .REPL(REPL_LRU)) u_lru2 (
    .state_in(s2), .rnd_way(1'b0), .touch(t2), .touch_way(tw2), .fill(1'b0), .fill_way(1'b0),
    .victim(v2), .state_out(s2_next), .init_state(s2_init));

  // 4-way FIFO
  logic [7:0] sf, sf_next, sf_init;
  logic [1:0] vf;
  logic       ff;
  repl_logic #(.WAYS(4), .REPL(REPL_FIFO)) u_fifo (
    .state_in(sf), .rnd_way(2'd0), .touch(1'b1), .touch_way(2'd3), .fill(ff), .fill_way(vf),
    .victim(vf), .state_out(sf_next), .init_state(sf_init));

  // 4-way random
  logic [7:0] sr_next, sr_init;
  logic [1:0] vr, rnd;
  repl_logic #(.WAYS(4), .REPL(REPL_RANDOM)) u_rand (
    .state_in(8'h00), .rnd_way(rnd), .touch(1'b0), .touch_way(2'd0), .fill(1'b1), .fill_way(2'd0),
    .victim(vr), .state_out(sr_next), .init_state(sr_init));

  int order4 [$];   // front = least recently used
  int order2 [$];
  int fifo_ptr;

  task automatic ref_use(inout int q [$], input int w);
    foreach (q[i]) if (q[i] == w) begin q.delete(i); break; end
    q.push_back(w);
  endtask

  initial begin
    #1;
    s4 = s4_init; s2 = s2_init; sf = sf_init;
    order4 = {3, 2, 1, 0};  // init ranks = way index: way 3 is least recent
    order2 = {1, 0};
    fifo_ptr = 0;
    t4 = 0; f4 = 0; tw4 = 0; fw4 = 0; t2 = 0; tw2 = 0; ff = 0; rnd = 0;
    for (int step = 0; step < 400; step++) begin
      #1;
      check(int'(v4) == order4[0], $sformatf("lru4 victim %0d exp %0d", v4, order4[0]));
      check(int'(v2) == order2[0], "lru2 victim");
      check(int'(vf) == fifo_ptr, "fifo victim");
      rnd = 2'($urandom_range(3));
      #1;
      check(vr == rnd, "random victim follows counter");
      // random operation
      t4 = 1'($urandom_range(1)); tw4 = 2'($urandom_range(3));
      f4 = 1'($urandom_range(1)); fw4 = v4;
      t2 = 1'($urandom_range(1)); tw2 = 1'($urandom_range(1));
      ff = 1'($urandom_range(1));
      #1;
      if (t4) ref_use(order4, tw4);
      if (f4) ref_use(order4, fw4);
      if (t2) ref_use(order2, tw2);
      if (ff) fifo_ptr = (fifo_ptr + 1) % 4;
      s4 = s4_next; s2 = s2_next; sf = sf_next;
      t4 = 0; f4 = 0; t2 = 0; ff = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
