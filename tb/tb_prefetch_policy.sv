// tb_prefetch_policy - exhaustive check of the six prefetch initiation
// methods against their definitions, for all input combinations.
`timescale 1ns/1ps
module tb_prefetch_policy;
  import icache_pkg::*;

  int checks = 0, failures = 0;
  logic cur_miss, cur_used, nxt_present, nxt_flight;
  logic [5:0] dp;

  prefetch_policy #(.PREFETCH(PF_NEVER))         u0 (.cur_miss, .cur_used_before(cur_used), .next_present(nxt_present), .next_in_flight(nxt_flight), .do_prefetch(dp[0]));
  prefetch_policy #(.PREFETCH(PF_ALWAYS))        u1 (.cur_miss, .cur_used_before(cur_used), .next_present(nxt_present), .next_in_flight(nxt_flight), .do_prefetch(dp[1]));
  prefetch_policy #(.PREFETCH(PF_ON_MISSES))     u2 (.cur_miss, .cur_used_before(cur_used), .next_present(nxt_present), .next_in_flight(nxt_flight), .do_prefetch(dp[2]));
  prefetch_policy #(.PREFETCH(PF_TAGGED))        u3 (.cur_miss, .cur_used_before(cur_used), .next_present(nxt_present), .next_in_flight(nxt_flight), .do_prefetch(dp[3]));
  prefetch_policy #(.PREFETCH(PF_LOOKUP_HIT))    u4 (.cur_miss, .cur_used_before(cur_used), .next_present(nxt_present), .next_in_flight(nxt_flight), .do_prefetch(dp[4]));
  prefetch_policy #(.PREFETCH(PF_LOOKUP_ALWAYS)) u5 (.cur_miss, .cur_used_before(cur_used), .next_present(nxt_present), .next_in_flight(nxt_flight), .do_prefetch(dp[5]));

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [5:0] exp;
      {cur_miss, cur_used, nxt_present, nxt_flight} = 4'(v);
      #1;
      exp[0] = 0;
      exp[1] = 1;
      exp[2] = cur_miss;
      exp[3] = cur_miss | ~cur_used;
      exp[4] = ~nxt_present & ~cur_miss;
      exp[5] = ~nxt_present;
      if (nxt_flight) exp = '0;
      for (int p = 0; p < 6; p++) begin
        checks++;
        if (dp[p] !== exp[p]) begin
          failures++;
          $display("FAIL policy %0d inputs %b got %b", p, 4'(v), dp[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
