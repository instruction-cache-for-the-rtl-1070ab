// tb_fetch_buffer - checks the fetch buffer: start clears the per-quad
// valid bits and loads the address and kind of fetch, quads written in
// wrap-around order appear with their valid bits, used_before starts at 1
// for a demand fetch and 0 for a prefetch and is set by the server, and
// release deactivates the buffer.
`timescale 1ns/1ps
module tb_fetch_buffer;
  import icache_pkg::*;
  localparam int TBQ = 8, TBA_W = 43;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, start_demand = 0, release_buf = 0, wr = 0, set_used = 0;
  logic [TBA_W-1:0] start_tag = 0, tag;
  logic [2:0] wr_idx = 0;
  quad_t wr_data = 0;
  logic active, demand, used;
  logic [TBQ-1:0] qvalid;
  logic [TBQ*QUAD_W-1:0] data;

  fetch_buffer #(.TB_QUADS(TBQ), .TBA_W(TBA_W)) dut (
    .clk, .rst_n, .start, .start_tag, .start_demand, .release_buf, .wr, .wr_idx, .wr_data,
    .set_used, .active, .tag, .demand, .used, .qvalid, .data);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!active && qvalid == 0, "idle after reset");
    for (int f = 0; f < 40; f++) begin
      int first;
      logic [TBQ-1:0] expv;
      quad_t expd [TBQ];
      bit dem;
      dem = $urandom_range(1);
      first = $urandom_range(TBQ - 1);
      @(negedge clk);
      start = 1; start_tag = TBA_W'({$urandom, $urandom}); start_demand = dem;
      @(negedge clk);
      start = 0;
      check(active && tag == start_tag && demand == dem && qvalid == 0, "started");
      check(used == dem, "used_before initial value");
      expv = 0;
      for (int k = 0; k < TBQ; k++) begin
        int idx;
        idx = (first + k) % TBQ;
        wr = 1; wr_idx = 3'(idx); wr_data = $urandom; expd[idx] = wr_data; expv[idx] = 1;
        set_used = (k == 3);
        @(negedge clk);
        wr = 0; set_used = 0;
        check(qvalid == expv, "quad valid bits");
        for (int q = 0; q < TBQ; q++)
          if (expv[q]) check(data[q*QUAD_W +: QUAD_W] == expd[q], "quad data");
      end
      check(used, "used_before set by server");
      release_buf = 1;
      @(negedge clk);
      release_buf = 0;
      check(!active, "released");
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
