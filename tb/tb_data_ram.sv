// tb_data_ram - checks the split data RAM (128 rows of 8 quads): random
// whole-row writes, plain row reads, and reads with the +1 adder enabled
// that return the high half of a row and the low half of the next row.
// Reads have one cycle of latency.
`timescale 1ns/1ps
module tb_data_ram;
  import icache_pkg::*;
  localparam int ROWS = 128, TBQ = 8, W = TBQ * QUAD_W;

  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0, inc = 0;
  logic [6:0] addr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] ref_mem [ROWS];

  data_ram #(.ROWS(ROWS), .TB_QUADS(TBQ)) dut (.clk, .en, .we, .inc, .addr, .wdata, .rdata);

  int checks = 0, failures = 0;

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 7'(r); inc = $urandom_range(1);  // inc ignored on writes
      for (int q = 0; q < TBQ; q++) wdata[q*QUAD_W +: QUAD_W] = $urandom;
      ref_mem[r] = wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      int r;
      logic [W-1:0] exp;
      @(negedge clk);
      r = $urandom_range(ROWS - 1);
      if ($urandom_range(3) == 0) begin
        en = 1; we = 1; addr = 7'(r); inc = 0;
        for (int q = 0; q < TBQ; q++) wdata[q*QUAD_W +: QUAD_W] = $urandom;
        ref_mem[r] = wdata;
        continue;
      end
      en = 1; we = 0; addr = 7'(r); inc = (r < ROWS - 1) ? 1'($urandom_range(1)) : 1'b0;
      exp[W-1:W/2] = ref_mem[r][W-1:W/2];
      exp[W/2-1:0] = inc ? ref_mem[r+1][W/2-1:0] : ref_mem[r][W/2-1:0];
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d inc %0d", r, inc);
      end
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
