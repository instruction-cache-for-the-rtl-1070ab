// tb_read_buffer - checks load, hit compare, data and invalidation of the
// read buffer against a reference copy.
`timescale 1ns/1ps
module tb_read_buffer;
  import icache_pkg::*;
  localparam int TBQ = 8, TBA_W = 43, W = TBQ * QUAD_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, inv = 0, hit;
  logic [TBA_W-1:0] load_tag = 0, lookup_tag = 0;
  logic [W-1:0] load_data = 0, data;

  read_buffer #(.TB_QUADS(TBQ), .TBA_W(TBA_W)) dut (
    .clk, .rst_n, .load, .load_tag, .load_data, .inv, .lookup_tag, .hit, .data);

  int checks = 0, failures = 0;
  logic r_valid = 0;
  logic [TBA_W-1:0] r_tag;
  logic [W-1:0] r_data;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = 0; inv = 0;
      // lookup: either the stored tag or a neighbour
      lookup_tag = $urandom_range(1) ? r_tag : TBA_W'({$urandom, $urandom});
      #1;
      check(hit == (r_valid && lookup_tag == r_tag), "hit");
      if (r_valid) check(data == r_data, "data");
      case ($urandom_range(3))
        0: begin
          load = 1; load_tag = TBA_W'({$urandom, $urandom});
          for (int q = 0; q < TBQ; q++) load_data[q*QUAD_W +: QUAD_W] = $urandom;
          inv = ($urandom_range(7) == 0);
          if (!inv) begin r_valid = 1; r_tag = load_tag; r_data = load_data; end
          else r_valid = 0;    // r_tag keeps the old address, so a
        end                    // stale entry would show up as a hit
        1: begin inv = 1; r_valid = 0; end
        default: ;
      endcase
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
