// read_buffer - one transfer block between the cache RAM and the
// instruction unit.
//
// When a request hits in the cache RAM the whole transfer block is copied
// into this buffer together with its transfer block address (the full
// virtual quad address without the quad-in-transfer-block bits). Later
// requests to the same transfer block are served from the buffer without
// touching the RAM, and faster. Because the buffer always holds the
// transfer block of the previous RAM hit, a buffer hit also tells the
// server that no new transfer block was entered, so no prefetch decision
// and no LRU update are needed.
//
// The buffer must be invalidated when quads are served from the fetch
// buffer, on a miss and on a flush, so that a hit really means "same
// transfer block as the previous request".
//
// Timing: load and inv act at the clock edge (inv wins); hit is a
// combinational compare of lookup_tag with the stored address.
module read_buffer
  import icache_pkg::*;
#(
  parameter int TB_QUADS = 8,
  parameter int TBA_W    = 43     // transfer block address width
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  logic [TBA_W-1:0]            load_tag,
  input  logic [TB_QUADS*QUAD_W-1:0]  load_data,
  input  logic                        inv,
  input  logic [TBA_W-1:0]            lookup_tag,
  output logic                        hit,
  output logic [TB_QUADS*QUAD_W-1:0]  data
);

  logic             valid_q;
  logic [TBA_W-1:0] tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      tag_q   <= '0;
    end else if (inv) begin
      valid_q <= 1'b0;
    end else if (load) begin
      valid_q <= 1'b1;
      tag_q   <= load_tag;
    end
  end

  always_ff @(posedge clk) begin
    if (load && !inv) data <= load_data;
  end

  assign hit = valid_q && (tag_q == lookup_tag);

endmodule
