// fetch_buffer - one transfer block between main memory and the cache RAM.
//
// Quads arriving from the 32-bit memory bus are written here one at a time
// at bus speed, each with its own valid bit, so that the server can hand a
// quad to the instruction unit as soon as it has arrived, before the whole
// transfer block is in. When the transfer block is complete the fetcher
// copies it to the data RAM in one access. The buffer is "two ported": the
// fetcher writes while the server reads.
//
// The buffer carries the transfer block address being fetched (visible to
// the server so that it can tell a fetch-buffer hit from a miss), whether
// the fetch is a demand fetch or a prefetch, and a used_before bit that the
// server sets when it reads from the buffer; the fetcher copies that bit to
// the status RAM together with the data.
//
// Timing: start clears all quad valid bits, loads the address and makes
// the buffer active; release makes it inactive. All act at the clock
// edge; outputs are registers.
module fetch_buffer
  import icache_pkg::*;
#(
  parameter int  TB_QUADS = 8,
  parameter int  TBA_W    = 43,
  localparam int QW       = (TB_QUADS > 1) ? $clog2(TB_QUADS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [TBA_W-1:0]            start_tag,
  input  logic                        start_demand,
  input  logic                        release_buf,
  input  logic                        wr,
  input  logic [QW-1:0]               wr_idx,
  input  logic [QUAD_W-1:0]           wr_data,
  input  logic                        set_used,
  output logic                        active,
  output logic [TBA_W-1:0]            tag,
  output logic                        demand,
  output logic                        used,
  output logic [TB_QUADS-1:0]         qvalid,
  output logic [TB_QUADS*QUAD_W-1:0]  data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      tag    <= '0;
      demand <= 1'b0;
      used   <= 1'b0;
      qvalid <= '0;
    end else if (start) begin
      active <= 1'b1;
      tag    <= start_tag;
      demand <= start_demand;
      used   <= start_demand;   // a demand-fetched block counts as used
      qvalid <= '0;
    end else begin
      if (release_buf) active <= 1'b0;
      if (wr) qvalid[wr_idx] <= 1'b1;
      if (set_used) used <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr && !start) data[wr_idx*QUAD_W +: QUAD_W] <= wr_data;
  end

endmodule
