// data_ram - quad storage of the cache, one transfer block per row.
//
// The RAM is organised so that a complete transfer block can be copied to
// the read buffer, or from the fetch buffer, in one access. A row address
// is made of the set field, the block (way) field and the transfer block
// field, in that order from most to least significant.
//
// The row is split over two RAM halves: the low half holds quads
// 0 .. TB_QUADS/2-1 of each transfer block, the high half the rest. The
// address of the low half passes a +1 adder with an enable (inc). With
// inc = 1 a read returns the high half of row addr and the low half of row
// addr+1, so that the last quad of one transfer block and the first quad
// of the next can be read in a single access. Writes always write both
// halves of one row.
//
// Timing: synchronous single port. When en is high at a clock edge the row
// is written (we = 1) or read; read data appears on rdata after the edge
// and holds until the next read. No reset: contents are only used where a
// data_valid bit in the status RAM says they were written.
module data_ram
  import icache_pkg::*;
#(
  parameter int  ROWS     = 128,
  parameter int  TB_QUADS = 8,
  localparam int RW       = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int HALF     = TB_QUADS / 2,
  localparam int HW       = HALF * QUAD_W
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic                     inc,
  input  logic [RW-1:0]            addr,
  input  logic [TB_QUADS*QUAD_W-1:0] wdata,
  output logic [TB_QUADS*QUAD_W-1:0] rdata
);

  logic [HW-1:0] mem_lo [ROWS];
  logic [HW-1:0] mem_hi [ROWS];
  logic [RW-1:0] addr_lo;

  assign addr_lo = (inc && !we) ? addr + RW'(1) : addr;

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        mem_lo[addr_lo] <= wdata[HW-1:0];
        mem_hi[addr]    <= wdata[2*HW-1:HW];
      end else begin
        rdata[HW-1:0]    <= mem_lo[addr_lo];
        rdata[2*HW-1:HW] <= mem_hi[addr];
      end
    end
  end

endmodule
