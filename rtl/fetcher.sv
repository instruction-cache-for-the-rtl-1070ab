// fetcher - fetches transfer blocks from main memory into the cache.
//
// The fetcher works in parallel with the server. It performs both demand
// fetches (after a miss, started by the server) and prefetches, since both
// are the same operation: fetch one transfer block over the 32-bit bus into
// the fetch buffer and then store it in the cache.
//
// Operation
//   IDLE  : on start, opens the fetch buffer for transfer block start_tba
//           and sends one burst request to the bus unit. With WRAP_AROUND a
//           demand fetch begins at the requested quad (start_word) and
//           wraps round inside the transfer block; prefetches begin at quad
//           0.
//   BURST : each quad returned by the bus (mem_valid) goes to the fetch
//           buffer. A stop from the server (a miss elsewhere) aborts the
//           burst at once (mem_abort) and the fetched quads are dropped. A
//           "not available" status from the memory management unit
//           (mem_na) ends the fetch and is reported on na.
//   STORE : with the whole block in the buffer, the block is placed only
//           now: if a way of the set already carries the tag, that way is
//           used, otherwise the replacement victim is reallocated. The
//           fetcher then waits for the data RAM (the server has priority)
//           and writes the row and the status (data_valid, used_before) in
//           one cycle. A stop is ignored here since the block is complete;
//           a flush is not.
// Deferring the placement until the block is complete avoids replacing a
// full block by one that is later abandoned.
//
// Bus interface (this design's choice): mem_req is a one-cycle pulse with
// the 46-bit virtual address of the first quad; the bus unit returns
// TB_QUADS quads of that transfer block, one per mem_valid, wrapping at the
// transfer block boundary. mem_abort (one cycle) cancels the burst.
module fetcher
  import icache_pkg::*;
#(
  parameter int  SETS        = 16,
  parameter int  WAYS        = 2,
  parameter int  TBPB        = 4,
  parameter int  TB_QUADS    = 8,
  parameter bit  WRAP_AROUND = 1'b1,
  localparam int QW    = (TB_QUADS > 1) ? $clog2(TB_QUADS) : 1,
  localparam int TBA_W = VA_W - QW,
  localparam int SETW  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int TBW   = (TBPB > 1) ? $clog2(TBPB) : 1,
  localparam int AW    = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int SETB  = $clog2(SETS),   // field widths, 0 for a single set,
  localparam int TBB   = $clog2(TBPB),   // one transfer block per block
  localparam int AB    = $clog2(WAYS),   // or a direct-mapped cache
  localparam int TAG_W = TBA_W - TBB - SETB,
  localparam int RW    = (SETB + AB + TBB > 0) ? SETB + AB + TBB : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // control from the server
  input  logic                        start,
  input  logic [TBA_W-1:0]            start_tba,
  input  logic                        start_demand,
  input  logic [QW-1:0]               start_word,
  input  logic                        stop,
  input  logic                        flush,
  output logic                        busy,
  output logic                        storing,
  output logic                        done,
  output logic                        na,
  output logic                        wrapped,     // a demand fetch began mid-block
  // bus unit / memory management unit
  output logic                        mem_req,
  output logic [VA_W-1:0]             mem_addr,
  output logic                        mem_abort,
  input  logic                        mem_valid,
  input  logic [QUAD_W-1:0]           mem_data,
  input  logic                        mem_na,
  // fetch buffer
  output logic                        fb_start,
  output logic [TBA_W-1:0]            fb_start_tag,
  output logic                        fb_start_demand,
  output logic                        fb_release,
  output logic                        fb_wr,
  output logic [QW-1:0]               fb_wr_idx,
  output logic [QUAD_W-1:0]           fb_wr_data,
  input  logic [TBA_W-1:0]            fb_tag,
  input  logic                        fb_used,
  input  logic [TB_QUADS*QUAD_W-1:0]  fb_data,
  // status RAM
  output logic [SETW-1:0]             b_set,
  input  logic [WAYS-1:0][TAG_W-1:0]  b_tag,
  input  logic [AW-1:0]               b_victim,
  output logic                        fill_en,
  output logic                        fill_new,
  output logic [SETW-1:0]             fill_set,
  output logic [AW-1:0]               fill_way,
  output logic [TBW-1:0]              fill_tb,
  output logic [TAG_W-1:0]            fill_tag,
  output logic                        fill_used,
  // data RAM write
  output logic                        ram_req,
  input  logic                        ram_gnt,
  output logic [RW-1:0]               ram_addr,
  output logic [TB_QUADS*QUAD_W-1:0]  ram_wdata
);

  typedef enum logic [1:0] {F_IDLE, F_BURST, F_STORE} fstate_e;
  fstate_e          state_q;
  logic [QW-1:0]    idx_q;
  logic [QW:0]      cnt_q;

  // Fields of the transfer block being fetched.
  logic [TBW-1:0]   tb_f;
  logic [SETW-1:0]  set_f;
  logic [TAG_W-1:0] tag_f;
  assign tb_f  = (TBPB > 1) ? fb_tag[TBW-1:0] : '0;
  assign set_f = (SETS > 1) ? fb_tag[TBB +: SETW] : '0;
  assign tag_f = fb_tag[TBA_W-1 -: TAG_W];

  // Way selection at store time.
  logic          match;
  logic [AW-1:0] match_way, way;
  always_comb begin
    match     = 1'b0;
    match_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (b_tag[w] == tag_f) begin
        match     = 1'b1;
        match_way = AW'(w);
      end
    end
  end
  assign way = match ? match_way : b_victim;

  assign b_set      = set_f;
  assign busy       = (state_q != F_IDLE);
  assign storing    = (state_q == F_STORE);
  assign ram_req    = (state_q == F_STORE) && !flush;
  assign ram_addr   = RW'((32'(set_f) << (AB + TBB)) | (32'(way) << TBB) | 32'(tb_f));
  assign ram_wdata  = fb_data;

  assign fill_en    = ram_req && ram_gnt;
  assign fill_new   = !match;
  assign fill_set   = set_f;
  assign fill_way   = way;
  assign fill_tb    = tb_f;
  assign fill_tag   = tag_f;
  assign fill_used  = fb_used;

  logic [QW-1:0] first_word;
  assign first_word = (WRAP_AROUND && start_demand) ? start_word : '0;

  assign fb_start        = (state_q == F_IDLE) && start && !flush;
  assign fb_start_tag    = start_tba;
  assign fb_start_demand = start_demand;
  assign mem_req         = fb_start;
  assign mem_addr        = {start_tba, first_word};
  assign wrapped         = fb_start && (first_word != '0);

  assign fb_wr      = (state_q == F_BURST) && mem_valid && !stop && !flush;
  assign fb_wr_idx  = idx_q;
  assign fb_wr_data = mem_data;

  assign mem_abort  = (state_q == F_BURST) && (stop || flush);
  assign na         = (state_q == F_BURST) && mem_na && !stop && !flush;
  assign done       = fill_en;
  assign fb_release = mem_abort || na || fill_en || ((state_q == F_STORE) && flush);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= F_IDLE;
      idx_q   <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        F_IDLE: if (fb_start) begin
          state_q <= F_BURST;
          idx_q   <= first_word;
          cnt_q   <= '0;
        end
        F_BURST: begin
          if (mem_abort || na) begin
            state_q <= F_IDLE;
          end else if (mem_valid) begin
            idx_q <= (TB_QUADS > 1) ? QW'((32'(idx_q) + 1) % TB_QUADS) : '0;
            cnt_q <= cnt_q + 1'b1;
            if (32'(cnt_q) == TB_QUADS - 1) state_q <= F_STORE;
          end
        end
        F_STORE: if (fill_en || flush) state_q <= F_IDLE;
        default: state_q <= F_IDLE;
      endcase
    end
  end

endmodule
