// status_ram - tag and status information of the cache, one row per set.
//
// A row holds, for every block (way) of the set: the address tag, one
// data_valid bit and one used_before bit per transfer block, and the
// replacement state of the set (LRU order, FIFO counter). This is the
// row layout of the status RAM of a two-way cache with four transfer
// blocks per block: tag bits, LRU bits, data_valid bits, used_before bits.
// Data and status live in separate RAMs so that they can be accessed at
// the same time.
//
// Ports
//   a_* : lookup port of the server (combinational read of a whole row)
//   p_* : second lookup port of the server, used for prefetch lookups of
//         the next transfer block (combinational read)
//   b_* : lookup port of the fetcher (combinational read of the tags, with the
//         victim way of the replacement algorithm)
//   use_*  : the server referenced transfer block use_tb of way use_way:
//            touch the replacement state and set used_before.
//   fill_* : the fetcher stored a transfer block. With fill_new the way is
//            (re)allocated first: tag written, all its data_valid and
//            used_before bits cleared, replacement state updated. Then the
//            block's data_valid bit is set and used_before loaded.
//   flush  : clears every data_valid bit in one clock (also done by reset).
// All writes take effect at the rising clock edge; a flush overrides a
// fill in the same cycle.
//
// The register-array realisation with three read ports is this design's
// choice; the rows are small (91 bits at the default size).
module status_ram
  import icache_pkg::*;
#(
  parameter int    SETS  = 16,
  parameter int    WAYS  = 2,
  parameter int    TBPB  = 4,     // transfer blocks per block
  parameter int    TAG_W = 37,
  parameter repl_e REPL  = REPL_LRU,
  localparam int   SETW  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int   AW    = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int   TBW   = (TBPB > 1) ? $clog2(TBPB) : 1,
  localparam int   SW    = WAYS * AW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // server lookup
  input  logic [SETW-1:0]             a_set,
  output logic [WAYS-1:0][TAG_W-1:0]  a_tag,
  output logic [WAYS-1:0][TBPB-1:0]   a_valid,
  output logic [WAYS-1:0][TBPB-1:0]   a_used,
  // server prefetch lookup
  input  logic [SETW-1:0]             p_set,
  output logic [WAYS-1:0][TAG_W-1:0]  p_tag,
  output logic [WAYS-1:0][TBPB-1:0]   p_valid,
  // fetcher lookup
  input  logic [SETW-1:0]             b_set,
  output logic [WAYS-1:0][TAG_W-1:0]  b_tag,
  output logic [AW-1:0]               b_victim,
  // updates
  input  logic                        use_en,
  input  logic [SETW-1:0]             use_set,
  input  logic [AW-1:0]               use_way,
  input  logic [TBW-1:0]              use_tb,
  input  logic                        fill_en,
  input  logic                        fill_new,
  input  logic [SETW-1:0]             fill_set,
  input  logic [AW-1:0]               fill_way,
  input  logic [TBW-1:0]              fill_tb,
  input  logic [TAG_W-1:0]            fill_tag,
  input  logic                        fill_used,
  input  logic                        flush,
  input  logic [AW-1:0]               rnd_way
);

  logic [WAYS-1:0][TAG_W-1:0] tag_q   [SETS];
  logic [WAYS-1:0][TBPB-1:0]  valid_q [SETS];
  logic [WAYS-1:0][TBPB-1:0]  used_q  [SETS];
  logic [SW-1:0]              repl_q  [SETS];

  assign a_tag   = tag_q[a_set];
  assign a_valid = valid_q[a_set];
  assign a_used  = used_q[a_set];
  assign p_tag   = tag_q[p_set];
  assign p_valid = valid_q[p_set];
  assign b_tag   = tag_q[b_set];

  // Replacement state: victim for the fetcher's set, next state after the
  // server's touch (first) and the fetcher's fill (second).
  logic [SW-1:0] st_use_next, st_fill_in, st_fill_next, init_st;
  logic          same_set;

  assign same_set   = use_en && fill_en && (use_set == fill_set);
  assign st_fill_in = same_set ? st_use_next : repl_q[fill_set];

  repl_logic #(.WAYS(WAYS), .REPL(REPL)) u_repl_victim (
    .state_in(repl_q[b_set]), .rnd_way(rnd_way),
    .touch(1'b0), .touch_way('0), .fill(1'b0), .fill_way('0),
    .victim(b_victim), .state_out(), .init_state(init_st));

  repl_logic #(.WAYS(WAYS), .REPL(REPL)) u_repl_use (
    .state_in(repl_q[use_set]), .rnd_way(rnd_way),
    .touch(1'b1), .touch_way(use_way), .fill(1'b0), .fill_way('0),
    .victim(), .state_out(st_use_next), .init_state());

  repl_logic #(.WAYS(WAYS), .REPL(REPL)) u_repl_fill (
    .state_in(st_fill_in), .rnd_way(rnd_way),
    .touch(1'b0), .touch_way('0), .fill(fill_new), .fill_way(fill_way),
    .victim(), .state_out(st_fill_next), .init_state());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        used_q[s]  <= '0;
        repl_q[s]  <= init_st;
        tag_q[s]   <= '0;
      end
    end else begin
      if (use_en) begin
        repl_q[use_set]               <= st_use_next;
        used_q[use_set][use_way][use_tb] <= 1'b1;
      end
      if (fill_en && !flush) begin
        repl_q[fill_set] <= st_fill_next;
        if (fill_new) begin
          tag_q[fill_set][fill_way]   <= fill_tag;
          valid_q[fill_set][fill_way] <= TBPB'(1) << fill_tb;
          used_q[fill_set][fill_way]  <= TBPB'(fill_used) << fill_tb;
        end else begin
          valid_q[fill_set][fill_way][fill_tb] <= 1'b1;
          used_q[fill_set][fill_way][fill_tb]  <= fill_used;
        end
      end
      if (flush) begin
        for (int s = 0; s < SETS; s++) valid_q[s] <= '0;
      end
    end
  end

endmodule
