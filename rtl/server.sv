// server - serves the double-quad requests of the instruction unit.
//
// The instruction unit asks for two consecutive quads by giving the
// address of the first one (quad aligned, not 64-bit aligned). The server
// looks each quad up, in this order of preference:
//   1. read buffer   - same transfer block as the previous RAM hit;
//   2. fetch buffer  - the transfer block is being fetched; quads are
//                      handed over as soon as they have arrived;
//   3. cache RAM     - status RAM tag/data_valid lookup, then a data RAM
//                      read of the whole transfer block, which is also
//                      copied into the read buffer;
//   4. miss          - the fetcher is asked for a demand fetch. If it is
//                      busy with another transfer block it is stopped at
//                      once (PREFETCH_STOP / DEMAND_FETCH_STOP) or, with the
//                      option off or while it is already storing a complete
//                      block, the server waits for it.
// When the two quads lie in different transfer blocks the request is served
// in two phases, one quad each, with a separate ready signal per quad
// (rsp_rdy0, rsp_rdy1), so no extra staging buffer is needed. With
// SPLIT_READ, if both transfer blocks are in the same cached block, one
// data RAM read with the +1 adder of the split data RAM returns both quads.
//
// On entering a new transfer block (any lookup that is not a read buffer
// hit) the server updates the replacement state and used_before bit and
// records a prefetch decision for the next transfer block. The decision is
// taken by prefetch_policy as soon as the fetcher is free: at once when it
// is idle, otherwise when it has finished its current fetch. The read
// buffer is invalidated on a miss and when quads come from the fetch
// buffer, so that a read buffer hit always means "same transfer block".
//
// Interface: req_valid/req_ready handshake with a 46-bit virtual quad
// address; results are held on rsp_quad0/1 with rsp_rdy0/1 until the next
// request is accepted. rsp_err marks a request whose data the memory
// management unit reported as not available. flush_req invalidates the
// whole cache once the server is idle.
// Timing: read buffer hit 2 cycles from acceptance to ready, fetch buffer
// hit 3 or more, RAM hit 3, crossing requests add the second phase.
// The concrete handshake, the cycle counts and the pending-decision
// register are this design's choices.
module server
  import icache_pkg::*;
#(
  parameter int        SETS              = 16,
  parameter int        WAYS              = 2,
  parameter int        TBPB              = 4,
  parameter int        TB_QUADS          = 8,
  parameter prefetch_e PREFETCH          = PF_LOOKUP_HIT,
  parameter bit        PREFETCH_STOP     = 1'b1,
  parameter bit        DEMAND_FETCH_STOP = 1'b1,
  parameter bit        SPLIT_READ        = 1'b1,
  localparam int QW    = (TB_QUADS > 1) ? $clog2(TB_QUADS) : 1,
  localparam int TBA_W = VA_W - QW,
  localparam int SETW  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int TBW   = (TBPB > 1) ? $clog2(TBPB) : 1,
  localparam int AW    = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int SETB  = $clog2(SETS),   // field widths, 0 for a single set,
  localparam int TBB   = $clog2(TBPB),   // one transfer block per block
  localparam int AB    = $clog2(WAYS),   // or a direct-mapped cache
  localparam int TAG_W = TBA_W - TBB - SETB,
  localparam int RW    = (SETB + AB + TBB > 0) ? SETB + AB + TBB : 1,
  localparam int TBD_W = TB_QUADS * QUAD_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // instruction unit
  input  logic                        req_valid,
  input  logic [VA_W-1:0]             req_addr,
  output logic                        req_ready,
  output logic [QUAD_W-1:0]           rsp_quad0,
  output logic [QUAD_W-1:0]           rsp_quad1,
  output logic                        rsp_rdy0,
  output logic                        rsp_rdy1,
  output logic                        rsp_err,
  input  logic                        flush_req,
  output logic                        flush,
  // read buffer
  output logic [TBA_W-1:0]            rb_lookup_tag,
  input  logic                        rb_hit,
  input  logic [TBD_W-1:0]            rb_data,
  output logic                        rb_load,
  output logic [TBA_W-1:0]            rb_load_tag,
  output logic                        rb_inv,
  // fetch buffer
  input  logic                        fb_active,
  input  logic [TBA_W-1:0]            fb_tag,
  input  logic                        fb_demand,
  input  logic [TB_QUADS-1:0]         fb_qvalid,
  input  logic [TBD_W-1:0]            fb_data,
  output logic                        fb_set_used,
  // status RAM
  output logic [SETW-1:0]             a_set,
  input  logic [WAYS-1:0][TAG_W-1:0]  a_tag,
  input  logic [WAYS-1:0][TBPB-1:0]   a_valid,
  input  logic [WAYS-1:0][TBPB-1:0]   a_used,
  output logic [SETW-1:0]             p_set,
  input  logic [WAYS-1:0][TAG_W-1:0]  p_tag,
  input  logic [WAYS-1:0][TBPB-1:0]   p_valid,
  output logic                        use_en,
  output logic [SETW-1:0]             use_set,
  output logic [AW-1:0]               use_way,
  output logic [TBW-1:0]              use_tb,
  // data RAM read
  output logic                        ram_rd,
  output logic                        ram_inc,
  output logic [RW-1:0]               ram_addr,
  input  logic [TBD_W-1:0]            ram_rdata,
  // fetcher
  output logic                        f_start,
  output logic [TBA_W-1:0]            f_start_tba,
  output logic                        f_start_demand,
  output logic [QW-1:0]               f_start_word,
  output logic                        f_stop,
  input  logic                        f_busy,
  input  logic                        f_storing,
  input  logic                        f_na,
  // events, one-cycle pulses (for monitoring)
  output logic                        ev_rb_hit,
  output logic                        ev_ram_hit,
  output logic                        ev_fb_hit,
  output logic                        ev_miss,
  output logic                        ev_prefetch,
  output logic                        ev_stop,
  output logic                        ev_split,
  output logic                        ev_cross
);

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_RAM, S_FB} sstate_e;
  sstate_e          state_q;
  logic [VA_W-1:0]  base_q;
  logic             phase_q, split_q, missed_q, entered_q;
  logic [AW-1:0]    way_q;
  logic             used_q;
  logic             flush_pend_q;

  // pending prefetch decision for the transfer block after the entered one
  logic             pend_q, pend_miss_q, pend_used_q;
  logic [TBA_W-1:0] pend_tba_q;
  logic [TBA_W-1:0] last_tba_q;   // transfer block entered last

  // Current quad and its fields.
  logic [VA_W-1:0]  cur;
  logic [TBA_W-1:0] cur_tba;
  logic [QW-1:0]    cur_word;
  logic [TBW-1:0]   cur_tb;
  logic [SETW-1:0]  cur_set;
  logic [TAG_W-1:0] cur_tag;
  logic             crosses;      // the two quads are in different transfer blocks

  assign cur      = phase_q ? base_q + VA_W'(1) : base_q;
  assign cur_tba  = cur[VA_W-1:QW];
  assign cur_word = cur[QW-1:0];
  assign cur_tb   = (TBPB > 1) ? cur_tba[TBW-1:0] : '0;
  assign cur_set  = (SETS > 1) ? cur_tba[TBB +: SETW] : '0;
  assign cur_tag  = cur_tba[TBA_W-1 -: TAG_W];
  assign crosses    = (base_q[QW-1:0] == QW'(TB_QUADS - 1));

  // Quads needed in this phase: bit 0 = first quad, bit 1 = second quad.
  logic need0, need1;
  assign need0 = !phase_q;
  assign need1 = phase_q || !crosses;

  // Status lookup of the current transfer block.
  logic          st_hit;
  logic [AW-1:0] st_way;
  always_comb begin
    st_hit = 1'b0;
    st_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (a_tag[w] == cur_tag && a_valid[w][cur_tb]) begin
        st_hit = 1'b1;
        st_way = AW'(w);
      end
    end
  end
  assign a_set = cur_set;

  // The next transfer block is in the same cached block and valid.
  logic split_ok;
  assign split_ok = SPLIT_READ && (TB_QUADS > 1) && (TBPB > 1) && !phase_q && crosses &&
                    (32'(cur_tb) != TBPB - 1) && a_valid[st_way][cur_tb + TBW'(1)];

  logic fb_match;
  assign fb_match = fb_active && (fb_tag == cur_tba);

  assign rb_lookup_tag = cur_tba;

  // ---------------------------------------------------------------------
  // Delivery of quads from a transfer block image.
  logic [TBD_W-1:0] src_data;
  logic [TB_QUADS-1:0] src_qv;
  logic             deliver;
  logic             d0, d1;    // quads delivered this cycle
  logic [QW-1:0]    w1;
  assign w1 = cur_word + QW'(1);

  always_comb begin
    src_data = rb_data;
    src_qv   = '1;
    deliver  = 1'b0;
    unique case (state_q)
      S_LOOK: begin
        src_data = rb_data;
        deliver  = rb_hit;
      end
      S_RAM: begin
        src_data = ram_rdata;
        deliver  = 1'b1;
      end
      S_FB: begin
        src_data = fb_data;
        src_qv   = fb_qvalid;
        deliver  = fb_match;
      end
      default: ;
    endcase
    d0 = deliver && need0 && !rsp_rdy0 && src_qv[cur_word];
    d1 = deliver && need1 && !rsp_rdy1 &&
         (phase_q ? src_qv[cur_word] : src_qv[w1]);
    if (state_q == S_RAM && split_q) begin
      d0 = !rsp_rdy0;
      d1 = !rsp_rdy1;
    end
  end

  logic rdy0_n, rdy1_n, phase_done;
  assign rdy0_n     = rsp_rdy0 || d0;
  assign rdy1_n     = rsp_rdy1 || d1;
  assign phase_done = (!need0 || rdy0_n) && (!need1 || rdy1_n);

  // ---------------------------------------------------------------------
  // Miss handling and demand fetch start.
  logic look_miss, dem_start;
  assign look_miss = (state_q == S_LOOK) && !rb_hit && !fb_match && !st_hit;
  assign dem_start = look_miss && !f_busy;
  assign f_stop    = look_miss && f_busy && !f_storing &&
                     (fb_demand ? DEMAND_FETCH_STOP : PREFETCH_STOP);

  // Prefetch decision for the pending transfer block.
  logic       nxt_present, nxt_flight, pf_do, pf_eval;
  logic [TBW-1:0]   pend_tb;
  logic [TAG_W-1:0] pend_tag;
  assign pend_tb  = (TBPB > 1) ? pend_tba_q[TBW-1:0] : '0;
  assign pend_tag = pend_tba_q[TBA_W-1 -: TAG_W];
  assign p_set    = (SETS > 1) ? pend_tba_q[TBB +: SETW] : '0;
  always_comb begin
    nxt_present = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (p_tag[w] == pend_tag && p_valid[w][pend_tb]) nxt_present = 1'b1;
  end
  assign nxt_flight = fb_active && (fb_tag == pend_tba_q);

  prefetch_policy #(.PREFETCH(PREFETCH)) u_policy (
    .cur_miss(pend_miss_q), .cur_used_before(pend_used_q),
    .next_present(nxt_present), .next_in_flight(nxt_flight), .do_prefetch(pf_do));

  assign pf_eval = pend_q && !f_busy && !dem_start && !flush;

  assign f_start        = dem_start || (pf_eval && pf_do);
  assign f_start_tba    = dem_start ? cur_tba : pend_tba_q;
  assign f_start_demand = dem_start;
  assign f_start_word   = cur_word;

  // ---------------------------------------------------------------------
  // RAM access, read buffer, status update.
  assign ram_rd   = (state_q == S_LOOK) && !rb_hit && !fb_match && st_hit;
  assign ram_inc  = split_ok;
  assign ram_addr = RW'((32'(cur_set) << (AB + TBB)) | (32'(st_way) << TBB) | 32'(cur_tb));

  assign rb_load     = (state_q == S_RAM) && !split_q;
  assign rb_load_tag = cur_tba;
  assign rb_inv      = flush || look_miss || ((state_q == S_LOOK) && !rb_hit && fb_match) ||
                       ((state_q == S_RAM) && split_q);

  logic [TBW-1:0] use_tb_n;
  assign use_tb_n = split_q ? cur_tb + TBW'(1) : cur_tb;
  assign use_en   = (state_q == S_RAM);
  assign use_set  = cur_set;
  assign use_way  = way_q;
  assign use_tb   = use_tb_n;

  assign fb_set_used = (state_q == S_FB) && fb_match;

  // New transfer block entered this cycle (for the prefetch decision).
  logic             enter;
  logic [TBA_W-1:0] enter_tba;
  logic             enter_miss, enter_used;
  always_comb begin
    enter      = 1'b0;
    enter_tba  = cur_tba + TBA_W'(1);
    enter_miss = 1'b0;
    enter_used = 1'b1;
    if (state_q == S_RAM) begin
      enter = 1'b1;
      if (split_q) enter_tba = cur_tba + TBA_W'(2);
      enter_used = used_q;
    end else if (state_q == S_LOOK && !rb_hit && fb_match && !entered_q &&
                 cur_tba != last_tba_q) begin
      enter      = 1'b1;
      enter_miss = missed_q;
      enter_used = fb_demand;
    end else if (dem_start) begin
      enter      = 1'b1;
      enter_miss = 1'b1;
    end
  end

  assign flush     = (state_q == S_IDLE) && (flush_req || flush_pend_q);
  assign req_ready = (state_q == S_IDLE) && !flush_req && !flush_pend_q;

  assign ev_rb_hit   = (state_q == S_LOOK) && rb_hit;
  assign ev_ram_hit  = ram_rd;
  assign ev_fb_hit   = (state_q == S_LOOK) && !rb_hit && fb_match && !missed_q;
  assign ev_miss     = look_miss && !missed_q;
  assign ev_prefetch = pf_eval && pf_do;
  assign ev_stop     = f_stop;
  assign ev_split    = ram_rd && split_ok;
  assign ev_cross    = req_valid && req_ready && (req_addr[QW-1:0] == QW'(TB_QUADS - 1));

  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      base_q       <= '0;
      phase_q      <= 1'b0;
      split_q      <= 1'b0;
      missed_q     <= 1'b0;
      entered_q    <= 1'b0;
      way_q        <= '0;
      used_q       <= 1'b0;
      rsp_rdy0     <= 1'b0;
      rsp_rdy1     <= 1'b0;
      rsp_err      <= 1'b0;
      rsp_quad0    <= '0;
      rsp_quad1    <= '0;
      flush_pend_q <= 1'b0;
      pend_q       <= 1'b0;
      pend_miss_q  <= 1'b0;
      pend_used_q  <= 1'b0;
      pend_tba_q   <= '0;
      last_tba_q   <= '1;
    end else begin
      if (flush_req && state_q != S_IDLE) flush_pend_q <= 1'b1;
      if (flush) flush_pend_q <= 1'b0;

      // pending prefetch decision
      if (pf_eval) pend_q <= 1'b0;
      if (flush)   pend_q <= 1'b0;
      if (enter) begin
        pend_q       <= 1'b1;
        pend_tba_q   <= enter_tba;
        pend_miss_q  <= enter_miss;
        pend_used_q  <= enter_used;
        last_tba_q   <= enter_tba - TBA_W'(1);
      end

      // quads
      if (d0) rsp_quad0 <= src_data[cur_word*QUAD_W +: QUAD_W];
      if (d1) begin
        if (split_q && state_q == S_RAM) rsp_quad1 <= src_data[0 +: QUAD_W];
        else if (phase_q)                rsp_quad1 <= src_data[cur_word*QUAD_W +: QUAD_W];
        else                             rsp_quad1 <= src_data[w1*QUAD_W +: QUAD_W];
      end
      if (d0) rsp_rdy0 <= 1'b1;
      if (d1) rsp_rdy1 <= 1'b1;

      unique case (state_q)
        S_IDLE: begin
          if (req_valid && req_ready) begin
            base_q    <= req_addr;
            phase_q   <= 1'b0;
            missed_q  <= 1'b0;
            entered_q <= 1'b0;
            rsp_rdy0  <= 1'b0;
            rsp_rdy1  <= 1'b0;
            rsp_err   <= 1'b0;
            state_q   <= S_LOOK;
          end
        end
        S_LOOK: begin
          if (rb_hit) begin
            if (phase_done) begin
              if (!phase_q && crosses) begin
                phase_q <= 1'b1; missed_q <= 1'b0; entered_q <= 1'b0;
              end else state_q <= S_IDLE;
            end
          end else if (fb_match) begin
            entered_q <= 1'b1;
            state_q   <= S_FB;
          end else if (st_hit) begin
            way_q   <= st_way;
            used_q  <= a_used[st_way][cur_tb];
            split_q <= split_ok;
            state_q <= S_RAM;
          end else begin
            missed_q <= 1'b1;
            if (dem_start) begin
              entered_q <= 1'b1;
              state_q   <= S_FB;
            end
          end
        end
        S_RAM: begin
          split_q <= 1'b0;
          if (!phase_q && crosses && !split_q) begin
            phase_q <= 1'b1; missed_q <= 1'b0; entered_q <= 1'b0;
            state_q <= S_LOOK;
          end else state_q <= S_IDLE;
        end
        S_FB: begin
          if (fb_match && f_na) begin
            rsp_rdy0 <= 1'b1;
            rsp_rdy1 <= 1'b1;
            rsp_err  <= 1'b1;
            state_q  <= S_IDLE;
          end else if (fb_match && phase_done) begin
            if (!phase_q && crosses) begin
              phase_q <= 1'b1; missed_q <= 1'b0; entered_q <= 1'b0;
              state_q <= S_LOOK;
            end else state_q <= S_IDLE;
          end else if (!fb_match) begin
            state_q <= S_LOOK;   // stored in the RAM meanwhile, or abandoned
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
