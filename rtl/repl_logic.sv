// repl_logic - replacement decision and update for one set.
//
// Combinational. Given the replacement state of a set it names the victim
// way (the block to be overwritten when a new block must be placed in the
// set) and computes the next state after a block of the set is used
// (touch) and/or a new block is placed in it (fill).
//
//   REPL_LRU    : the state is an ordered table of the ways, kept as one
//                 rank per way (0 = most recently used, WAYS-1 = least).
//                 The victim is the way of rank WAYS-1. Using or filling a
//                 way moves it to rank 0 and shifts the ways that were more
//                 recent than it one place down, exactly like the
//                 replacement-order table of the design description. With
//                 two ways this reduces to a single bit per set.
//   REPL_FIFO   : the state holds a counter modulo WAYS that names the
//                 victim and advances on every fill.
//   REPL_RANDOM : the victim is the global free-running counter rnd_way,
//                 which is incremented every clock; the state is unused.
//
// The state encoding (rank per way, counter in the low bits) is a choice of
// this implementation. A touch is applied before a fill when both are given.
// Reset value of the state: init_state (ranks 0..WAYS-1 in way order).
module repl_logic
  import icache_pkg::*;
#(
  parameter int    WAYS = 2,
  parameter repl_e REPL = REPL_LRU,
  localparam int   AW   = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int   SW   = WAYS * AW
) (
  input  logic [SW-1:0] state_in,
  input  logic [AW-1:0] rnd_way,
  input  logic          touch,
  input  logic [AW-1:0] touch_way,
  input  logic          fill,
  input  logic [AW-1:0] fill_way,
  output logic [AW-1:0] victim,
  output logic [SW-1:0] state_out,
  output logic [SW-1:0] init_state
);

  // Move way w to rank 0 in an LRU rank table.
  function automatic logic [SW-1:0] lru_use(input logic [SW-1:0] s, input logic [AW-1:0] w);
    logic [SW-1:0] r;
    logic [AW-1:0] rw;
    r  = s;
    rw = s[w*AW +: AW];
    for (int i = 0; i < WAYS; i++) begin
      if (s[i*AW +: AW] < rw) r[i*AW +: AW] = s[i*AW +: AW] + AW'(1);
    end
    r[w*AW +: AW] = '0;
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < WAYS; i++) init_state[i*AW +: AW] = AW'(i);
    if (REPL == REPL_FIFO) init_state = '0;
  end

  always_comb begin
    logic [SW-1:0] s;
    victim = '0;
    s      = state_in;
    unique case (REPL)
      REPL_LRU: begin
        for (int i = 0; i < WAYS; i++)
          if (state_in[i*AW +: AW] == AW'(WAYS - 1)) victim = AW'(i);
        if (touch) s = lru_use(s, touch_way);
        if (fill)  s = lru_use(s, fill_way);
      end
      REPL_FIFO: begin
        victim = state_in[AW-1:0];
        if (fill) s[AW-1:0] = (WAYS > 1) ? AW'((32'(state_in[AW-1:0]) + 1) % WAYS) : '0;
      end
      default: begin
        victim = (WAYS > 1) ? rnd_way : '0;
      end
    endcase
    state_out = s;
  end

endmodule
