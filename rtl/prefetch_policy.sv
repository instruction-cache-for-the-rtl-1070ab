// prefetch_policy - decides whether the transfer block that follows the
// current one is prefetched (one-transfer-block-lookahead).
//
// Combinational. It is consulted for the transfer block the instruction
// unit entered last, as soon as the fetcher is free: at once if it is
// idle, otherwise when it has finished its current transfer block.
//
//   PF_NEVER         : never.
//   PF_ALWAYS        : always, even if the next block is already cached.
//   PF_ON_MISSES     : when the entered transfer block missed.
//   PF_TAGGED        : when it missed, or when it is referenced for the
//                      first time since it was prefetched (used_before = 0).
//   PF_LOOKUP_ALWAYS : when a lookup finds the next block absent.
//   PF_LOOKUP_HIT    : as PF_LOOKUP_ALWAYS, but only when the entered block
//                      was a hit; after a miss the lookup is skipped.
//
// Prefetching is never requested for a block that is already being fetched
// (next_in_flight).
module prefetch_policy
  import icache_pkg::*;
#(
  parameter prefetch_e PREFETCH = PF_LOOKUP_HIT
) (
  input  logic cur_miss,        // the entered transfer block was not in the cache
  input  logic cur_used_before, // its used_before bit before this reference
  input  logic next_present,    // the next transfer block is valid in the cache
  input  logic next_in_flight,  // the next transfer block is in the fetch buffer
  output logic do_prefetch
);

  always_comb begin
    unique case (PREFETCH)
      PF_NEVER:         do_prefetch = 1'b0;
      PF_ALWAYS:        do_prefetch = 1'b1;
      PF_ON_MISSES:     do_prefetch = cur_miss;
      PF_TAGGED:        do_prefetch = cur_miss || !cur_used_before;
      PF_LOOKUP_ALWAYS: do_prefetch = !next_present;
      PF_LOOKUP_HIT:    do_prefetch = !next_present && !cur_miss;
      default:          do_prefetch = 1'b0;
    endcase
    if (next_in_flight) do_prefetch = 1'b0;
  end

endmodule
