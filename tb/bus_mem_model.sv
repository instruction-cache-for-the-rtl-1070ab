// bus_mem_model - behavioural model of the bus unit, memory management unit
// and main memory as seen from the instruction cache. Not synthesizable
// design content; used only by the testbenches.
//
// A burst request (mem_req pulse, mem_addr = virtual address of the first
// quad) returns the TB_QUADS quads of that transfer block, starting at the
// addressed quad and wrapping at the transfer block boundary. Timing is
// modelled in the time units of the cache study: the first quad is
// available LATENCY_TIME + ACCESS_TIME after the request, each further quad
// ACCESS_TIME later, and a quad is handed over at the first clock edge at
// or after that moment (one clock = CYCLE_TIME). mem_abort cancels the
// burst at once. Quad addresses whose bits [29:24] are all ones lie on a
// page that is "not available": such a burst ends with mem_na after the
// latency instead of data.
//
// The content of every quad is a fixed function of its 46-bit virtual
// address (quad_value), so a testbench can check every delivered quad.
module bus_mem_model
  import icache_pkg::*;
#(
  parameter int TB_QUADS     = 8,
  parameter int LATENCY_TIME = 200,
  parameter int ACCESS_TIME  = 150,
  parameter int CYCLE_TIME   = 100
) (
  input  logic            clk,
  input  logic            mem_req,
  input  logic [VA_W-1:0] mem_addr,
  input  logic            mem_abort,
  output logic            mem_valid,
  output quad_t           mem_data,
  output logic            mem_na,
  output int              bursts,
  output int              quads_sent
);

  function automatic quad_t quad_value(input logic [VA_W-1:0] va);
    return va[31:0] ^ {va[45:30], va[45:30]} ^ 32'h5A00_00A5;
  endfunction

  localparam int QW = $clog2(TB_QUADS);

  logic            active = 1'b0;
  logic [VA_W-1:0] base;
  int              sent, elapsed;

  initial begin
    mem_valid  = 1'b0;
    mem_na     = 1'b0;
    mem_data   = '0;
    bursts     = 0;
    quads_sent = 0;
  end

  always @(posedge clk) begin
    mem_valid <= 1'b0;
    mem_na    <= 1'b0;
    if (mem_req) begin
      active  <= 1'b1;
      base    <= mem_addr;
      sent    <= 0;
      elapsed <= 2 * CYCLE_TIME;   // time at the next clock edge
      bursts  <= bursts + 1;
    end else if (active) begin
      if (mem_abort) begin
        active <= 1'b0;
      end else begin
        elapsed <= elapsed + CYCLE_TIME;
        if (&base[29:24]) begin
          if (elapsed >= LATENCY_TIME) begin
            mem_na <= 1'b1;
            active <= 1'b0;
          end
        end else if (elapsed >= LATENCY_TIME + (sent + 1) * ACCESS_TIME) begin
          logic [VA_W-1:0] a;
          a = {base[VA_W-1:QW], QW'(32'(base[QW-1:0]) + sent)};
          mem_valid  <= 1'b1;
          mem_data   <= quad_value(a);
          quads_sent <= quads_sent + 1;
          sent       <= sent + 1;
          if (sent == TB_QUADS - 1) active <= 1'b0;
        end
      end
    end
  end

endmodule
