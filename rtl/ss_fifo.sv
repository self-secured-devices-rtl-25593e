// ss_fifo: synchronous first-word-fall-through FIFO.
//
// The self-secured UART holds four of these: a transmit and a receive FIFO
// for each world, each 64 bytes deep like the FIFOs of the original UART.
// The storage is a plain array (maps to distributed or block RAM); dout is
// the oldest entry whenever empty is low. A push on a full FIFO and a pop on
// an empty one are ignored, the caller flags the overflow. clr empties the
// FIFO in one cycle. Depth and width follow the published UART; the
// organisation is this design's choice.
module ss_fifo #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          push,
  input  logic [W-1:0]  din,
  input  logic          pop,
  output logic [W-1:0]  dout,
  output logic [LW-1:0] level,
  output logic          empty,
  output logic          full
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign empty = (level == '0);
  assign full  = (level == LW'(DEPTH));
  assign dout  = mem[rp];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (do_push) wp <= incr(wp);
      if (do_pop)  rp <= incr(rp);
      level <= level + LW'(do_push) - LW'(do_pop);
    end
  end

  a_level: assert property (@(posedge clk) disable iff (!rst_n) level <= LW'(DEPTH));

endmodule
