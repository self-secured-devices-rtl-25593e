// ss_timer_counter: one world's Load/Counter bank of the self-secured timer.
//
// The timer keeps one complete bank per world, because the Counter and Load
// registers are the working part of the timer and cannot be shared. Each
// bank is a 32-bit decrementing counter in the manner of the Cortex-A9
// private timer: writing Load also writes Counter; while enabled the counter
// moves once per prescaled tick; the tick that takes it from 1 to 0 raises
// event_o for one cycle; at zero, auto-reload mode copies Load back on the
// next tick (period Load+1 ticks), while single-shot mode leaves it at zero.
//
// Interface: register writes are one-cycle strobes; a Counter/Load write in
// the same cycle as a tick wins over the tick. Outputs are registered values.
module ss_timer_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         enable,
  input  logic         auto_reload,
  input  logic         load_wr,
  input  logic [W-1:0] load_wdata,
  input  logic         cnt_wr,
  input  logic [W-1:0] cnt_wdata,
  output logic [W-1:0] load_q,
  output logic [W-1:0] count_q,
  output logic         event_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      load_q  <= '0;
      count_q <= '0;
      event_o <= 1'b0;
    end else begin
      event_o <= 1'b0;
      if (load_wr) begin
        load_q  <= load_wdata;
        count_q <= load_wdata;
      end else if (cnt_wr) begin
        count_q <= cnt_wdata;
      end else if (tick && enable) begin
        if (count_q != '0) begin
          count_q <= count_q - 1'b1;
          if (count_q == W'(1)) event_o <= 1'b1;
        end else if (auto_reload) begin
          count_q <= load_q;
        end
      end
    end
  end

endmodule
