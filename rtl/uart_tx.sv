// uart_tx: transmitter of the self-secured UART.
//
// One shift engine serves both worlds. At every frame start it takes the
// next byte from the secure Tx FIFO, and from the non-secure Tx FIFO only
// when the secure one is empty, so secure traffic always goes first; a frame
// already on the line is never cut. This priority rule is the published one.
// A frame is: start bit (0), 6/7/8 data bits LSB first, an optional parity
// bit, then one or two stop bits (1.5 is sent as 2). Frames follow each
// other without idle time while data is waiting.
//
// Timing: the line changes only on bit_en (one pulse per bit time from the
// baud generator); the FIFO is popped in the bit_en cycle that drives the
// start bit. hold (flow control) and en only stop a new frame from starting.
// brk drives the line low from the next frame boundary until it is released.
module uart_tx
  import ss_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  logic      bit_en,
  input  uart_fmt_t fmt,
  input  logic      s_empty,
  input  logic [7:0] s_data,
  output logic      s_pop,
  input  logic      ns_empty,
  input  logic [7:0] ns_data,
  output logic      ns_pop,
  input  logic      brk,
  input  logic      hold,
  output logic      txd,
  output logic      active,
  output logic      cur_ns
);

  typedef enum logic [2:0] {T_IDLE, T_START, T_DATA, T_PAR, T_STOP1, T_STOP2, T_BREAK} tstate_t;
  tstate_t    st;
  logic [7:0] sh;
  logic [2:0] idx;
  logic       par_q;

  // Start a new frame when allowed, secure first.
  logic can_start, pick_s, pick_ns;
  assign can_start = en && !hold && !brk;
  assign pick_s    = can_start && !s_empty;
  assign pick_ns   = can_start && s_empty && !ns_empty;

  // The frame boundary is the bit_en that ends the previous frame (or any
  // bit_en while idle).
  logic at_boundary;
  always_comb begin
    at_boundary = 1'b0;
    if (bit_en) begin
      unique case (st)
        T_IDLE, T_BREAK: at_boundary = 1'b1;
        T_STOP1:         at_boundary = !fmt.two_stop;
        T_STOP2:         at_boundary = 1'b1;
        default:         at_boundary = 1'b0;
      endcase
    end
  end

  assign s_pop  = at_boundary && pick_s;
  assign ns_pop = at_boundary && pick_ns;
  assign active = (st != T_IDLE) && (st != T_BREAK);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= T_IDLE;
      txd    <= 1'b1;
      sh     <= '0;
      idx    <= '0;
      par_q  <= 1'b0;
      cur_ns <= 1'b0;
    end else if (at_boundary) begin
      if (pick_s || pick_ns) begin
        sh     <= pick_s ? s_data : ns_data;
        par_q  <= parity_bit(pick_s ? s_data : ns_data, fmt.nbits, fmt.par);
        cur_ns <= pick_ns;
        idx    <= '0;
        txd    <= 1'b0;
        st     <= T_START;
      end else if (brk) begin
        txd <= 1'b0;
        st  <= T_BREAK;
      end else begin
        txd <= 1'b1;
        st  <= T_IDLE;
      end
    end else if (bit_en) begin
      unique case (st)
        T_START: begin
          txd <= sh[0];
          st  <= T_DATA;
        end
        T_DATA: begin
          if ({1'b0, idx} == fmt.nbits - 4'd1) begin
            txd <= fmt.par_en ? par_q : 1'b1;
            st  <= fmt.par_en ? T_PAR : T_STOP1;
          end else begin
            idx <= idx + 3'd1;
            txd <= sh[idx + 3'd1];
          end
        end
        T_PAR: begin
          txd <= 1'b1;
          st  <= T_STOP1;
        end
        T_STOP1: begin
          txd <= 1'b1;
          st  <= T_STOP2;
        end
        default: ;
      endcase
    end
  end

  a_no_double_pop: assert property (@(posedge clk) disable iff (!rst_n) !(s_pop && ns_pop));
  a_secure_first:  assert property (@(posedge clk) disable iff (!rst_n) ns_pop |-> s_empty);

endmodule
