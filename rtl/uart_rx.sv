// uart_rx: receiver of the self-secured UART.
//
// The receiver watches two serial inputs, one per world, and runs a single
// shift engine. A falling edge on the secure line always wins: it starts a
// secure frame when the receiver is idle, and it also aborts a non-secure
// frame in progress, whose partial data is dropped (dumped pulses) before the
// receiver restarts on the secure start bit. A non-secure start edge is only
// taken while idle; one that arrives during a secure frame is lost. This
// secure-first policy is the published one; the oversampling scheme below is
// this design's choice.
//
// Both lines pass a two-flop synchroniser and are looked at on sample_en
// (BDIV+1 samples per bit). A start edge is confirmed half a bit later, then
// every following bit is sampled once per bit time at its middle: data bits
// LSB first, parity if enabled, and the first stop bit. done pulses for one
// cycle with the byte, its world (done_ns) and its error flags; a frame whose
// stop bit and all other bits are 0 is reported as a break.
module uart_rx
  import ss_pkg::*;
#(
  parameter int unsigned BDIV_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              sample_en,
  input  logic [BDIV_W-1:0] bdiv,
  input  uart_fmt_t         fmt,
  input  logic              rxd_s,
  input  logic              rxd_ns,
  output logic              done,
  output logic              done_ns,
  output logic [7:0]        data,
  output logic              par_err,
  output logic              frm_err,
  output logic              brk_det,
  output logic              dumped,
  output logic              active,
  output logic              cur_ns
);

  typedef enum logic [2:0] {R_IDLE, R_START, R_DATA, R_PAR, R_STOP} rstate_t;
  rstate_t st;

  logic [1:0] sync_s, sync_ns;
  logic       prev_s, prev_ns;
  logic       ls, lns;          // synchronised line levels
  logic       line;             // level of the line being received

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_s  <= 2'b11;
      sync_ns <= 2'b11;
    end else begin
      sync_s  <= {sync_s[0], rxd_s};
      sync_ns <= {sync_ns[0], rxd_ns};
    end
  end
  assign ls   = sync_s[1];
  assign lns  = sync_ns[1];
  assign line = cur_ns ? lns : ls;

  logic [BDIV_W-1:0] bdiv_eff, cnt;
  logic [2:0]        idx;
  logic [7:0]        sh;
  logic              par_acc, par_bad, all_zero;

  assign bdiv_eff = (bdiv < BDIV_W'(3)) ? BDIV_W'(3) : bdiv;
  assign active   = (st != R_IDLE);

  logic fall_s, fall_ns;
  assign fall_s  = sample_en && prev_s && !ls;
  assign fall_ns = sample_en && prev_ns && !lns;

  // Received bits arrive LSB first into the top of sh; align for 6/7 bits.
  logic [7:0] aligned;
  assign aligned = sh >> (4'd8 - fmt.nbits);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= R_IDLE;
      prev_s   <= 1'b1;
      prev_ns  <= 1'b1;
      cnt      <= '0;
      idx      <= '0;
      sh       <= '0;
      par_acc  <= 1'b0;
      par_bad  <= 1'b0;
      all_zero <= 1'b0;
      cur_ns   <= 1'b0;
      done     <= 1'b0;
      done_ns  <= 1'b0;
      data     <= '0;
      par_err  <= 1'b0;
      frm_err  <= 1'b0;
      brk_det  <= 1'b0;
      dumped   <= 1'b0;
    end else begin
      done   <= 1'b0;
      dumped <= 1'b0;
      if (sample_en) begin
        prev_s  <= ls;
        prev_ns <= lns;
      end
      if (!en) begin
        st <= R_IDLE;
      end else if (fall_s && (st == R_IDLE || cur_ns)) begin
        // Secure start bit: take it, dropping any non-secure frame.
        dumped <= (st != R_IDLE);
        cur_ns <= 1'b0;
        cnt    <= '0;
        st     <= R_START;
      end else if (st == R_IDLE) begin
        if (fall_ns) begin
          cur_ns <= 1'b1;
          cnt    <= '0;
          st     <= R_START;
        end
      end else if (sample_en) begin
        unique case (st)
          R_START: begin
            if (cnt >= (bdiv_eff >> 1)) begin
              cnt <= '0;
              if (!line) begin
                idx      <= '0;
                par_acc  <= 1'b0;
                par_bad  <= 1'b0;
                all_zero <= 1'b1;
                st       <= R_DATA;
              end else begin
                st <= R_IDLE;  // glitch, not a start bit
              end
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          R_DATA: begin
            if (cnt >= bdiv_eff) begin
              cnt      <= '0;
              sh       <= {line, sh[7:1]};
              par_acc  <= par_acc ^ line;
              all_zero <= all_zero & ~line;
              if ({1'b0, idx} == fmt.nbits - 4'd1) st <= fmt.par_en ? R_PAR : R_STOP;
              else idx <= idx + 3'd1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          R_PAR: begin
            if (cnt >= bdiv_eff) begin
              cnt      <= '0;
              all_zero <= all_zero & ~line;
              unique case (fmt.par)
                PAR_EVEN:  par_bad <= (par_acc ^ line);
                PAR_ODD:   par_bad <= ~(par_acc ^ line);
                PAR_SPACE: par_bad <= line;
                default:   par_bad <= ~line;
              endcase
              st <= R_STOP;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          R_STOP: begin
            if (cnt >= bdiv_eff) begin
              cnt     <= '0;
              done    <= 1'b1;
              done_ns <= cur_ns;
              data    <= aligned;
              par_err <= par_bad;
              frm_err <= !line;
              brk_det <= !line && all_zero;
              st      <= R_IDLE;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          default: st <= R_IDLE;
        endcase
      end
    end
  end

endmodule
