// uart_modem_ctrl: modem controller of the UART.
//
// Drives the DTR and RTS outputs from the secure-only Modem Control register
// and watches the CTS, DSR, RI and DCD inputs. In automatic flow-control mode
// (mcr[2]) RTS follows the receive FIFO: it is dropped once the FIFO level
// reaches the secure-only Flow Control Delay value and raised again when the
// level falls below that value minus 4 (or the FIFO empties); the transmitter is held while CTS is
// inactive. Without automatic flow control RTS and DTR follow the register.
// The registers and their roles are the published ones; the hysteresis and
// the active-high pin polarity are this design's choices.
//
// Interface: mcr = {FCM, RTS, DTR}; status = {fcm_rts, DCD, RI, DSR, CTS} for
// the Modem Status register; delta pulses for one cycle with the input bits
// that changed ({DCD, RI, DSR, CTS}). Inputs pass a two-flop synchroniser, so
// a pin change shows two to three cycles later.
module uart_modem_ctrl #(
  parameter int unsigned LW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    mcr,
  input  logic [5:0]    fdel,
  input  logic [LW-1:0] rx_level,
  input  logic          cts,
  input  logic          dsr,
  input  logic          ri,
  input  logic          dcd,
  output logic          dtr,
  output logic          rts,
  output logic [4:0]    status,
  output logic [3:0]    delta,
  output logic          tx_hold
);

  logic [3:0] s1, s2, s3;   // {dcd, ri, dsr, cts}
  logic       flow_rts;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1       <= '0;
      s2       <= '0;
      s3       <= '0;
      flow_rts <= 1'b1;
    end else begin
      s1 <= {dcd, ri, dsr, cts};
      s2 <= s1;
      s3 <= s2;
      if (rx_level >= LW'(fdel))
        flow_rts <= 1'b0;
      else if (rx_level + LW'(4) < LW'(fdel) || rx_level == '0)
        flow_rts <= 1'b1;
    end
  end

  assign delta   = s2 ^ s3;
  assign status  = {flow_rts, s2};
  assign dtr     = mcr[0];
  assign rts     = mcr[2] ? flow_rts : mcr[1];
  assign tx_hold = mcr[2] && !s2[0];

endmodule
