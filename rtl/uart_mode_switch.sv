// uart_mode_switch: channel-mode routing of the UART serial lines.
//
// The published UART has a mode switch between its transmitter/receiver and
// the pins, selected by the secure-only Mode register. Four modes are
// provided (the usual set for this UART register layout; the individual
// modes are this design's choice):
//   normal          pins to core, core to pin
//   automatic echo  secure RxD goes to the receiver and is echoed on TxD
//   local loopback  TxD of the core feeds the secure receiver input; TxD pin idles high
//   remote loopback secure RxD is sent straight back on TxD; receiver sees idle
// The non-secure Rx line only reaches the receiver in normal mode, so the
// test modes, which the secure world alone can select, never mix non-secure
// traffic into them. Purely combinational.
module uart_mode_switch
  import ss_pkg::*;
(
  input  chmode_t chmode,
  input  logic    tx_core,
  input  logic    rxd_s_pin,
  input  logic    rxd_ns_pin,
  output logic    txd_pin,
  output logic    rx_s_core,
  output logic    rx_ns_core
);

  always_comb begin
    txd_pin    = tx_core;
    rx_s_core  = rxd_s_pin;
    rx_ns_core = rxd_ns_pin;
    unique case (chmode)
      CH_NORMAL: ;
      CH_ECHO: begin
        txd_pin    = rxd_s_pin;
        rx_ns_core = 1'b1;
      end
      CH_LLOOP: begin
        txd_pin    = 1'b1;
        rx_s_core  = tx_core;
        rx_ns_core = 1'b1;
      end
      CH_RLOOP: begin
        txd_pin    = rxd_s_pin;
        rx_s_core  = 1'b1;
        rx_ns_core = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
