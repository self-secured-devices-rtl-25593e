// ss_devices_top: the two self-secured devices side by side.
//
// Self-secured devices give each TrustZone world its own logical interface
// inside one physical device, so a secure RTOS and a normal-world OS can
// share a peripheral at native speed while the secure side keeps control of
// everything that could disturb its own use of the device. This top holds
// the two devices built on that idea: a timer (ss_timer) and a UART
// (ss_uart). Each has its own AXI4-Lite slave port, whose AWPROT[1]/ARPROT[1]
// carry the non-secure bit, and two interrupt lines: FIQ for secure events
// and IRQ for non-secure ones, to be wired to a GICv2 that delivers them to
// the matching world. The bus interconnect, processor and interrupt
// controller are outside this design.
module ss_devices_top
  import ss_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // timer
  input  axil_req_t tmr_axi_req,
  output axil_rsp_t tmr_axi_rsp,
  output logic      tmr_irq,
  output logic      tmr_fiq,
  // UART
  input  axil_req_t uart_axi_req,
  output axil_rsp_t uart_axi_rsp,
  output logic      uart_irq,
  output logic      uart_fiq,
  input  logic      rxd_s,
  input  logic      rxd_ns,
  output logic      txd,
  input  logic      cts,
  input  logic      dsr,
  input  logic      ri,
  input  logic      dcd,
  output logic      dtr,
  output logic      rts
);

  ss_timer u_timer (
    .clk, .rst_n, .axi_req(tmr_axi_req), .axi_rsp(tmr_axi_rsp),
    .irq(tmr_irq), .fiq(tmr_fiq)
  );

  ss_uart #(.FIFO_DEPTH(FIFO_DEPTH)) u_uart (
    .clk, .rst_n, .axi_req(uart_axi_req), .axi_rsp(uart_axi_rsp),
    .rxd_s, .rxd_ns, .txd, .cts, .dsr, .ri, .dcd, .dtr, .rts,
    .irq(uart_irq), .fiq(uart_fiq)
  );

endmodule
