// tb_ss_devices_top: end-to-end test of both self-secured devices.
//
// Runs the top at its default parameters. Two bus masters stand in for the
// processor: the timer and the UART are used at the same time by a secure
// "RTOS" and a normal-world "GPOS", each through its own window. The test
// counts every mechanism of the design and fails any that never happened:
//   timer:  secure FIQ period, non-secure IRQ period, normal-world access
//           to the secure window refused (SLVERR), secure bits hidden from
//           the non-secure view of Control;
//   UART:   secure-first transmit while non-secure data waits, secure start
//           bit preempting a non-secure frame, FIQ and IRQ per world,
//           Rx timeout, Tx FIFO overflow, local loopback, CTS flow-control
//           stall, received break, parity error, framing error, Rx FIFO
//           overrun, RTS dropped by automatic flow control, echo and
//           remote loopback modes, modem status change.
module tb_ss_devices_top;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int BIT = 16;
  localparam logic [11:0] NSB = UART_NS_BASE;
  axil_req_t t_req, u_req;
  axil_rsp_t t_rsp, u_rsp;
  logic tmr_irq, tmr_fiq, uart_irq, uart_fiq;
  logic rxd_s = 1, rxd_ns = 1, txd, cts = 1, dsr = 0, ri = 0, dcd = 0, dtr, rts;

  ss_devices_top dut (
    .clk, .rst_n,
    .tmr_axi_req(t_req), .tmr_axi_rsp(t_rsp), .tmr_irq, .tmr_fiq,
    .uart_axi_req(u_req), .uart_axi_rsp(u_rsp), .uart_irq, .uart_fiq,
    .rxd_s, .rxd_ns, .txd, .cts, .dsr, .ri, .dcd, .dtr, .rts
  );
  axil_master u_tm (.clk, .req(t_req), .rsp(t_rsp));
  axil_master u_um (.clk, .req(u_req), .rsp(u_rsp));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int m_tmr_fiq, m_tmr_irq, m_slverr, m_ns_view_masked, m_tx_secure_first, m_rx_preempt,
      m_uart_fiq, m_uart_irq, m_rx_timeout, m_tx_overflow, m_loopback, m_cts_stall, m_break,
      m_parity, m_framing, m_rx_overrun, m_rts_drop, m_echo, m_rloop, m_modem_change;
  logic rts_d = 1;
  logic tf_d = 0, ti_d = 0, uf_d = 0, ui_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (tmr_fiq && !tf_d) m_tmr_fiq++;
    if (tmr_irq && !ti_d) m_tmr_irq++;
    if (uart_fiq && !uf_d) m_uart_fiq++;
    if (uart_irq && !ui_d) m_uart_irq++;
    if ((t_rsp.bvalid && t_rsp.bresp == RESP_SLVERR && t_req.bready) ||
        (u_rsp.bvalid && u_rsp.bresp == RESP_SLVERR && u_req.bready)) m_slverr++;
    if (dut.u_uart.u_tx.s_pop && !dut.u_uart.u_tx.ns_empty) m_tx_secure_first++;
    if (dut.u_uart.u_rx.dumped) m_rx_preempt++;
    if (dut.u_uart.u_tx.hold && (!dut.u_uart.u_tx.s_empty || !dut.u_uart.u_tx.ns_empty)) m_cts_stall++;
    if (!rts && rts_d && dut.u_uart.u_modem.mcr[2]) m_rts_drop++;
    rts_d <= rts;
    tf_d <= tmr_fiq; ti_d <= tmr_irq; uf_d <= uart_fiq; ui_d <= uart_irq;
  end

  // ---- serial line helpers ----
  task automatic send(input bit ns, input byte unsigned b, input bit stop = 1);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      if (ns) rxd_ns = f[i]; else rxd_s = f[i];
      repeat (BIT) @(negedge clk);
    end
    if (ns) rxd_ns = 1; else rxd_s = 1;
    repeat (BIT) @(negedge clk);
  endtask
  // any frame: n bits of f, LSB first, then one idle bit
  task automatic send_raw(input bit ns, input logic [11:0] f, input int n);
    for (int i = 0; i < n; i++) begin
      if (ns) rxd_ns = f[i]; else rxd_s = f[i];
      repeat (BIT) @(negedge clk);
    end
    if (ns) rxd_ns = 1; else rxd_s = 1;
    repeat (BIT) @(negedge clk);
  endtask
  byte unsigned txq[$];
  initial begin
    byte unsigned b;
    forever begin
      @(negedge txd);
      repeat (BIT / 2) @(negedge clk);
      if (txd == 0) begin
        for (int i = 0; i < 8; i++) begin repeat (BIT) @(negedge clk); b[i] = txd; end
        repeat (BIT) @(negedge clk);
        if (txd) txq.push_back(b);
      end
    end
  end

  // ---- timer activity ----
  task automatic timer_run();
    axi_resp_t r;
    logic [31:0] d;
    int cyc;
    longint t_prev, t_now;
    u_tm.write(TMR_S_LOAD, 32'd49, 1'b1, r, cyc);
    check(r == RESP_SLVERR, "GPOS refused secure Load");
    u_tm.write(TMR_S_LOAD, 32'd49, 1'b0, r, cyc);             // RTOS tick: 50*2 clocks
    u_tm.write(TMR_NS_LOAD, 32'd29, 1'b1, r, cyc);            // GPOS tick: 30*2 clocks
    u_tm.write(TMR_CTRL, 32'h0000_0127, 1'b0, r, cyc);        // prescaler 1, IRQ/FIQ en, S on+AR
    u_tm.write(TMR_NS_CTRL, 32'h0000_0018, 1'b1, r, cyc);     // GPOS: NS on + AR
    u_tm.read(TMR_NS_CTRL, 1'b1, d, r, cyc);
    check(d == 32'h18, $sformatf("NS view of Control shows only NS bits: %h", d));
    if (d == 32'h18) m_ns_view_masked++;
    u_tm.read(TMR_CTRL, 1'b0, d, r, cyc);
    check(d == 32'h13F, $sformatf("secure view of Control: %h", d));
    for (int i = 0; i < 3; i++) begin
      @(posedge tmr_fiq);
      t_now = $time;
      if (i > 0) check(t_now - t_prev == 100 * 10, $sformatf("timer FIQ period %0d ns", t_now - t_prev));
      t_prev = t_now;
      u_tm.write(TMR_ISR, 32'h1, 1'b0, r, cyc);
    end
    u_tm.write(TMR_NS_ISR, 32'h2, 1'b1, r, cyc);              // drop the IRQ pending since start
    for (int i = 0; i < 3; i++) begin
      @(posedge tmr_irq);
      t_now = $time;
      if (i > 0) check(t_now - t_prev == 60 * 10, $sformatf("timer IRQ spacing %0d ns", t_now - t_prev));
      t_prev = t_now;
      u_tm.write(TMR_NS_ISR, 32'h2, 1'b1, r, cyc);
    end
  endtask

  // ---- UART activity ----
  task automatic uart_run();
    axi_resp_t r;
    logic [31:0] d;
    int cyc;
    u_um.write(U_CR, 32'h14, 1'b1, r, cyc);
    check(r == RESP_SLVERR, "GPOS refused UART Control");
    u_um.write(U_BAUDGEN, 32'd2, 1'b0, r, cyc);
    u_um.write(U_BAUDDIV, 32'd7, 1'b0, r, cyc);
    u_um.write(U_MR, 32'h20, 1'b0, r, cyc);
    u_um.write(U_RXWM, 32'd1, 1'b0, r, cyc);
    u_um.write(NSB + U_RXWM, 32'd1, 1'b1, r, cyc);
    u_um.write(U_IER, (1 << IX_RTRIG) | (1 << IX_TIMEOUT) | (1 << IX_TOVR) | (1 << IX_BREAK), 1'b0, r, cyc);
    u_um.write(U_CR, (1 << CR_RXEN) | (1 << CR_TXDIS), 1'b0, r, cyc);
    // both worlds queue data, secure goes first
    u_um.write(NSB + U_FIFO, 32'h61, 1'b1, r, cyc);
    u_um.write(NSB + U_FIFO, 32'h62, 1'b1, r, cyc);
    u_um.write(U_FIFO, 32'h41, 1'b0, r, cyc);
    u_um.write(U_CR, (1 << CR_TXEN), 1'b0, r, cyc);
    repeat (3 * 10 * BIT + 100) @(negedge clk);
    check(txq.size() == 3 && txq[0] == 8'h41 && txq[1] == 8'h61 && txq[2] == 8'h62, "UART secure-first order");
    txq.delete();
    // reception into each world, then preemption
    send(1'b1, 8'h3C);
    repeat (2 * BIT) @(negedge clk);
    check(uart_irq && !uart_fiq, "NS byte -> IRQ");
    u_um.read(NSB + U_FIFO, 1'b1, d, r, cyc);
    check(d == 32'h3C, "GPOS reads its byte");
    u_um.write(NSB + U_ISR, 32'hFFFF, 1'b1, r, cyc);
    fork
      send(1'b1, 8'h11);
      begin repeat (4 * BIT) @(negedge clk); send(1'b0, 8'h5E); end
    join
    repeat (2 * BIT) @(negedge clk);
    check(uart_fiq, "secure byte -> FIQ");
    u_um.read(U_FIFO, 1'b0, d, r, cyc);
    check(d == 32'h5E, "RTOS reads preempting byte");
    u_um.read(NSB + U_SR, 1'b1, d, r, cyc);
    check(d[SR_REMPTY], "preempted NS byte dropped");
    u_um.read(U_FIFO, 1'b1, d, r, cyc);
    check(r == RESP_SLVERR && d == 0, "GPOS cannot read the secure FIFO");
    u_um.write(U_ISR, 32'hFFFF, 1'b0, r, cyc);
    // Rx timeout on the NS bank
    u_um.write(U_RXTOUT, 32'd1, 1'b0, r, cyc);
    u_um.write(NSB + U_RXWM, 32'd4, 1'b1, r, cyc);
    send(1'b1, 8'h7A);
    repeat (6 * BIT) @(negedge clk);
    u_um.read(NSB + U_ISR, 1'b1, d, r, cyc);
    check(d[IX_TIMEOUT], "NS Rx timeout");
    if (d[IX_TIMEOUT]) m_rx_timeout++;
    u_um.read(NSB + U_FIFO, 1'b1, d, r, cyc);
    u_um.write(NSB + U_ISR, 32'hFFFF, 1'b1, r, cyc);
    u_um.write(U_RXTOUT, 32'd0, 1'b0, r, cyc);
    // received break on the secure line
    send(1'b0, 8'h00, 1'b0);
    repeat (2 * BIT) @(negedge clk);
    u_um.read(U_ISR, 1'b0, d, r, cyc);
    check(d[IX_BREAK] && d[IX_FRAME], "secure break detected");
    if (d[IX_BREAK]) m_break++;
    u_um.read(U_SR, 1'b0, d, r, cyc);
    check(d[SR_REMPTY], "break not stored");
    u_um.write(U_ISR, 32'hFFFF, 1'b0, r, cyc);
    // NS Tx overflow
    u_um.write(U_CR, (1 << CR_TXDIS), 1'b0, r, cyc);
    for (int i = 0; i < 65; i++) u_um.write(NSB + U_FIFO, 32'(i), 1'b1, r, cyc);
    u_um.read(NSB + U_ISR, 1'b1, d, r, cyc);
    check(d[IX_TOVR], "NS Tx overflow");
    if (d[IX_TOVR]) m_tx_overflow++;
    u_um.write(U_CR, (1 << CR_TXRST), 1'b0, r, cyc);
    u_um.write(NSB + U_ISR, 32'hFFFF, 1'b1, r, cyc);
    // local loopback
    u_um.write(U_MR, 32'h220, 1'b0, r, cyc);
    u_um.write(U_CR, (1 << CR_TXEN), 1'b0, r, cyc);
    u_um.write(U_FIFO, 32'h99, 1'b0, r, cyc);
    repeat (12 * BIT) @(negedge clk);
    u_um.read(U_FIFO, 1'b0, d, r, cyc);
    check(d == 32'h99, "local loopback");
    if (d == 32'h99) m_loopback++;
    u_um.write(U_MR, 32'h20, 1'b0, r, cyc);
    u_um.write(U_ISR, 32'hFFFF, 1'b0, r, cyc);
    // parity error (8 data bits, odd parity) on the NS line
    u_um.write(U_MR, 32'h08, 1'b0, r, cyc);
    send_raw(1'b1, {1'b1, 1'b1, 8'h01, 1'b0}, 11);            // 0x01 needs odd parity 0
    u_um.read(NSB + U_ISR, 1'b1, d, r, cyc);
    check(d[IX_PARE], "NS parity error");
    if (d[IX_PARE]) m_parity++;
    u_um.write(U_MR, 32'h20, 1'b0, r, cyc);
    // framing error on the secure line
    send(1'b0, 8'hF0, 1'b0);
    u_um.read(U_ISR, 1'b0, d, r, cyc);
    check(d[IX_FRAME] && !d[IX_BREAK], "secure framing error");
    if (d[IX_FRAME] && !d[IX_BREAK]) m_framing++;
    u_um.write(U_CR, (1 << CR_RXRST), 1'b0, r, cyc);
    u_um.write(U_ISR, 32'hFFFF, 1'b0, r, cyc);
    u_um.write(NSB + U_ISR, 32'hFFFF, 1'b1, r, cyc);
    // NS Rx overrun, with automatic RTS flow control dropping RTS at 60
    u_um.write(U_MODEMCR, 32'h20, 1'b0, r, cyc);
    u_um.write(U_FLOWDEL, 32'd60, 1'b0, r, cyc);
    for (int i = 0; i < 65; i++) begin
      send(1'b1, 8'(i));
      if (i == 58) check(rts, "RTS high below the flow delay level");
      if (i == 60) check(!rts, "RTS low at the flow delay level");
    end
    u_um.read(NSB + U_ISR, 1'b1, d, r, cyc);
    check(d[IX_ROVR], "NS Rx overrun");
    if (d[IX_ROVR]) m_rx_overrun++;
    u_um.read(U_ISR, 1'b0, d, r, cyc);
    check(!d[IX_ROVR], "secure bank not overrun");
    u_um.write(U_CR, (1 << CR_RXRST), 1'b0, r, cyc);
    repeat (3) @(negedge clk);
    check(rts, "RTS back after Rx reset");
    u_um.write(U_MODEMCR, 32'h0, 1'b0, r, cyc);
    u_um.write(NSB + U_ISR, 32'hFFFF, 1'b1, r, cyc);
    // echo and remote loopback
    txq.delete();
    u_um.write(U_MR, 32'h120, 1'b0, r, cyc);
    send(1'b0, 8'hE1);
    repeat (BIT) @(negedge clk);
    u_um.read(U_FIFO, 1'b0, d, r, cyc);
    check(txq.size() == 1 && txq[0] == 8'hE1 && d == 32'hE1, "echo mode");
    if (txq.size() == 1 && d == 32'hE1) m_echo++;
    txq.delete();
    u_um.write(U_MR, 32'h320, 1'b0, r, cyc);
    send(1'b0, 8'hE2);
    repeat (BIT) @(negedge clk);
    u_um.read(U_SR, 1'b0, d, r, cyc);
    check(txq.size() == 1 && txq[0] == 8'hE2 && d[SR_REMPTY], "remote loopback");
    if (txq.size() == 1 && d[SR_REMPTY]) m_rloop++;
    txq.delete();
    u_um.write(U_MR, 32'h20, 1'b0, r, cyc);
    u_um.write(U_ISR, 32'hFFFF, 1'b0, r, cyc);
    // modem status change seen by both worlds
    u_um.write(NSB + U_MODEMSR, 32'hF, 1'b1, r, cyc);
    dsr = 1;
    repeat (4) @(negedge clk);
    u_um.read(NSB + U_ISR, 1'b1, d, r, cyc);
    check(d[IX_DMSI], "NS modem status change");
    u_um.read(U_MODEMSR, 1'b0, d, r, cyc);
    check(d[1] && d[5], "secure sees DSR change and level");
    if (d[1]) m_modem_change++;
    u_um.write(NSB + U_ISR, 32'hFFFF, 1'b1, r, cyc);
    u_um.write(U_ISR, 32'hFFFF, 1'b0, r, cyc);
    // CTS flow-control stall
    u_um.write(U_MODEMCR, 32'h20, 1'b0, r, cyc);
    u_um.write(U_FLOWDEL, 32'd60, 1'b0, r, cyc);
    cts = 0;
    txq.delete();
    u_um.write(NSB + U_FIFO, 32'h55, 1'b1, r, cyc);
    repeat (15 * BIT) @(negedge clk);
    check(txq.size() == 0, "CTS low stalls the transmitter");
    cts = 1;
    repeat (12 * BIT) @(negedge clk);
    check(txq.size() == 1 && txq[0] == 8'h55, "sent after CTS");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      timer_run();
      uart_run();
    join
    check(m_tmr_fiq > 0, "mechanism: timer FIQ");
    check(m_tmr_irq > 0, "mechanism: timer IRQ");
    check(m_slverr > 0, "mechanism: normal-world access refused");
    check(m_ns_view_masked > 0, "mechanism: secure bits hidden from NS view");
    check(m_tx_secure_first > 0, "mechanism: secure-first transmit");
    check(m_rx_preempt > 0, "mechanism: secure reception preempts NS");
    check(m_uart_fiq > 0, "mechanism: UART FIQ");
    check(m_uart_irq > 0, "mechanism: UART IRQ");
    check(m_rx_timeout > 0, "mechanism: Rx timeout");
    check(m_tx_overflow > 0, "mechanism: Tx overflow");
    check(m_loopback > 0, "mechanism: local loopback");
    check(m_cts_stall > 0, "mechanism: CTS stall");
    check(m_break > 0, "mechanism: break");
    check(m_parity > 0, "mechanism: parity error");
    check(m_framing > 0, "mechanism: framing error");
    check(m_rx_overrun > 0, "mechanism: Rx overrun");
    check(m_rts_drop > 0, "mechanism: RTS flow control");
    check(m_echo > 0, "mechanism: echo mode");
    check(m_rloop > 0, "mechanism: remote loopback");
    check(m_modem_change > 0, "mechanism: modem status change");
    $display("mechanisms: tmr_fiq=%0d tmr_irq=%0d slverr=%0d nsview=%0d tx_secure_first=%0d rx_preempt=%0d uart_fiq=%0d uart_irq=%0d timeout=%0d tovr=%0d loopback=%0d cts_stall=%0d break=%0d parity=%0d framing=%0d rovr=%0d rts_drop=%0d echo=%0d rloop=%0d modem=%0d",
             m_tmr_fiq, m_tmr_irq, m_slverr, m_ns_view_masked, m_tx_secure_first, m_rx_preempt,
             m_uart_fiq, m_uart_irq, m_rx_timeout, m_tx_overflow, m_loopback, m_cts_stall, m_break,
             m_parity, m_framing, m_rx_overrun, m_rts_drop, m_echo, m_rloop, m_modem_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
