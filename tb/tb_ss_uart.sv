// tb_ss_uart: self-checking test of the self-secured UART over AXI4-Lite.
//
// The baud rate is set to 16 clocks per bit (CD = 2, BDIV = 7). A serial
// decoder watches TxD and two serial drivers feed the secure and
// non-secure RxD lines. Checks:
//   * access rules: secure-only registers and the secure bank refuse the
//     normal world (SLVERR, no effect); the secure world reaches both banks;
//   * transmit priority: with both Tx FIFOs filled, all secure bytes leave
//     first;
//   * each world receives into its own Rx FIFO; secure events raise FIQ,
//     non-secure ones IRQ;
//   * a secure frame preempts a non-secure one on reception;
//   * per-bank interrupt status clear, Tx overflow, Rx timeout, local
//     loopback mode, automatic flow control and modem status change;
//   * receive errors land in the bank of the line they came from: parity
//     (even parity frame with the wrong bit), framing (low stop bit), break
//     (line held low) and Rx overrun (65 bytes into a 64-byte FIFO);
//   * echo and remote loopback modes, and masking through Int Disable.
module tb_ss_uart;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int BIT = 16;
  axil_req_t req;
  axil_rsp_t rsp;
  logic rxd_s = 1, rxd_ns = 1, txd, cts = 1, dsr = 0, ri = 0, dcd = 0, dtr, rts, irq, fiq;

  ss_uart dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp), .rxd_s, .rxd_ns, .txd,
               .cts, .dsr, .ri, .dcd, .dtr, .rts, .irq, .fiq);
  axil_master u_m (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  axi_resp_t r;
  logic [31:0] d;
  int cyc;
  localparam logic [11:0] NSB = UART_NS_BASE;
  task automatic wr(input logic [11:0] a, input logic [31:0] v, input logic ns, input axi_resp_t exp = RESP_OKAY);
    u_m.write(a, v, ns, r, cyc);
    check(r == exp, $sformatf("write %h ns=%0d resp %0d", a, ns, r));
  endtask
  task automatic rd(input logic [11:0] a, input logic ns, output logic [31:0] v, input axi_resp_t exp = RESP_OKAY);
    u_m.read(a, ns, v, r, cyc);
    check(r == exp, $sformatf("read %h ns=%0d resp %0d", a, ns, r));
  endtask

  // ---- serial driver (8N1) ----
  task automatic send(input bit ns, input byte unsigned b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      if (ns) rxd_ns = f[i]; else rxd_s = f[i];
      repeat (BIT) @(negedge clk);
    end
  endtask

  // ---- serial driver for any frame: n bits of f, LSB first ----
  task automatic send_raw(input bit ns, input logic [11:0] f, input int n);
    for (int i = 0; i < n; i++) begin
      if (ns) rxd_ns = f[i]; else rxd_s = f[i];
      repeat (BIT) @(negedge clk);
    end
    if (ns) rxd_ns = 1'b1; else rxd_s = 1'b1;
  endtask

  // ---- TxD decoder (8N1) ----
  byte unsigned txq[$];
  initial begin
    byte unsigned b;
    forever begin
      @(negedge txd);
      repeat (BIT / 2) @(negedge clk);
      if (txd == 0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (BIT) @(negedge clk);
          b[i] = txd;
        end
        repeat (BIT) @(negedge clk);
        if (txd) txq.push_back(b);
      end
    end
  end

  int n_fiq = 0, n_irq = 0;
  logic fiq_d = 0, irq_d = 0;
  always @(posedge clk) begin
    if (rst_n && fiq && !fiq_d) n_fiq++;
    if (rst_n && irq && !irq_d) n_irq++;
    fiq_d <= fiq; irq_d <= irq;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- access rules ----
    wr(U_CR, 32'h14, 1'b1, RESP_SLVERR);
    rd(U_CR, 1'b0, d);
    check(d[CR_RXEN] == 0 && d[CR_TXEN] == 0, "NS could not enable the UART");
    wr(U_BAUDGEN, 32'd5, 1'b1, RESP_SLVERR);
    rd(U_BAUDGEN, 1'b0, d);
    check(d == 32'd28, "BAUDGEN unchanged by NS");
    rd(U_FIFO, 1'b1, d, RESP_SLVERR);
    rd(U_ISR, 1'b1, d, RESP_SLVERR);
    wr(NSB + U_CR, 32'h14, 1'b1, RESP_SLVERR);      // no secure reg in NS window
    wr(NSB + U_IER, 32'h1, 1'b0, RESP_SLVERR);
    rd(NSB + U_SR, 1'b0, d);                        // secure sees NS bank
    check(d[SR_REMPTY] && d[SR_TEMPTY], "secure reads NS channel status");

    // ---- configuration (secure) ----
    wr(U_BAUDGEN, 32'd2, 1'b0);
    wr(U_BAUDDIV, 32'd7, 1'b0);
    wr(U_MR, 32'h20, 1'b0);                          // 8 bits, no parity, 1 stop
    wr(U_RXWM, 32'd1, 1'b0);
    wr(NSB + U_RXWM, 32'd1, 1'b1);                   // NS sets its own trigger
    rd(U_RXWM, 1'b0, d);
    check(d == 32'd1, "secure trigger level");
    wr(U_IER, (1 << IX_RTRIG) | (1 << IX_TIMEOUT) | (1 << IX_TOVR), 1'b0);
    wr(U_CR, (1 << CR_RXEN) | (1 << CR_TXDIS), 1'b0);

    // ---- transmit priority ----
    wr(NSB + U_FIFO, 32'h4E, 1'b1);
    wr(NSB + U_FIFO, 32'h4F, 1'b1);
    wr(U_FIFO, 32'h53, 1'b0);
    wr(U_FIFO, 32'h54, 1'b0);
    wr(NSB + U_FIFO, 32'h50, 1'b0);                  // secure writes into NS bank
    rd(NSB + U_SR, 1'b1, d);
    check(!d[SR_TEMPTY], "NS Tx FIFO holds data");
    wr(U_CR, (1 << CR_TXEN), 1'b0);
    repeat (5 * 10 * BIT + 200) @(negedge clk);
    check(txq.size() == 5, $sformatf("5 frames sent, got %0d", txq.size()));
    if (txq.size() == 5)
      check(txq[0] == 8'h53 && txq[1] == 8'h54 && txq[2] == 8'h4E && txq[3] == 8'h4F && txq[4] == 8'h50,
            $sformatf("secure first: %h %h %h %h %h", txq[0], txq[1], txq[2], txq[3], txq[4]));
    txq.delete();

    // ---- reception per world, IRQ vs FIQ ----
    n_fiq = 0; n_irq = 0;
    send(1'b1, 8'h3C);
    repeat (3 * BIT) @(negedge clk);
    check(irq && !fiq, "non-secure byte raises IRQ only");
    rd(NSB + U_FIFO, 1'b1, d);
    check(d == 32'h3C, $sformatf("NS reads its byte, got %h", d));
    rd(U_SR, 1'b0, d);
    check(d[SR_REMPTY], "secure Rx FIFO untouched");
    rd(NSB + U_ISR, 1'b1, d);
    check(d[IX_RTRIG], "NS ISR RTRIG");
    wr(NSB + U_ISR, 32'hFFFF, 1'b1);
    repeat (3) @(negedge clk);
    check(!irq, "IRQ cleared by NS W1C");
    send(1'b0, 8'hA5);
    repeat (3 * BIT) @(negedge clk);
    check(fiq && !irq, "secure byte raises FIQ only");
    wr(NSB + U_ISR, 32'hFFFF, 1'b1);                 // NS cannot clear the secure bank
    check(fiq, "FIQ survives NS clear");
    rd(U_FIFO, 1'b0, d);
    check(d == 32'hA5, $sformatf("secure reads its byte, got %h", d));
    wr(U_ISR, 32'hFFFF, 1'b0);
    repeat (3) @(negedge clk);
    check(!fiq, "FIQ cleared by secure W1C");

    // ---- secure preemption of a non-secure frame ----
    fork
      send(1'b1, 8'h11);
      begin repeat (3 * BIT) @(negedge clk); send(1'b0, 8'h22); end
    join
    repeat (3 * BIT) @(negedge clk);
    rd(U_FIFO, 1'b0, d);
    check(d == 32'h22, $sformatf("secure frame received during NS frame, got %h", d));
    rd(NSB + U_SR, 1'b1, d);
    check(d[SR_REMPTY], "preempted NS frame dropped");
    wr(U_ISR, 32'hFFFF, 1'b0);
    wr(NSB + U_ISR, 32'hFFFF, 1'b1);

    // ---- Rx timeout (RTO = 1: 4 bit times) ----
    wr(U_RXTOUT, 32'd1, 1'b0);
    wr(NSB + U_RXWM, 32'd2, 1'b1);                   // trigger not reached by one byte
    send(1'b1, 8'h77);
    repeat (2 * BIT) @(negedge clk);
    rd(NSB + U_ISR, 1'b1, d);
    check(!d[IX_TIMEOUT], "no timeout yet");
    repeat (5 * BIT) @(negedge clk);
    rd(NSB + U_ISR, 1'b1, d);
    check(d[IX_TIMEOUT], "NS timeout after 4 idle bit times");
    rd(NSB + U_FIFO, 1'b1, d);
    check(d == 32'h77, "timed-out byte still readable");
    wr(NSB + U_ISR, 32'hFFFF, 1'b1);
    wr(U_RXTOUT, 32'd0, 1'b0);

    // ---- Tx overflow of the NS bank ----
    wr(U_CR, (1 << CR_TXDIS), 1'b0);
    for (int i = 0; i < 65; i++) begin
      u_m.write(NSB + U_FIFO, 32'(i), 1'b1, r, cyc);
    end
    rd(NSB + U_SR, 1'b1, d);
    check(d[SR_TFUL], "NS Tx FIFO full");
    rd(NSB + U_ISR, 1'b1, d);
    check(d[IX_TOVR] && d[IX_TFUL], "NS Tx overflow flagged");
    rd(U_ISR, 1'b0, d);
    check(!d[IX_TOVR], "secure bank has no overflow");
    wr(U_CR, (1 << CR_TXRST), 1'b0);                 // flush
    rd(NSB + U_SR, 1'b1, d);
    check(d[SR_TEMPTY], "TXRST flushed");
    wr(NSB + U_ISR, 32'hFFFF, 1'b1);
    wr(U_ISR, 32'hFFFF, 1'b0);

    // ---- local loopback ----
    wr(U_MR, 32'h220, 1'b0);
    wr(U_CR, (1 << CR_TXEN), 1'b0);
    wr(U_FIFO, 32'hC7, 1'b0);
    repeat (12 * BIT) @(negedge clk);
    rd(U_FIFO, 1'b0, d);
    check(d == 32'hC7, $sformatf("local loopback, got %h", d));
    check(txq.size() == 0, "TxD pin idle in local loopback");
    wr(U_MR, 32'h20, 1'b0);

    // ---- automatic flow control and modem status ----
    wr(U_MODEMCR, 32'h20, 1'b0);                     // FCM
    wr(U_FLOWDEL, 32'd2, 1'b0);
    check(rts, "RTS high with empty Rx FIFOs");
    send(1'b1, 8'h01);
    send(1'b1, 8'h02);
    repeat (2 * BIT) @(negedge clk);
    check(!rts, "RTS dropped at flow delay level");
    rd(NSB + U_FIFO, 1'b1, d);
    rd(NSB + U_FIFO, 1'b1, d);
    repeat (3) @(negedge clk);
    check(rts, "RTS back after draining");
    cts = 0;
    repeat (4) @(negedge clk);
    rd(NSB + U_MODEMSR, 1'b1, d);
    check(d[0] && !d[4], "NS sees CTS change and level");
    wr(NSB + U_MODEMSR, 32'hF, 1'b1);
    rd(NSB + U_MODEMSR, 1'b1, d);
    check(!d[0], "NS cleared its change flag");
    rd(U_MODEMSR, 1'b0, d);
    check(d[0], "secure change flag independent");
    wr(U_FIFO, 32'h3A, 1'b0);
    repeat (12 * BIT) @(negedge clk);
    check(txq.size() == 0, "CTS low holds the transmitter");
    cts = 1;
    repeat (12 * BIT) @(negedge clk);
    check(txq.size() == 1 && txq[0] == 8'h3A, "sent after CTS returns");
    txq.delete();
    wr(U_MODEMCR, 32'h0, 1'b0);
    wr(U_ISR, 32'hFFFF, 1'b0);
    wr(NSB + U_ISR, 32'hFFFF, 1'b1);

    // ---- parity error: 8 data bits, even parity ----
    wr(U_MR, 32'h00, 1'b0);
    // 0x03 has two ones: even parity bit is 0; send 1 instead
    send_raw(1'b0, {1'b1, 1'b1, 8'h03, 1'b0}, 11);
    repeat (2 * BIT) @(negedge clk);
    rd(U_ISR, 1'b0, d);
    check(d[IX_PARE] && !d[IX_FRAME], "secure parity error flagged");
    rd(NSB + U_ISR, 1'b1, d);
    check(!d[IX_PARE], "NS bank has no parity error");
    send_raw(1'b0, {1'b1, 1'b0, 8'h03, 1'b0}, 11);  // correct parity
    repeat (2 * BIT) @(negedge clk);
    rd(U_FIFO, 1'b0, d);
    check(d == 32'h03, $sformatf("bad-parity byte kept, got %h", d));
    rd(U_FIFO, 1'b0, d);
    check(d == 32'h03, $sformatf("good-parity byte received, got %h", d));
    wr(U_ISR, 32'hFFFF, 1'b0);
    rd(U_ISR, 1'b0, d);
    check(!d[IX_PARE], "parity flag cleared");
    wr(U_MR, 32'h20, 1'b0);

    // ---- framing error on the NS line: stop bit low ----
    send_raw(1'b1, {1'b1, 1'b0, 8'h5A, 1'b0}, 12);
    repeat (2 * BIT) @(negedge clk);
    rd(NSB + U_ISR, 1'b1, d);
    check(d[IX_FRAME] && !d[IX_BREAK], "NS framing error flagged");
    rd(U_ISR, 1'b0, d);
    check(!d[IX_FRAME], "secure bank has no framing error");
    wr(NSB + U_ISR, 32'hFFFF, 1'b1);
    wr(U_CR, (1 << CR_RXRST), 1'b0);

    // ---- break on the secure line ----
    send_raw(1'b0, 12'h000, 12);
    repeat (2 * BIT) @(negedge clk);
    rd(U_ISR, 1'b0, d);
    check(d[IX_BREAK], "secure break flagged");
    rd(U_SR, 1'b0, d);
    check(d[SR_REMPTY], "break stores no byte");
    wr(U_ISR, 32'hFFFF, 1'b0);

    // ---- Rx overrun of the NS bank ----
    for (int i = 0; i < 65; i++) send(1'b1, 8'(i + 1));
    repeat (2 * BIT) @(negedge clk);
    rd(NSB + U_SR, 1'b1, d);
    check(d[SR_RFUL], "NS Rx FIFO full");
    rd(NSB + U_ISR, 1'b1, d);
    check(d[IX_ROVR] && d[IX_RFUL], "NS Rx overrun flagged");
    rd(U_ISR, 1'b0, d);
    check(!d[IX_ROVR], "secure bank has no overrun");
    rd(NSB + U_FIFO, 1'b1, d);
    check(d == 32'h01, $sformatf("oldest byte kept on overrun, got %h", d));
    wr(U_CR, (1 << CR_RXRST), 1'b0);
    wr(NSB + U_ISR, 32'hFFFF, 1'b1);
    wr(U_ISR, 32'hFFFF, 1'b0);

    // ---- echo mode: secure RxD is received and copied to TxD ----
    wr(U_MR, 32'h120, 1'b0);
    send(1'b0, 8'h6B);
    repeat (3 * BIT) @(negedge clk);
    check(txq.size() == 1 && txq[0] == 8'h6B, "echo mode copies RxD to TxD");
    rd(U_FIFO, 1'b0, d);
    check(d == 32'h6B, $sformatf("echo mode still receives, got %h", d));
    txq.delete();

    // ---- remote loopback: RxD to TxD, nothing received ----
    wr(U_MR, 32'h320, 1'b0);
    send(1'b0, 8'h9D);
    repeat (3 * BIT) @(negedge clk);
    check(txq.size() == 1 && txq[0] == 8'h9D, "remote loopback copies RxD to TxD");
    rd(U_SR, 1'b0, d);
    check(d[SR_REMPTY], "remote loopback receives nothing");
    txq.delete();
    wr(U_MR, 32'h20, 1'b0);
    wr(U_ISR, 32'hFFFF, 1'b0);

    // ---- Int Disable masks the secure Rx trigger ----
    wr(U_IDR, (1 << IX_RTRIG), 1'b0);
    rd(U_IMR, 1'b0, d);
    check(!d[IX_RTRIG] && d[IX_TIMEOUT], "IDR clears only its bit");
    send(1'b0, 8'h42);
    repeat (3 * BIT) @(negedge clk);
    rd(U_ISR, 1'b0, d);
    check(d[IX_RTRIG] && !fiq, "masked event flagged without FIQ");
    wr(U_IER, (1 << IX_RTRIG), 1'b0);
    repeat (3) @(negedge clk);
    check(fiq, "unmasking raises FIQ");

    check(n_fiq > 0 && n_irq > 0, "both interrupt lines used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
