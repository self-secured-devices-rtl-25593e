// ss_uart: self-secured UART.
//
// A full-duplex UART (programmable baud rate, 64-byte Tx and Rx FIFOs,
// 6/7/8 data bits, parity, 1/2 stop bits, error detection, line break, four
// channel modes, modem lines) whose register set is split between the two
// TrustZone worlds:
//   * secure only (secure window, AxPROT[1]=0): Control, Mode, Interrupt
//     Enable/Disable/Mask, Baud Rate Generator, Baud Rate Divider, Receiver
//     Timeout, Modem Control, Flow Control Delay. These shape the whole
//     device, so the normal world cannot touch them.
//   * banked, one copy per world: Tx FIFO, Rx FIFO, Tx and Rx trigger
//     levels, Channel Status, Modem Status, Interrupt Status. The secure copy
//     lives in the secure window, the non-secure copy at UART_NS_BASE + the
//     same offset, where either world may reach it.
// Secure data goes first on the line (uart_tx) and a secure start bit
// preempts a non-secure frame being received (uart_rx). Interrupt events of
// the secure bank raise FIQ, those of the non-secure bank raise IRQ; one
// secure-only mask gates both. The split of registers follows the published
// design; offsets, bit fields and the single shared mask are this design's
// choices (offsets and fields follow the common layout for this register set).
//
// Registers (offset, secure window; banked ones repeat at 0x100 + offset):
//   0x00 CR   [0]RXRST [1]TXRST [2]RXEN [3]RXDIS [4]TXEN [5]TXDIS [6]RSTTO
//             [7]STTBRK [8]STPBRK (write strobes; read: [2]rx on [4]tx on [7]break)
//   0x04 MR   [2:1] length [5:3] parity [7:6] stop bits [9:8] channel mode
//   0x08 IER / 0x0C IDR / 0x10 IMR  interrupt mask set / clear / value
//   0x14 ISR* sticky events, write 1 to clear (bits in ss_pkg IX_*)
//   0x18 BAUDGEN CD   0x34 BAUDDIV BDIV   (baud = f_clk / (CD*(BDIV+1)))
//   0x1C RXTOUT  idle timeout in units of 4 bit times, 0 = off
//   0x20 RXWM*  Rx trigger level   0x44 TXWM*  Tx trigger level
//   0x24 MODEMCR [0]DTR [1]RTS [5]FCM   0x38 FLOWDEL RTS flow-control level
//   0x28 MODEMSR* [0]DCTS [1]DDSR [2]TERI [3]DDCD [4]CTS [5]DSR [6]RI [7]DCD [8]FCMS
//   0x2C SR*  channel status (ss_pkg SR_*)   0x30 FIFO*  Tx write / Rx read
// Any other access, and every normal-world access outside the 0x100 window,
// is answered with SLVERR and has no effect.
//
// Timing: register accesses take effect in the access cycle of axil_ns_slave;
// irq and fiq are registered one cycle after the status bit they reflect.
module ss_uart
  import ss_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  localparam int unsigned LW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axi_req,
  output axil_rsp_t axi_rsp,
  input  logic      rxd_s,
  input  logic      rxd_ns,
  output logic      txd,
  input  logic      cts,
  input  logic      dsr,
  input  logic      ri,
  input  logic      dcd,
  output logic      dtr,
  output logic      rts,
  output logic      irq,
  output logic      fiq
);

  localparam int unsigned S = 0, NS = 1;

  // ---------------- bus front end ----------------
  logic              reg_wr, reg_rd, reg_ns, reg_err;
  logic [AXI_AW-1:0] reg_addr;
  logic [31:0]       reg_wdata, reg_rdata;
  logic [3:0]        reg_wstrb;

  axil_ns_slave #(.ADDR_W(AXI_AW)) u_axi (
    .clk, .rst_n, .axi_req, .axi_rsp,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_wstrb, .reg_ns,
    .reg_rdata, .reg_err
  );

  // ---------------- registers ----------------
  logic              rx_en, tx_en, brk_q;
  logic [9:0]        mr_q;
  logic [IX_N-1:0]   imr_q;
  logic [15:0]       cd_q;
  logic [7:0]        bdiv_q, rto_q;
  logic [2:0]        mcr_q;        // {FCM, RTS, DTR}
  logic [5:0]        fdel_q;
  logic [IX_N-1:0]   isr_q  [2];
  logic [5:0]        rxwm_q [2];
  logic [5:0]        txwm_q [2];
  logic [3:0]        msr_d_q[2];   // modem change flags {DDCD, TERI, DDSR, DCTS}

  uart_fmt_t fmt;
  assign fmt = decode_mode(mr_q);

  // ---------------- address decode ----------------
  logic       win_ns, win_s, is_banked, is_secure_reg, bank;
  logic [7:0] off;
  assign off    = reg_addr[7:0];
  assign win_s  = (reg_addr[11:8] == 4'h0);
  assign win_ns = (reg_addr[11:8] == UART_NS_BASE[11:8]);
  assign is_banked = (off == U_ISR) || (off == U_RXWM) || (off == U_MODEMSR) ||
                     (off == U_SR)  || (off == U_FIFO) || (off == U_TXWM);
  assign is_secure_reg = (off == U_CR) || (off == U_MR) || (off == U_IER) || (off == U_IDR) ||
                         (off == U_IMR) || (off == U_BAUDGEN) || (off == U_RXTOUT) ||
                         (off == U_MODEMCR) || (off == U_BAUDDIV) || (off == U_FLOWDEL);
  assign bank = win_ns;
  always_comb begin
    reg_err = 1'b1;
    if (win_ns && is_banked) reg_err = 1'b0;
    else if (win_s && !reg_ns && (is_banked || is_secure_reg)) reg_err = 1'b0;
  end

  logic wr_ok, rd_ok;
  assign wr_ok = reg_wr && !reg_err;
  assign rd_ok = reg_rd && !reg_err;
  logic wsec, wb;   // secure-register write, banked write
  assign wsec = wr_ok && is_secure_reg;
  assign wb   = wr_ok && is_banked;

  // ---------------- FIFOs ----------------
  logic [7:0]    txf_dout[2], rxf_dout[2];
  logic [LW-1:0] txf_lvl[2], rxf_lvl[2];
  logic          txf_empty[2], txf_full[2], rxf_empty[2], rxf_full[2];
  logic          txf_push[2], txf_pop[2], rxf_push[2], rxf_pop[2];
  logic          tx_clr, rx_clr;

  assign tx_clr = wsec && off == U_CR && reg_wstrb[0] && reg_wdata[CR_TXRST];
  assign rx_clr = wsec && off == U_CR && reg_wstrb[0] && reg_wdata[CR_RXRST];

  // receiver outputs
  logic       rx_done, rx_done_ns, rx_par_err, rx_frm_err, rx_brk, rx_dumped, rx_active, rx_cur_ns;
  logic [7:0] rx_data;
  logic       tx_active, tx_cur_ns;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    assign txf_push[b] = wb && off == U_FIFO && bank == b && reg_wstrb[0];
    assign rxf_pop[b]  = rd_ok && off == U_FIFO && bank == b;
    assign rxf_push[b] = rx_done && (rx_done_ns == b) && !rx_brk;

    ss_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_txf (
      .clk, .rst_n, .clr(tx_clr), .push(txf_push[b]), .din(reg_wdata[7:0]),
      .pop(txf_pop[b]), .dout(txf_dout[b]), .level(txf_lvl[b]),
      .empty(txf_empty[b]), .full(txf_full[b])
    );
    ss_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_rxf (
      .clk, .rst_n, .clr(rx_clr), .push(rxf_push[b]), .din(rx_data),
      .pop(rxf_pop[b]), .dout(rxf_dout[b]), .level(rxf_lvl[b]),
      .empty(rxf_empty[b]), .full(rxf_full[b])
    );
  end

  // ---------------- baud rate, Tx, Rx, mode switch, modem ----------------
  logic sample_en, bit_en;
  uart_baud_gen #(.CD_W(16), .BDIV_W(8)) u_baud (
    .clk, .rst_n, .en(rx_en || tx_en), .cd(cd_q), .bdiv(bdiv_q),
    .sample_en, .tx_bit_en(bit_en)
  );

  logic tx_core, rx_s_core, rx_ns_core, tx_hold;
  uart_tx u_tx (
    .clk, .rst_n, .en(tx_en), .bit_en, .fmt,
    .s_empty(txf_empty[S]),  .s_data(txf_dout[S]),  .s_pop(txf_pop[S]),
    .ns_empty(txf_empty[NS]), .ns_data(txf_dout[NS]), .ns_pop(txf_pop[NS]),
    .brk(brk_q), .hold(tx_hold), .txd(tx_core), .active(tx_active), .cur_ns(tx_cur_ns)
  );

  uart_rx #(.BDIV_W(8)) u_rx (
    .clk, .rst_n, .en(rx_en), .sample_en, .bdiv(bdiv_q), .fmt,
    .rxd_s(rx_s_core), .rxd_ns(rx_ns_core),
    .done(rx_done), .done_ns(rx_done_ns), .data(rx_data),
    .par_err(rx_par_err), .frm_err(rx_frm_err), .brk_det(rx_brk),
    .dumped(rx_dumped), .active(rx_active), .cur_ns(rx_cur_ns)
  );

  uart_mode_switch u_mode (
    .chmode(chmode_t'(mr_q[9:8])), .tx_core, .rxd_s_pin(rxd_s), .rxd_ns_pin(rxd_ns),
    .txd_pin(txd), .rx_s_core, .rx_ns_core
  );

  logic [4:0] mstat;
  logic [3:0] mdelta;
  logic [LW-1:0] rx_lvl_max;
  assign rx_lvl_max = (rxf_lvl[S] > rxf_lvl[NS]) ? rxf_lvl[S] : rxf_lvl[NS];
  uart_modem_ctrl #(.LW(LW)) u_modem (
    .clk, .rst_n, .mcr(mcr_q), .fdel(fdel_q), .rx_level(rx_lvl_max),
    .cts, .dsr, .ri, .dcd, .dtr, .rts, .status(mstat), .delta(mdelta), .tx_hold
  );

  // ---------------- channel status per bank ----------------
  logic [15:0] sr[2];
  for (genvar b = 0; b < 2; b++) begin : g_sr
    always_comb begin
      sr[b] = '0;
      sr[b][SR_RTRIG]   = (rxwm_q[b] != '0) && (rxf_lvl[b] >= LW'(rxwm_q[b]));
      sr[b][SR_REMPTY]  = rxf_empty[b];
      sr[b][SR_RFUL]    = rxf_full[b];
      sr[b][SR_TEMPTY]  = txf_empty[b];
      sr[b][SR_TFUL]    = txf_full[b];
      sr[b][SR_RACTIVE] = rx_active && (rx_cur_ns == b);
      sr[b][SR_TACTIVE] = tx_active && (tx_cur_ns == b);
      sr[b][SR_TTRIG]   = (txwm_q[b] != '0) && (txf_lvl[b] >= LW'(txwm_q[b]));
      sr[b][SR_TNFUL]   = (txf_lvl[b] >= LW'(FIFO_DEPTH - 1));
    end
  end

  // ---------------- receiver timeout per bank ----------------
  // Counts bit times while the bank's Rx FIFO holds data and no byte
  // arrives; after RTO*4 bit times the TIMEOUT event fires once.
  logic [9:0] to_cnt[2];
  logic       to_armed[2], to_evt[2];
  logic       rstto;
  assign rstto = wsec && off == U_CR && reg_wstrb[0] && reg_wdata[CR_RSTTO];
  for (genvar b = 0; b < 2; b++) begin : g_to
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        to_cnt[b]   <= '0;
        to_armed[b] <= 1'b0;
        to_evt[b]   <= 1'b0;
      end else begin
        to_evt[b] <= 1'b0;
        if (rstto || rxf_push[b] || rxf_empty[b] || rto_q == '0) begin
          to_cnt[b]   <= '0;
          to_armed[b] <= !rxf_empty[b] || rxf_push[b];
        end else if (to_armed[b] && bit_en) begin
          if (to_cnt[b] + 10'd1 >= {rto_q, 2'b00}) begin
            to_evt[b]   <= 1'b1;
            to_armed[b] <= 1'b0;
          end else begin
            to_cnt[b] <= to_cnt[b] + 10'd1;
          end
        end
      end
    end
  end

  // ---------------- interrupt status per bank ----------------
  logic [15:0] sr_prev[2];
  for (genvar b = 0; b < 2; b++) begin : g_isr
    logic [IX_N-1:0] set, clr;
    logic [15:0]     rise;
    assign rise = sr[b] & ~sr_prev[b];
    always_comb begin
      set = '0;
      set[IX_RTRIG]   = rise[SR_RTRIG];
      set[IX_REMPTY]  = rise[SR_REMPTY];
      set[IX_RFUL]    = rise[SR_RFUL];
      set[IX_TEMPTY]  = rise[SR_TEMPTY];
      set[IX_TFUL]    = rise[SR_TFUL];
      set[IX_TTRIG]   = rise[SR_TTRIG];
      set[IX_TNFUL]   = rise[SR_TNFUL];
      set[IX_ROVR]    = rx_done && (rx_done_ns == b) && !rx_brk && rxf_full[b];
      set[IX_FRAME]   = rx_done && (rx_done_ns == b) && rx_frm_err;
      set[IX_PARE]    = rx_done && (rx_done_ns == b) && rx_par_err && !rx_brk;
      set[IX_BREAK]   = rx_done && (rx_done_ns == b) && rx_brk;
      set[IX_TIMEOUT] = to_evt[b];
      set[IX_DMSI]    = |mdelta;
      set[IX_TOVR]    = wb && off == U_FIFO && bank == b && reg_wstrb[0] && txf_full[b];
      clr = '0;
      if (wb && off == U_ISR && bank == b) clr = reg_wdata[IX_N-1:0];
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        isr_q[b]   <= '0;
        sr_prev[b] <= '0;
        msr_d_q[b] <= '0;
        rxwm_q[b]  <= 6'd32;
        txwm_q[b]  <= 6'd32;
      end else begin
        sr_prev[b] <= sr[b];
        isr_q[b]   <= set | (isr_q[b] & ~clr);
        msr_d_q[b] <= mdelta | (msr_d_q[b] &
                      ~((wb && off == U_MODEMSR && bank == b) ? reg_wdata[3:0] : 4'h0));
        if (wb && off == U_RXWM && bank == b && reg_wstrb[0]) rxwm_q[b] <= reg_wdata[5:0];
        if (wb && off == U_TXWM && bank == b && reg_wstrb[0]) txwm_q[b] <= reg_wdata[5:0];
      end
    end
  end

  // ---------------- secure-only registers ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_en  <= 1'b0;
      tx_en  <= 1'b0;
      brk_q  <= 1'b0;
      mr_q   <= '0;
      imr_q  <= '0;
      cd_q   <= 16'd28;
      bdiv_q <= 8'd15;
      rto_q  <= '0;
      mcr_q  <= '0;
      fdel_q <= '0;
    end else if (wsec) begin
      unique case (off)
        U_CR: begin
          if (reg_wstrb[0]) begin
            if (reg_wdata[CR_RXEN])   rx_en <= 1'b1;
            if (reg_wdata[CR_RXDIS])  rx_en <= 1'b0;
            if (reg_wdata[CR_TXEN])   tx_en <= 1'b1;
            if (reg_wdata[CR_TXDIS])  tx_en <= 1'b0;
            if (reg_wdata[CR_STTBRK]) brk_q <= 1'b1;
          end
          if (reg_wstrb[1] && reg_wdata[CR_STPBRK]) brk_q <= 1'b0;
        end
        U_MR: begin
          if (reg_wstrb[0]) mr_q[7:0] <= reg_wdata[7:0];
          if (reg_wstrb[1]) mr_q[9:8] <= reg_wdata[9:8];
        end
        U_IER:     imr_q  <= imr_q |  reg_wdata[IX_N-1:0];
        U_IDR:     imr_q  <= imr_q & ~reg_wdata[IX_N-1:0];
        U_BAUDGEN: begin
          if (reg_wstrb[0]) cd_q[7:0]  <= reg_wdata[7:0];
          if (reg_wstrb[1]) cd_q[15:8] <= reg_wdata[15:8];
        end
        U_BAUDDIV: if (reg_wstrb[0]) bdiv_q <= reg_wdata[7:0];
        U_RXTOUT:  if (reg_wstrb[0]) rto_q  <= reg_wdata[7:0];
        U_MODEMCR: if (reg_wstrb[0]) mcr_q  <= {reg_wdata[5], reg_wdata[1], reg_wdata[0]};
        U_FLOWDEL: if (reg_wstrb[0]) fdel_q <= reg_wdata[5:0];
        default: ;
      endcase
    end
  end

  // ---------------- read mux ----------------
  always_comb begin
    reg_rdata = '0;
    unique case (off)
      U_CR:      reg_rdata = {24'b0, brk_q, 2'b0, tx_en, 1'b0, rx_en, 2'b0};
      U_MR:      reg_rdata = {22'b0, mr_q};
      U_IMR:     reg_rdata = {{(32-IX_N){1'b0}}, imr_q};
      U_BAUDGEN: reg_rdata = {16'b0, cd_q};
      U_BAUDDIV: reg_rdata = {24'b0, bdiv_q};
      U_RXTOUT:  reg_rdata = {24'b0, rto_q};
      U_MODEMCR: reg_rdata = {26'b0, mcr_q[2], 3'b0, mcr_q[1], mcr_q[0]};
      U_FLOWDEL: reg_rdata = {26'b0, fdel_q};
      U_ISR:     reg_rdata = {{(32-IX_N){1'b0}}, isr_q[bank]};
      U_RXWM:    reg_rdata = {26'b0, rxwm_q[bank]};
      U_TXWM:    reg_rdata = {26'b0, txwm_q[bank]};
      U_SR:      reg_rdata = {16'b0, sr[bank]};
      U_MODEMSR: reg_rdata = {23'b0, mstat, msr_d_q[bank]};
      U_FIFO:    reg_rdata = rxf_empty[bank] ? 32'h0 : {24'b0, rxf_dout[bank]};
      default:   reg_rdata = '0;
    endcase
  end

  // ---------------- interrupts ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fiq <= 1'b0;
      irq <= 1'b0;
    end else begin
      fiq <= |(isr_q[S]  & imr_q);
      irq <= |(isr_q[NS] & imr_q);
    end
  end

  // The normal world never changes a secure-only register.
  a_ns_no_secure_write: assert property (@(posedge clk) disable iff (!rst_n)
    reg_wr && reg_ns && !win_ns |-> reg_err);

endmodule
