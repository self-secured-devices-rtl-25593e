// ss_timer: self-secured timer.
//
// A Cortex-A9-style private timer extended so that both TrustZone worlds can
// use it at once. The Counter and Load registers are banked (one
// ss_timer_counter per world); the Control and Interrupt Status registers are
// single registers extended with bits for the second world. The secure world
// owns the prescaler, the interrupt enables and its own enable/mode bits; the
// normal world can only set its own Enable and Auto Reload bits (Control bits
// 3 and 4) and see or clear its own IRQ flag (Interrupt Status bit 1).
// The secure counter's event raises FIQ, the non-secure one's raises IRQ.
//
// Address map (byte offsets):
//   secure window (AxPROT[1]=0 only): 0x00 Load(S) 0x04 Counter(S)
//                                     0x08 Control 0x0C Interrupt Status
//   non-secure window (both worlds):  0x20 Load(NS) 0x24 Counter(NS)
//                                     0x28 Control (NS bits) 0x2C Int Status (NS bit)
// A normal-world access to the secure window, or any unmapped access, gets
// SLVERR and changes nothing. Status flags clear when written with 1.
// Control bit layout follows the published register drawing; the offsets,
// write-1-to-clear and the SLVERR answer are this design's choices.
//
// Timing: the prescaler gives one tick every PRESCALER+1 clocks; the flag is
// set the cycle after the counter's event pulse, and irq/fiq are registered
// from flag AND enable.
module ss_timer
  import ss_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axi_req,
  output axil_rsp_t axi_rsp,
  output logic      irq,
  output logic      fiq
);

  logic              reg_wr, reg_rd, reg_ns, reg_err;
  logic [AXI_AW-1:0] reg_addr;
  logic [31:0]       reg_wdata, reg_rdata;
  logic [3:0]        reg_wstrb;

  axil_ns_slave #(.ADDR_W(AXI_AW)) u_axi (
    .clk, .rst_n, .axi_req, .axi_rsp,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_wstrb, .reg_ns,
    .reg_rdata, .reg_err
  );

  logic [31:0] ctrl_q;
  logic [1:0]  isr_q;
  logic [7:0]  pre_cnt;
  logic        tick;

  logic [31:0] load_s, count_s, load_ns, count_ns;
  logic        ev_s, ev_ns;

  // Byte-strobe merge of a write into an old value.
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++) if (strb[b]) old[8*b +: 8] = nw[8*b +: 8];
    return old;
  endfunction

  logic [31:0] wmerged_ctrl;
  assign wmerged_ctrl = merge(ctrl_q, reg_wdata, reg_wstrb);

  // Address decode and access rights.
  logic hit_s_load, hit_s_cnt, hit_ctrl, hit_isr, hit_ns_load, hit_ns_cnt, hit_ns_ctrl, hit_ns_isr;
  always_comb begin
    hit_s_load  = (reg_addr == TMR_S_LOAD);
    hit_s_cnt   = (reg_addr == TMR_S_COUNT);
    hit_ctrl    = (reg_addr == TMR_CTRL);
    hit_isr     = (reg_addr == TMR_ISR);
    hit_ns_load = (reg_addr == TMR_NS_LOAD);
    hit_ns_cnt  = (reg_addr == TMR_NS_COUNT);
    hit_ns_ctrl = (reg_addr == TMR_NS_CTRL);
    hit_ns_isr  = (reg_addr == TMR_NS_ISR);
    reg_err = 1'b1;
    if (hit_ns_load || hit_ns_cnt || hit_ns_ctrl || hit_ns_isr) reg_err = 1'b0;
    else if ((hit_s_load || hit_s_cnt || hit_ctrl || hit_isr) && !reg_ns) reg_err = 1'b0;
  end

  logic wr_ok;
  assign wr_ok = reg_wr && !reg_err;

  // Read mux; the non-secure views hide every secure bit.
  always_comb begin
    reg_rdata = '0;
    if (hit_s_load)  reg_rdata = load_s;
    if (hit_s_cnt)   reg_rdata = count_s;
    if (hit_ctrl)    reg_rdata = ctrl_q;
    if (hit_isr)     reg_rdata = {30'b0, isr_q};
    if (hit_ns_load) reg_rdata = load_ns;
    if (hit_ns_cnt)  reg_rdata = count_ns;
    if (hit_ns_ctrl) reg_rdata = ctrl_q & TC_NS_MASK;
    if (hit_ns_isr)  reg_rdata = {30'b0, isr_q[TI_IRQ], 1'b0};
  end

  // Control register. Through the secure window the secure world writes all
  // implemented bits; through the NS window anyone writes only the NS bits.
  always_ff @(posedge clk) begin
    if (!rst_n) ctrl_q <= '0;
    else if (wr_ok && hit_ctrl)
      ctrl_q <= wmerged_ctrl & TC_MASK;
    else if (wr_ok && hit_ns_ctrl)
      ctrl_q <= (ctrl_q & ~TC_NS_MASK) | (wmerged_ctrl & TC_NS_MASK);
  end

  // Shared prescaler.
  logic any_en;
  assign any_en = ctrl_q[TC_EN_S] | ctrl_q[TC_EN_NS];
  always_ff @(posedge clk) begin
    if (!rst_n || !any_en) begin
      pre_cnt <= '0;
    end else if (pre_cnt >= ctrl_q[TC_PRE_LSB +: 8]) begin
      pre_cnt <= '0;
    end else begin
      pre_cnt <= pre_cnt + 8'd1;
    end
  end
  assign tick = any_en && (pre_cnt >= ctrl_q[TC_PRE_LSB +: 8]);

  ss_timer_counter #(.W(32)) u_cnt_s (
    .clk, .rst_n, .tick,
    .enable(ctrl_q[TC_EN_S]), .auto_reload(ctrl_q[TC_AR_S]),
    .load_wr(wr_ok && hit_s_load), .load_wdata(merge(load_s, reg_wdata, reg_wstrb)),
    .cnt_wr(wr_ok && hit_s_cnt),   .cnt_wdata(merge(count_s, reg_wdata, reg_wstrb)),
    .load_q(load_s), .count_q(count_s), .event_o(ev_s)
  );

  ss_timer_counter #(.W(32)) u_cnt_ns (
    .clk, .rst_n, .tick,
    .enable(ctrl_q[TC_EN_NS]), .auto_reload(ctrl_q[TC_AR_NS]),
    .load_wr(wr_ok && hit_ns_load), .load_wdata(merge(load_ns, reg_wdata, reg_wstrb)),
    .cnt_wr(wr_ok && hit_ns_cnt),   .cnt_wdata(merge(count_ns, reg_wdata, reg_wstrb)),
    .load_q(load_ns), .count_q(count_ns), .event_o(ev_ns)
  );

  // Interrupt status: set by events, cleared by writing 1. A new event in
  // the clearing cycle wins.
  logic [1:0] clr;
  always_comb begin
    clr = '0;
    if (wr_ok && hit_isr && reg_wstrb[0])    clr = reg_wdata[1:0];
    if (wr_ok && hit_ns_isr && reg_wstrb[0]) clr[TI_IRQ] = reg_wdata[TI_IRQ];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      isr_q <= '0;
      irq   <= 1'b0;
      fiq   <= 1'b0;
    end else begin
      isr_q[TI_FIQ] <= ev_s  | (isr_q[TI_FIQ] & ~clr[TI_FIQ]);
      isr_q[TI_IRQ] <= ev_ns | (isr_q[TI_IRQ] & ~clr[TI_IRQ]);
      fiq <= isr_q[TI_FIQ] & ctrl_q[TC_FIQEN];
      irq <= isr_q[TI_IRQ] & ctrl_q[TC_IRQEN];
    end
  end

endmodule
