// tb_ss_world_access: access cost and isolation under mixed-world traffic.
//
// Part 1 (access cost): 100 register writes and 100 reads, alternating
// between the secure and the normal world on both devices. Every access
// must take the same 3 bus clocks whichever world issues it and whichever
// world came before: switching worlds costs nothing, because no
// re-assignment of the device takes place.
// Part 2 (isolation): the secure world runs its timer (FIQ every
// (Load+1)*(PRESCALER+1) clocks) and configures the UART. The normal world
// then issues 600 random accesses over both devices' whole address range.
// Every one that hits the secure window must get SLVERR; afterwards every
// secure register must read back unchanged, and the secure counter's events
// must have kept their exact period throughout. Just before the storm the
// secure world queues 8 UART bytes: they must be the first 8 frames on TxD,
// complete and in order, whatever the normal world does meanwhile.
module tb_ss_world_access;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t t_req, u_req;
  axil_rsp_t t_rsp, u_rsp;
  logic tmr_irq, tmr_fiq, uart_irq, uart_fiq, txd, dtr, rts;

  ss_devices_top dut (
    .clk, .rst_n,
    .tmr_axi_req(t_req), .tmr_axi_rsp(t_rsp), .tmr_irq, .tmr_fiq,
    .uart_axi_req(u_req), .uart_axi_rsp(u_rsp), .uart_irq, .uart_fiq,
    .rxd_s(1'b1), .rxd_ns(1'b1), .txd, .cts(1'b1), .dsr(1'b0), .ri(1'b0), .dcd(1'b0), .dtr, .rts
  );
  axil_master u_tm (.clk, .req(t_req), .rsp(t_rsp));
  axil_master u_um (.clk, .req(u_req), .rsp(u_rsp));

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

  // TxD decoder, 8N1 at 30 clocks per bit (CD 3, BDIV 9 set below)
  localparam int BIT = 30;
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

  // secure timer events: exact spacing
  longint now = 0, last_ev = -1;
  int n_ev = 0, bad_period = 0, exp_period = 0;
  always @(posedge clk) begin
    now++;
    if (rst_n && dut.u_timer.ev_s) begin
      if (last_ev >= 0 && exp_period != 0 && now - last_ev != exp_period) bad_period++;
      last_ev = now;
      n_ev++;
    end
  end

  initial begin
    axi_resp_t r;
    logic [31:0] d;
    int cyc, wsum = 0, rsum = 0, n_denied = 0, n_hit_secure = 0;
    logic [31:0] s_cfg[6];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- part 1: access cost ----
    for (int i = 0; i < 100; i++) begin
      bit ns = i[0];
      u_tm.write(ns ? TMR_NS_LOAD : TMR_S_LOAD, 32'(i), ns, r, cyc);
      check(r == RESP_OKAY && cyc == 3, $sformatf("timer write %0d world %0d: %0d cycles", i, ns, cyc));
      wsum += cyc;
      u_um.read(ns ? UART_NS_BASE + U_SR : {4'h0, U_SR}, ns, d, r, cyc);
      check(r == RESP_OKAY && cyc == 3, $sformatf("uart read %0d world %0d: %0d cycles", i, ns, cyc));
      rsum += cyc;
    end
    $display("average write %0d.%02d, read %0d.%02d bus clocks over 100 alternating-world accesses",
             wsum / 100, wsum % 100, rsum / 100, rsum % 100);

    // ---- part 2: isolation ----
    u_tm.write(TMR_S_LOAD, 32'd24, 1'b0, r, cyc);
    u_tm.write(TMR_CTRL, 32'h0000_0207, 1'b0, r, cyc);   // prescaler 2, FIQ en, S on + AR
    exp_period = 25 * 3;
    u_um.write(U_BAUDGEN, 32'd3, 1'b0, r, cyc);
    u_um.write(U_BAUDDIV, 32'd9, 1'b0, r, cyc);
    u_um.write(U_MR, 32'h0000_0021, 1'b0, r, cyc);
    u_um.write(U_IER, 32'h0000_0123, 1'b0, r, cyc);
    u_um.write(U_RXTOUT, 32'd7, 1'b0, r, cyc);
    u_um.write(U_FLOWDEL, 32'd33, 1'b0, r, cyc);
    u_um.write(U_CR, 32'h14, 1'b0, r, cyc);
    u_tm.read(TMR_CTRL, 1'b0, s_cfg[0], r, cyc);
    u_um.read(U_BAUDGEN, 1'b0, s_cfg[1], r, cyc);
    u_um.read(U_BAUDDIV, 1'b0, s_cfg[2], r, cyc);
    u_um.read(U_MR, 1'b0, s_cfg[3], r, cyc);
    u_um.read(U_IMR, 1'b0, s_cfg[4], r, cyc);
    u_um.read(U_FLOWDEL, 1'b0, s_cfg[5], r, cyc);
    for (int i = 0; i < 8; i++) u_um.write(U_FIFO, 32'hC0 + 32'(i), 1'b0, r, cyc);
    n_ev = 0;
    fork
      for (int i = 0; i < 300; i++) begin
        automatic logic [11:0] a;
        a = 12'($urandom_range(0, 16'h7F) * 4);
        u_tm.write(a, $urandom, 1'b1, r, cyc);
        if (a < 12'h020) begin
          n_hit_secure++;
          if (r == RESP_SLVERR) n_denied++;
        end
      end
      for (int i = 0; i < 300; i++) begin
        automatic logic [11:0] a;
        a = 12'($urandom_range(0, 16'h7F) * 4);
        u_um.write(a, $urandom, 1'b1, r, cyc);
        if (a < 12'h100) begin
          n_hit_secure++;
          if (r == RESP_SLVERR) n_denied++;
        end
      end
    join
    check(n_hit_secure > 100 && n_denied == n_hit_secure,
          $sformatf("secure window refused the normal world %0d of %0d times", n_denied, n_hit_secure));
    u_tm.read(TMR_CTRL, 1'b0, d, r, cyc);
    check((d & ~TC_NS_MASK) == (s_cfg[0] & ~TC_NS_MASK), $sformatf("timer secure control kept: %h", d));
    u_tm.read(TMR_S_LOAD, 1'b0, d, r, cyc);
    check(d == 32'd24, "secure Load kept");
    u_um.read(U_BAUDGEN, 1'b0, d, r, cyc);
    check(d == s_cfg[1], "baud generator kept");
    u_um.read(U_BAUDDIV, 1'b0, d, r, cyc);
    check(d == s_cfg[2], "baud divider kept");
    u_um.read(U_MR, 1'b0, d, r, cyc);
    check(d == s_cfg[3], "mode kept");
    u_um.read(U_IMR, 1'b0, d, r, cyc);
    check(d == s_cfg[4], "interrupt mask kept");
    u_um.read(U_FLOWDEL, 1'b0, d, r, cyc);
    check(d == s_cfg[5], "flow delay kept");
    for (int w = 0; w < 20 * 10 * BIT && txq.size() < 8; w++) @(negedge clk);
    check(txq.size() >= 8, $sformatf("secure bytes sent: %0d frames seen", txq.size()));
    for (int i = 0; i < 8 && i < txq.size(); i++)
      check(txq[i] == 8'(8'hC0 + i), $sformatf("secure frame %0d: %h", i, txq[i]));
    check(n_ev > 10, $sformatf("secure timer kept running: %0d events", n_ev));
    check(bad_period == 0, $sformatf("secure timer period disturbed %0d times", bad_period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
