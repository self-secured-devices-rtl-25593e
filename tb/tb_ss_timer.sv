// tb_ss_timer: self-checking test of the self-secured timer over AXI4-Lite.
//
// The secure world sets a prescaler of 3 and a secure Load of 9 in
// auto-reload mode: FIQ must come every (9+1)*(3+1) = 40 clocks. The normal
// world runs its own counter through the non-secure window and gets IRQs.
// The test checks the access rules: normal-world accesses to the secure
// window get SLVERR and change nothing; through the non-secure window the
// normal world can change only Control bits 3..4, sees only those bits and
// only its IRQ flag, and cannot clear the FIQ flag. The secure world reaches
// both windows. Single-shot mode of the non-secure counter is checked too.
module tb_ss_timer;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic irq, fiq;

  ss_timer dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp), .irq, .fiq);
  axil_master u_m (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  axi_resp_t r;
  logic [31:0] d;
  int cyc;
  task automatic wr(input logic [11:0] a, input logic [31:0] v, input logic ns, input axi_resp_t exp);
    u_m.write(a, v, ns, r, cyc);
    check(r == exp, $sformatf("write %h ns=%0d resp %0d", a, ns, r));
  endtask
  task automatic rd(input logic [11:0] a, input logic ns, input logic [31:0] exp, input axi_resp_t expr = RESP_OKAY);
    u_m.read(a, ns, d, r, cyc);
    check(r == expr && d == exp, $sformatf("read %h ns=%0d got %h/%0d exp %h", a, ns, d, r, exp));
  endtask

  // time of FIQ and IRQ rising edges
  longint fiq_t[$], irq_t[$];
  logic fiq_d = 0, irq_d = 0;
  longint now = 0;
  always @(posedge clk) begin
    now++;
    if (fiq && !fiq_d) fiq_t.push_back(now);
    if (irq && !irq_d) irq_t.push_back(now);
    fiq_d <= fiq; irq_d <= irq;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // --- access rules ---
    wr(TMR_S_LOAD, 32'd9, 1'b1, RESP_SLVERR);
    rd(TMR_S_LOAD, 1'b0, 32'd0);
    wr(TMR_CTRL, 32'hFFFF_FFFF, 1'b1, RESP_SLVERR);
    rd(TMR_CTRL, 1'b0, 32'd0);
    rd(TMR_ISR, 1'b1, 32'd0, RESP_SLVERR);
    wr(12'h040, 32'd1, 1'b0, RESP_SLVERR);      // unmapped

    // secure programming: prescaler 3, FIQ+IRQ enable, S enable + auto reload
    wr(TMR_S_LOAD, 32'd9, 1'b0, RESP_OKAY);
    rd(TMR_S_COUNT, 1'b0, 32'd9);
    // NS tries to set every control bit through its window
    wr(TMR_NS_CTRL, 32'hFFFF_FFE7, 1'b1, RESP_OKAY);
    rd(TMR_CTRL, 1'b0, 32'd0);
    wr(TMR_NS_LOAD, 32'd4, 1'b1, RESP_OKAY);
    rd(TMR_NS_LOAD, 1'b0, 32'd4);               // secure sees NS bank
    wr(TMR_CTRL, 32'h0000_0327, 1'b0, RESP_OKAY); // pre=3, IRQEN, FIQEN, AR_S, EN_S
    rd(TMR_CTRL, 1'b0, 32'h0000_0327);
    rd(TMR_NS_CTRL, 1'b1, 32'h0);               // NS view hides secure bits

    // FIQ period
    for (int i = 0; i < 4; i++) begin
      wait (fiq);
      wr(TMR_ISR, 32'h1, 1'b0, RESP_OKAY);
      check(!irq, "no IRQ while NS counter off");
    end
    check(fiq_t.size() >= 4, "FIQs seen");
    for (int i = 1; i < fiq_t.size(); i++)
      check(fiq_t[i] - fiq_t[i-1] == 40, $sformatf("FIQ period 40, got %0d", fiq_t[i] - fiq_t[i-1]));

    // NS counter: enable + auto reload through its window; Load 4 -> 20 clocks
    wr(TMR_NS_CTRL, 32'h0000_0018, 1'b1, RESP_OKAY);
    rd(TMR_NS_CTRL, 1'b1, 32'h18);
    rd(TMR_CTRL, 1'b0, 32'h0000_033F);
    wait (irq);
    rd(TMR_NS_ISR, 1'b1, 32'h2);
    // NS cannot clear the FIQ flag
    wait (dut.isr_q[TI_FIQ]);
    wr(TMR_NS_ISR, 32'h3, 1'b1, RESP_OKAY);
    u_m.read(TMR_ISR, 1'b0, d, r, cyc);
    check(d[TI_FIQ] == 1'b1, "FIQ flag survives NS clear attempt");
    check(fiq, "FIQ still raised after NS clear attempt");
    wr(TMR_ISR, 32'h1, 1'b0, RESP_OKAY);
    irq_t.delete();
    for (int i = 0; i < 3; i++) begin
      wait (irq);
      wr(TMR_NS_ISR, 32'h2, 1'b1, RESP_OKAY);
    end
    for (int i = 1; i < irq_t.size(); i++)
      check(irq_t[i] - irq_t[i-1] == 20, $sformatf("IRQ period 20, got %0d", irq_t[i] - irq_t[i-1]));

    // NS single shot: exactly one IRQ
    wr(TMR_NS_CTRL, 32'h0000_0008, 1'b1, RESP_OKAY);
    wr(TMR_NS_COUNT, 32'd6, 1'b1, RESP_OKAY);
    wr(TMR_NS_ISR, 32'h2, 1'b1, RESP_OKAY);
    irq_t.delete();
    repeat (200) @(negedge clk);
    check(irq_t.size() == 1, $sformatf("single shot one IRQ, got %0d", irq_t.size()));
    rd(TMR_NS_COUNT, 1'b1, 32'd0);
    // secure counter keeps running regardless of NS actions
    check(dut.ctrl_q[TC_EN_S] == 1'b1, "secure enable untouched");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
