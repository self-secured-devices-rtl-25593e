// tb_uart_modem_ctrl: self-checking test of the modem controller.
//
// Checks DTR/RTS driven from the Modem Control bits, automatic flow control
// (RTS drops at the Flow Control Delay level and returns 4 below it, the
// transmitter is held while CTS is low), the synchronised status bits and
// the one-cycle change pulses, which arrive 2 clocks after a pin changes.
// A random phase then runs 3000 cycles: the FIFO level wanders and the
// flow-delay value changes now and then, and RTS is compared every cycle
// with a reference model of the hysteresis; the four modem pins toggle at
// random, and each pin must produce exactly one change pulse per toggle and
// end with its status bit equal to the pin.
module tb_uart_modem_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] mcr = 0;
  logic [5:0] fdel = 0;
  logic [6:0] rx_level = 0;
  logic cts = 0, dsr = 0, ri = 0, dcd = 0, dtr, rts, tx_hold;
  logic [4:0] status;
  logic [3:0] delta;

  uart_modem_ctrl #(.LW(7)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_delta = 0;
  logic [3:0] delta_seen = 0;
  int n_bit_delta[4] = '{0, 0, 0, 0};
  always @(posedge clk) if (rst_n && |delta) begin
    n_delta++; delta_seen |= delta;
    for (int i = 0; i < 4; i++) if (delta[i]) n_bit_delta[i]++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    n_delta = 0;
    // manual DTR/RTS
    mcr = 3'b011; #1;
    check(dtr && rts, "manual DTR/RTS on");
    mcr = 3'b000; #1;
    check(!dtr && !rts, "manual DTR/RTS off");
    // pin change: CTS then RI
    @(negedge clk); cts = 1;
    repeat (3) @(negedge clk);
    check(status[0] == 1 && n_delta == 1 && delta_seen == 4'b0001, "CTS change flagged once");
    @(negedge clk); ri = 1; dcd = 1;
    repeat (3) @(negedge clk);
    check(status[3:0] == 4'b1101 && n_delta == 2 && delta_seen == 4'b1101, "RI/DCD change flagged");
    // automatic flow control
    mcr = 3'b100; fdel = 6'd20; rx_level = 7'd10;
    @(negedge clk);
    check(rts && !tx_hold, "FC: RTS high below level, CTS high -> no hold");
    rx_level = 7'd20; @(negedge clk);
    check(!rts && status[4] == 0, "FC: RTS drops at level");
    rx_level = 7'd17; @(negedge clk);
    check(!rts, "FC: RTS still low within hysteresis");
    rx_level = 7'd15; @(negedge clk);
    check(rts, "FC: RTS returns 4 below level");
    cts = 0; repeat (3) @(negedge clk);
    check(tx_hold, "FC: CTS low holds the transmitter");
    mcr = 3'b000; #1;
    check(!tx_hold, "no hold without flow control");

    // ---- random phase ----
    begin
      bit m_rts;
      int n_toggle[4] = '{0, 0, 0, 0};
      int rts_err = 0, n_lo = 0, n_hi = 0;
      logic [3:0] pins;
      mcr = 3'b100; fdel = 6'd32; rx_level = 0;
      repeat (2) @(negedge clk);
      m_rts = rts;
      for (int i = 0; i < 4; i++) n_bit_delta[i] = 0;
      for (int t = 0; t < 3000; t++) begin
        // model: the value RTS takes at the coming clock edge
        if (rx_level >= 7'(fdel)) m_rts = 0;
        else if (int'(rx_level) + 4 < int'(fdel) || rx_level == 0) m_rts = 1;
        @(negedge clk);
        if (rts !== m_rts) rts_err++;
        if (m_rts) n_hi++; else n_lo++;
        // stimulus for the next cycle
        if ($urandom_range(0, 199) == 0) fdel = 6'($urandom_range(4, 63));
        case ($urandom_range(0, 3))
          0: if (rx_level < 64) rx_level++;
          1: if (rx_level > 0) rx_level--;
          default: ;
        endcase
        if ($urandom_range(0, 15) == 0) begin
          automatic int k;
          k = $urandom_range(0, 3);
          pins = {dcd, ri, dsr, cts};
          pins[k] = ~pins[k];
          {dcd, ri, dsr, cts} = pins;
          n_toggle[k]++;
        end
      end
      repeat (5) @(negedge clk);
      check(rts_err == 0, $sformatf("RTS differs from the hysteresis model in %0d cycles", rts_err));
      check(n_lo > 100 && n_hi > 100, $sformatf("RTS exercised both ways (%0d low, %0d high)", n_lo, n_hi));
      for (int i = 0; i < 4; i++)
        check(n_bit_delta[i] == n_toggle[i] && n_toggle[i] > 0,
              $sformatf("pin %0d: %0d toggles, %0d change pulses", i, n_toggle[i], n_bit_delta[i]));
      check(status[3:0] == {dcd, ri, dsr, cts}, "status follows the pins");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
