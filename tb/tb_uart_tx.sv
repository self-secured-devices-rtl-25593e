// tb_uart_tx: self-checking test of the UART transmitter.
//
// Two byte queues stand in for the secure and non-secure Tx FIFOs. A serial
// decoder in the testbench samples the line once per bit time and rebuilds
// frames (start, data LSB first, parity, stop bits). Checks: bytes and
// framing for 8N1 and 7O2; secure bytes always leave before waiting
// non-secure ones; a non-secure frame in flight is finished before a secure
// byte that arrives meanwhile; frames follow each other with no idle bit;
// hold and en stop new frames; break holds the line low.
module tb_uart_tx;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, bit_en = 0, brk = 0, hold = 0;
  uart_fmt_t fmt;
  logic s_empty, ns_empty, s_pop, ns_pop, txd, active, cur_ns;
  logic [7:0] s_data, ns_data;

  uart_tx dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned sq[$], nq[$];
  assign s_empty  = (sq.size() == 0);
  assign ns_empty = (nq.size() == 0);
  assign s_data   = s_empty ? 8'h0 : sq[0];
  assign ns_data  = ns_empty ? 8'h0 : nq[0];
  always @(posedge clk) begin
    if (s_pop)  void'(sq.pop_front());
    if (ns_pop) void'(nq.pop_front());
  end

  // bit_en every 4 clocks
  int div = 0;
  always @(negedge clk) begin div = (div + 1) % 4; bit_en = (div == 0); end

  // decoder: sample at the negedge of each bit_en cycle (line value of the bit time just ending)
  typedef struct { byte unsigned d; bit par_ok; bit stop_ok; } frame_t;
  frame_t got[$];
  int dstate = 0, nb = 0, idle_bits = 0, low_bits = 0;
  byte unsigned acc;
  bit par_ok;
  always @(negedge clk) if (rst_n && bit_en) begin
    if (txd == 0) low_bits++; else low_bits = 0;
    case (dstate)
      0: if (txd == 0) begin dstate = 1; nb = 0; acc = 0; end else idle_bits++;
      1: begin
           acc[nb] = txd; nb++;
           if (nb == int'(fmt.nbits)) dstate = fmt.par_en ? 2 : 3;
         end
      2: begin par_ok = (txd == parity_bit(acc, fmt.nbits, fmt.par)); dstate = 3; end
      3: begin
           if (!fmt.par_en) par_ok = 1;
           if (fmt.two_stop && txd) dstate = 4;
           else begin got.push_back('{acc, par_ok, txd}); dstate = 0; end
         end
      4: begin got.push_back('{acc, par_ok, txd}); dstate = 0; end
      default: dstate = 0;
    endcase
  end

  task automatic wait_idle();
    do @(negedge clk); while (active || !s_empty || !ns_empty);
    repeat (12) @(negedge clk);
  endtask

  task automatic expect_seq(input byte unsigned exp[$], input string what);
    check(got.size() == exp.size(), $sformatf("%s: %0d frames, expected %0d", what, got.size(), exp.size()));
    foreach (exp[i]) if (i < got.size())
      check(got[i].d == exp[i] && got[i].par_ok && got[i].stop_ok,
            $sformatf("%s frame %0d: %h exp %h par %0d stop %0d", what, i, got[i].d, exp[i], got[i].par_ok, got[i].stop_ok));
    got.delete();
  endtask

  initial begin
    fmt = '{nbits: 4'd8, par_en: 1'b0, par: PAR_EVEN, two_stop: 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // both worlds have data waiting: all secure first
    sq = '{8'hA1, 8'hA2, 8'h5A};
    nq = '{8'hB1, 8'hB2};
    en = 1;
    wait_idle();
    expect_seq('{8'hA1, 8'hA2, 8'h5A, 8'hB1, 8'hB2}, "8N1 priority");
    // back-to-back: idle bits only before the first frame
    idle_bits = 0;
    sq = '{8'h01, 8'h02, 8'h03};
    wait (active);
    idle_bits = 0;
    wait_idle();
    check(idle_bits <= 4, $sformatf("no idle time between frames (%0d idle bits incl. tail)", idle_bits));
    expect_seq('{8'h01, 8'h02, 8'h03}, "back-to-back");
    // secure byte arriving during a non-secure frame waits for its end
    nq = '{8'hC3, 8'hC4};
    wait (active && cur_ns);
    repeat (10) @(negedge clk);
    sq.push_back(8'hD5);
    wait_idle();
    expect_seq('{8'hC3, 8'hD5, 8'hC4}, "NS frame finished, then secure");
    // 7 data bits, odd parity, two stop bits
    fmt = '{nbits: 4'd7, par_en: 1'b1, par: PAR_ODD, two_stop: 1'b1};
    sq = '{8'h55, 8'h7F};
    nq = '{8'h00};
    wait_idle();
    expect_seq('{8'h55, 8'h7F, 8'h00}, "7O2");
    fmt = '{nbits: 4'd6, par_en: 1'b1, par: PAR_EVEN, two_stop: 1'b0};
    nq = '{8'h2A, 8'h15};
    wait_idle();
    expect_seq('{8'h2A, 8'h15}, "6E1");
    // hold stops new frames
    fmt = '{nbits: 4'd8, par_en: 1'b0, par: PAR_EVEN, two_stop: 1'b0};
    hold = 1;
    sq = '{8'h99};
    repeat (200) @(negedge clk);
    check(got.size() == 0 && !active, "hold keeps the line idle");
    hold = 0;
    wait_idle();
    expect_seq('{8'h99}, "after hold");
    // break
    brk = 1;
    repeat (80) @(negedge clk);
    check(txd == 0 && low_bits >= 15, "break holds line low");
    brk = 0;
    repeat (20) @(negedge clk);
    check(txd == 1, "line idle after break");
    got.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
