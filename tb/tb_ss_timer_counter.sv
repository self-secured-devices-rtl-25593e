// tb_ss_timer_counter: self-checking test of one timer counter bank.
//
// Drives tick every third clock and compares the counter, the load value and
// the zero event with a reference model kept in the testbench: decrement per
// tick while enabled, event on reaching zero, reload on the next tick in
// auto-reload mode, stop at zero in single-shot mode, Load write copies to
// Counter. Also checks the period of (Load+1) ticks.
module tb_ss_timer_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tick = 0, enable = 0, auto_reload = 0, load_wr = 0, cnt_wr = 0;
  logic [31:0] load_wdata = 0, cnt_wdata = 0, load_q, count_q;
  logic event_o;

  ss_timer_counter #(.W(32)) dut (.*);

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

  // reference model
  logic [31:0] m_load, m_cnt;
  logic        m_ev;
  int          ev_count, last_ev_tick, tick_no, period;
  always @(posedge clk) begin
    if (!rst_n) begin
      m_load = 0; m_cnt = 0; m_ev = 0;
    end else begin
      m_ev = 0;
      if (load_wr) begin m_load = load_wdata; m_cnt = load_wdata; end
      else if (cnt_wr) m_cnt = cnt_wdata;
      else if (tick && enable) begin
        if (m_cnt != 0) begin
          if (m_cnt == 1) m_ev = 1;
          m_cnt = m_cnt - 1;
        end else if (auto_reload) m_cnt = m_load;
      end
    end
  end

  // compare after each edge
  always @(negedge clk) if (rst_n) begin
    check(count_q == m_cnt, $sformatf("count %0d vs model %0d", count_q, m_cnt));
    check(load_q == m_load, "load");
    check(event_o == m_ev, "event");
    if (event_o) begin
      if (ev_count > 0) period = tick_no - last_ev_tick;
      last_ev_tick = tick_no;
      ev_count++;
    end
  end

  // tick generator: one in three clocks
  int div = 0;
  always @(negedge clk) begin
    div = (div + 1) % 3;
    tick = (div == 0);
    if (tick && enable) tick_no++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // auto-reload, Load = 5 -> period 6 ticks
    @(negedge clk); load_wr = 1; load_wdata = 5;
    @(negedge clk); load_wr = 0; enable = 1; auto_reload = 1;
    repeat (80) @(negedge clk);
    check(ev_count >= 3, "auto-reload events seen");
    check(period == 6, $sformatf("period (Load+1)=6 ticks, got %0d", period));
    // single shot: stops at zero, one event
    ev_count = 0;
    @(negedge clk); auto_reload = 0; cnt_wr = 1; cnt_wdata = 4;
    @(negedge clk); cnt_wr = 0;
    repeat (60) @(negedge clk);
    check(ev_count == 1, $sformatf("single shot one event, got %0d", ev_count));
    check(count_q == 0, "single shot stays at zero");
    // disabled: holds
    @(negedge clk); enable = 0; load_wr = 1; load_wdata = 32'h10;
    @(negedge clk); load_wr = 0;
    repeat (30) @(negedge clk);
    check(count_q == 32'h10, "disabled counter holds");
    // random writes while running
    enable = 1; auto_reload = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load_wr = ($urandom_range(0, 19) == 0);
      cnt_wr  = !load_wr && ($urandom_range(0, 19) == 0);
      load_wdata = $urandom_range(0, 7);
      cnt_wdata  = $urandom_range(0, 7);
      if ($urandom_range(0, 29) == 0) auto_reload = ~auto_reload;
    end
    @(negedge clk); load_wr = 0; cnt_wr = 0;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
