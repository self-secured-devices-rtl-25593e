// tb_uart_baud_gen: self-checking test of the baud rate generator.
//
// Measures the spacing of sample_en and tx_bit_en strobes for several CD and
// BDIV settings against baud = f_clk / (CD*(BDIV+1)), including BDIV below 3
// (raised to 3), CD = 0 (stopped) and en low (stopped).
module tb_uart_baud_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0;
  logic [15:0] cd = 0;
  logic [7:0] bdiv = 0;
  logic sample_en, tx_bit_en;

  uart_baud_gen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint now = 0, last_s = -1, last_b = -1;
  int s_gap, b_gap, n_s, n_b;
  always @(posedge clk) begin
    now++;
    if (sample_en) begin if (last_s >= 0) s_gap = int'(now - last_s); last_s = now; n_s++; end
    if (tx_bit_en) begin if (last_b >= 0) b_gap = int'(now - last_b); last_b = now; n_b++; end
  end

  task automatic run(input int c, input int b, input int exp_s, input int exp_b);
    @(negedge clk); en = 0;
    @(negedge clk); cd = 16'(c); bdiv = 8'(b); en = 1; last_s = -1; last_b = -1; n_s = 0; n_b = 0;
    repeat (exp_b * 4 + 10) @(negedge clk);
    check(s_gap == exp_s, $sformatf("cd=%0d sample gap %0d exp %0d", c, s_gap, exp_s));
    check(b_gap == exp_b, $sformatf("cd=%0d bdiv=%0d bit gap %0d exp %0d", c, b, b_gap, exp_b));
    check(n_b >= 3, "bit strobes seen");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(5, 7, 5, 40);
    run(1, 15, 1, 16);
    run(28, 15, 28, 448);
    run(3, 1, 3, 12);     // BDIV 1 -> 3
    // stopped
    @(negedge clk); cd = 0; n_s = 0;
    repeat (50) @(negedge clk);
    check(n_s == 0, "cd=0 stops");
    @(negedge clk); cd = 4; en = 0; n_s = 0;
    repeat (50) @(negedge clk);
    check(n_s == 0, "en low stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
