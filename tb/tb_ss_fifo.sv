// tb_ss_fifo: self-checking test of the 64-entry byte FIFO.
//
// Random pushes and pops, including pushes on full and pops on empty, are
// compared with a queue model: head data, level, empty and full after every
// cycle. Also checks clr and that 64 bytes fit and the 65th is refused.
module tb_ss_fifo;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clr = 0, push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic [6:0] level;
  logic empty, full;

  ss_fifo #(.DEPTH(DEPTH), .W(8)) dut (.*);

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

  byte unsigned q[$];
  always @(posedge clk) if (rst_n) begin
    if (clr) q.delete();
    else begin
      automatic bit can_push = (q.size() < DEPTH);  // a full FIFO refuses a push even when popped
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && can_push) q.push_back(din);
    end
  end
  always @(negedge clk) if (rst_n) begin
    check(int'(level) == q.size(), $sformatf("level %0d vs %0d", level, q.size()));
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == DEPTH), "full");
    if (q.size() > 0) check(dout == q[0], "head data");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill completely, one more is refused
    for (int i = 0; i < DEPTH + 1; i++) begin
      @(negedge clk); push = 1; din = 8'(i * 7 + 1);
    end
    @(negedge clk); push = 0;
    check(full && level == 7'(DEPTH), "64 bytes fit");
    // drain
    for (int i = 0; i < DEPTH; i++) begin
      check(dout == 8'(i * 7 + 1), "drain order");
      @(negedge clk); pop = 1;
      @(negedge clk); pop = 0;
    end
    check(empty, "empty after drain");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      push = ($urandom_range(0, 99) < 55);
      pop  = ($urandom_range(0, 99) < 45);
      din  = 8'($urandom);
      clr  = ($urandom_range(0, 999) == 0);
    end
    @(negedge clk); push = 0; pop = 0; clr = 1;
    @(negedge clk); clr = 0;
    @(negedge clk);
    check(empty && level == 0, "clr empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
