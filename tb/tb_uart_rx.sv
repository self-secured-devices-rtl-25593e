// tb_uart_rx: self-checking test of the two-line UART receiver.
//
// Serial frames are driven on the secure and non-secure Rx lines by
// testbench tasks with a bit time of 16 clocks (sample_en every 2 clocks,
// BDIV = 7). Checks: bytes and world tags for 8N1, 7O2 and 6E1; parity,
// framing and break detection; a secure start bit during a non-secure frame
// drops that frame (one dumped pulse) and the secure byte arrives intact; a
// non-secure frame that starts during a secure one is lost; the done pulse
// comes within one bit time after the middle of the stop bit.
module tb_uart_rx;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int BIT = 16;
  logic en = 0, sample_en = 0, rxd_s = 1, rxd_ns = 1;
  logic [7:0] bdiv = 8'd7;
  uart_fmt_t fmt;
  logic done, done_ns, par_err, frm_err, brk_det, dumped, active, cur_ns;
  logic [7:0] data;

  uart_rx dut (.*);

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

  int div = 0;
  always @(negedge clk) begin div = (div + 1) % 2; sample_en = (div == 0); end

  typedef struct { byte unsigned d; bit ns; bit pe; bit fe; bit bk; longint t; } rec_t;
  rec_t got[$];
  int n_dumped = 0;
  longint now = 0;
  always @(posedge clk) begin
    now++;
    if (rst_n && done) got.push_back('{data, done_ns, par_err, frm_err, brk_det, now});
    if (rst_n && dumped) n_dumped++;
  end

  // drive one frame; bad_par flips the parity bit, stop_val is the stop bit level
  task automatic send(input bit ns, input byte unsigned d, input bit bad_par = 0, input bit stop_val = 1);
    logic [11:0] bits;
    int n = 0;
    bits[n++] = 1'b0;
    for (int i = 0; i < int'(fmt.nbits); i++) bits[n++] = d[i];
    if (fmt.par_en) bits[n++] = parity_bit(d, fmt.nbits, fmt.par) ^ bad_par;
    bits[n++] = stop_val;
    if (fmt.two_stop) bits[n++] = 1'b1;
    for (int i = 0; i < n; i++) begin
      if (ns) rxd_ns = bits[i]; else rxd_s = bits[i];
      repeat (BIT) @(negedge clk);
    end
    if (ns) rxd_ns = 1'b1; else rxd_s = 1'b1;
    repeat (2 * BIT) @(negedge clk);
  endtask

  task automatic expect1(input byte unsigned d, input bit ns, input bit pe, input bit fe, input bit bk, input string what);
    check(got.size() == 1, $sformatf("%s: %0d bytes received", what, got.size()));
    if (got.size() >= 1)
      check(got[0].d == d && got[0].ns == ns && got[0].pe == pe && got[0].fe == fe && got[0].bk == bk,
            $sformatf("%s: got %h ns=%0d pe=%0d fe=%0d bk=%0d", what, got[0].d, got[0].ns, got[0].pe, got[0].fe, got[0].bk));
    got.delete();
  endtask

  initial begin
    longint t0;
    fmt = '{nbits: 4'd8, par_en: 1'b0, par: PAR_EVEN, two_stop: 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1; en = 1;
    repeat (10) @(negedge clk);

    t0 = now;
    send(0, 8'hA5);
    expect1(8'hA5, 0, 0, 0, 0, "secure 8N1");
    send(1, 8'h3C);
    expect1(8'h3C, 1, 0, 0, 0, "non-secure 8N1");

    // latency: done within the stop bit
    fork send(0, 8'h81); join_none
    t0 = now;
    wait (done);
    check(now - t0 >= 9 * BIT && now - t0 <= 10 * BIT + 8, $sformatf("done at %0d clocks after start", now - t0));
    repeat (3 * BIT) @(negedge clk);
    got.delete();

    // secure start bit preempts a non-secure frame
    fork
      send(1, 8'h11);
      begin repeat (3 * BIT) @(negedge clk); send(0, 8'h22); end
    join
    expect1(8'h22, 0, 0, 0, 0, "secure preempts non-secure");
    check(n_dumped == 1, $sformatf("one dumped non-secure frame, got %0d", n_dumped));

    // non-secure start during a secure frame is lost
    fork
      send(0, 8'h6B);
      begin repeat (2 * BIT) @(negedge clk); send(1, 8'hFF); end
    join
    expect1(8'h6B, 0, 0, 0, 0, "non-secure start ignored while secure busy");
    check(n_dumped == 1, "no dump when secure is busy");

    // errors
    fmt = '{nbits: 4'd8, par_en: 1'b1, par: PAR_EVEN, two_stop: 1'b0};
    send(1, 8'h37, 1'b1);
    expect1(8'h37, 1, 1, 0, 0, "parity error");
    send(0, 8'h37, 1'b0, 1'b0);
    expect1(8'h37, 0, 0, 1, 0, "framing error");
    send(0, 8'h00, 1'b0, 1'b0);   // even parity of 0 is 0: all bits zero
    expect1(8'h00, 0, 0, 1, 1, "break");

    // other formats
    fmt = '{nbits: 4'd7, par_en: 1'b1, par: PAR_ODD, two_stop: 1'b1};
    send(1, 8'h5D);
    expect1(8'h5D, 1, 0, 0, 0, "7O2");
    fmt = '{nbits: 4'd6, par_en: 1'b1, par: PAR_MARK, two_stop: 1'b0};
    send(0, 8'h2A);
    expect1(8'h2A, 0, 0, 0, 0, "6M1");

    // disabled receiver ignores the line
    en = 0;
    send(0, 8'h44);
    check(got.size() == 0, "disabled receiver");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
