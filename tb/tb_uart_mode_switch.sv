// tb_uart_mode_switch: exhaustive check of the channel-mode routing.
//
// All four modes against every combination of the three line inputs,
// compared with a table of the intended routing.
module tb_uart_mode_switch;
  import ss_pkg::*;
  chmode_t chmode;
  logic tx_core, rxd_s_pin, rxd_ns_pin, txd_pin, rx_s_core, rx_ns_core;

  uart_mode_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #10000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic et, es, ens;
    for (int m = 0; m < 4; m++) begin
      for (int v = 0; v < 8; v++) begin
        chmode = chmode_t'(m);
        {tx_core, rxd_s_pin, rxd_ns_pin} = 3'(v);
        #1;
        case (m)
          0: begin et = tx_core;   es = rxd_s_pin; ens = rxd_ns_pin; end
          1: begin et = rxd_s_pin; es = rxd_s_pin; ens = 1'b1; end
          2: begin et = 1'b1;      es = tx_core;   ens = 1'b1; end
          default: begin et = rxd_s_pin; es = 1'b1; ens = 1'b1; end
        endcase
        check(txd_pin == et && rx_s_core == es && rx_ns_core == ens,
              $sformatf("mode %0d inputs %b", m, v[2:0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
