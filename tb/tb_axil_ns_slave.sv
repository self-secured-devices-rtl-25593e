// tb_axil_ns_slave: self-checking test of the AXI4-Lite front end.
//
// A small register model behind the block has four 32-bit registers at
// 0x0..0xC; 0x0 and 0x4 are secure-only and anything at 0x10 and above is
// unmapped. The test writes and reads from both worlds, checks data, OKAY
// and SLVERR answers, that a denied write changes nothing, that the NS bit
// reaches the register side, that AW and W may arrive in either order, and
// the three-cycle write and read latency of the block.
module tb_axil_ns_slave;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic              reg_wr, reg_rd, reg_ns, reg_err;
  logic [AXI_AW-1:0] reg_addr;
  logic [31:0]       reg_wdata, reg_rdata;
  logic [3:0]        reg_wstrb;
  logic [31:0]       regs[4];
  logic              last_ns;

  axil_ns_slave dut (.clk, .rst_n, .axi_req(req), .axi_rsp(rsp),
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_wstrb, .reg_ns, .reg_rdata, .reg_err);

  axil_master u_m (.clk, .req, .rsp);

  // register model
  assign reg_err   = (reg_addr >= 12'h10) || (reg_ns && reg_addr < 12'h8);
  assign reg_rdata = regs[reg_addr[3:2]];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      regs <= '{default: '0};
      last_ns <= 1'b0;
    end else begin
      if (reg_wr || reg_rd) last_ns <= reg_ns;
      if (reg_wr && !reg_err)
        for (int b = 0; b < 4; b++) if (reg_wstrb[b]) regs[reg_addr[3:2]][8*b +: 8] <= reg_wdata[8*b +: 8];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    axi_resp_t r;
    logic [31:0] d;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // secure write + read back, latency
    u_m.write(12'h0, 32'hDEAD_BEEF, 1'b0, r, cyc);
    check(r == RESP_OKAY, "secure write OKAY");
    check(cyc == 3, $sformatf("write latency 3 cycles, got %0d", cyc));
    check(last_ns == 1'b0, "secure write tagged secure");
    u_m.read(12'h0, 1'b0, d, r, cyc);
    check(r == RESP_OKAY && d == 32'hDEAD_BEEF, "secure read back");
    check(cyc == 3, $sformatf("read latency 3 cycles, got %0d", cyc));

    // normal world into the secure register: SLVERR, no change, reads 0
    u_m.write(12'h0, 32'h1111_1111, 1'b1, r, cyc);
    check(r == RESP_SLVERR, "NS write to secure reg SLVERR");
    check(last_ns == 1'b1, "NS write tagged non-secure");
    u_m.read(12'h0, 1'b1, d, r, cyc);
    check(r == RESP_SLVERR && d == 0, "NS read of secure reg SLVERR, data 0");
    u_m.read(12'h0, 1'b0, d, r, cyc);
    check(d == 32'hDEAD_BEEF, "secure reg unchanged by denied write");

    // normal world into its own register
    u_m.write(12'h8, 32'h0000_00A5, 1'b1, r, cyc);
    check(r == RESP_OKAY, "NS write to NS reg OKAY");
    u_m.read(12'h8, 1'b1, d, r, cyc);
    check(r == RESP_OKAY && d == 32'hA5, "NS read back");
    // byte strobes
    u_m.write(12'h8, 32'h7700_0000, 1'b1, r, cyc, 4'b1000);
    u_m.read(12'h8, 1'b0, d, r, cyc);
    check(d == 32'h7700_00A5, "byte strobe merge");
    // unmapped
    u_m.read(12'h40, 1'b0, d, r, cyc);
    check(r == RESP_SLVERR, "unmapped SLVERR");

    // AW first, W three cycles later
    @(negedge clk);
    req.awaddr = 12'hC; req.awprot = 3'b000; req.awvalid = 1; req.bready = 1;
    @(negedge clk); req.awvalid = 0;
    repeat (3) @(negedge clk);
    check(!rsp.bvalid, "no response before W");
    req.wdata = 32'h1234_5678; req.wstrb = 4'hF; req.wvalid = 1;
    @(negedge clk); req.wvalid = 0;
    while (!rsp.bvalid) @(negedge clk);
    check(rsp.bresp == RESP_OKAY, "split AW/W write OKAY");
    @(negedge clk); req.bready = 0;
    // W first, AW later
    req.wdata = 32'h0BAD_F00D; req.wstrb = 4'hF; req.wvalid = 1;
    @(negedge clk); req.wvalid = 0;
    repeat (2) @(negedge clk);
    req.awaddr = 12'h4; req.awprot = 3'b000; req.awvalid = 1; req.bready = 1;
    @(negedge clk); req.awvalid = 0;
    while (!rsp.bvalid) @(negedge clk);
    @(negedge clk); req.bready = 0;
    u_m.read(12'hC, 1'b0, d, r, cyc);
    check(d == 32'h1234_5678, "AW-first write landed");
    u_m.read(12'h4, 1'b0, d, r, cyc);
    check(d == 32'h0BAD_F00D, "W-first write landed");

    // response held while master stalls
    @(negedge clk);
    req.araddr = 12'h8; req.arprot = 3'b010; req.arvalid = 1; req.rready = 0;
    @(negedge clk); req.arvalid = 0;
    repeat (4) @(negedge clk);
    check(rsp.rvalid && rsp.rdata == 32'h7700_00A5, "R held while rready low");
    req.rready = 1;
    @(negedge clk); req.rready = 0;
    check(!rsp.rvalid, "R dropped after handshake");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
