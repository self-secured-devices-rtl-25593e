// axil_master: AXI4-Lite master bus-functional model for the testbenches.
//
// Stands in for the TrustZone-enabled processor: every access carries the
// world it comes from in AxPROT[1] (1 = normal world). Signals change on the
// falling clock edge and handshakes are judged from the values held at that
// edge, so they complete on the following rising edge. The tasks return the
// response code and the number of clock cycles the transaction took.
module axil_master
  import ss_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [AXI_AW-1:0] a, input logic [31:0] d, input logic ns,
                       output axi_resp_t resp, output int cycles, input logic [3:0] strb = 4'hF);
    bit aw_fire = 0, w_fire = 0;
    cycles = 0;
    @(negedge clk);
    req.awaddr  = a;
    req.awprot  = {1'b0, ns, 1'b0};
    req.awvalid = 1'b1;
    req.wdata   = d;
    req.wstrb   = strb;
    req.wvalid  = 1'b1;
    req.bready  = 1'b1;
    while (!(aw_fire && w_fire)) begin
      if (req.awvalid && rsp.awready) aw_fire = 1;
      if (req.wvalid && rsp.wready)   w_fire  = 1;
      @(negedge clk);
      cycles++;
      if (aw_fire) req.awvalid = 1'b0;
      if (w_fire)  req.wvalid  = 1'b0;
    end
    while (!rsp.bvalid) begin
      @(negedge clk);
      cycles++;
    end
    resp = rsp.bresp;
    @(negedge clk);
    cycles++;
    req.bready = 1'b0;
  endtask

  task automatic read(input logic [AXI_AW-1:0] a, input logic ns,
                      output logic [31:0] d, output axi_resp_t resp, output int cycles);
    cycles = 0;
    @(negedge clk);
    req.araddr  = a;
    req.arprot  = {1'b0, ns, 1'b0};
    req.arvalid = 1'b1;
    req.rready  = 1'b1;
    while (!rsp.arready) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    cycles++;
    req.arvalid = 1'b0;
    while (!rsp.rvalid) begin
      @(negedge clk);
      cycles++;
    end
    d    = rsp.rdata;
    resp = rsp.rresp;
    @(negedge clk);
    cycles++;
    req.rready = 1'b0;
  endtask

endmodule
