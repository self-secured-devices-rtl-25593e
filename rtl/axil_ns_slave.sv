// axil_ns_slave: AXI4-Lite slave front end with TrustZone tagging.
//
// Both self-secured devices have a single AXI4-Lite port whose address map
// holds a secure window and a non-secure window. This block terminates the
// AXI handshakes and turns every transaction into a one-cycle register
// access (reg_wr or reg_rd) carrying the address, data, byte strobes and the
// non-secure bit taken from AWPROT[1] / ARPROT[1]. The device answers in that
// same cycle with read data and reg_err; reg_err turns the response into
// SLVERR, which the processor reports as an external abort to the monitor.
//
// Timing: one transaction at a time. A write needs AW and W (either order);
// the access strobe fires the cycle after both are held, and BVALID follows
// one cycle later. A read fires its strobe the cycle after AR is accepted and
// RVALID follows one cycle later. If a write and a read are both pending, the
// write goes first. The NS-bit filtering follows the published design; the
// handshake details and SLVERR are this design's choices.
module axil_ns_slave
  import ss_pkg::*;
#(
  parameter int unsigned ADDR_W = AXI_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         axi_req,
  output axil_rsp_t         axi_rsp,
  output logic              reg_wr,
  output logic              reg_rd,
  output logic [ADDR_W-1:0] reg_addr,
  output logic [31:0]       reg_wdata,
  output logic [3:0]        reg_wstrb,
  output logic              reg_ns,
  input  logic [31:0]       reg_rdata,
  input  logic              reg_err
);

  typedef enum logic [2:0] {S_IDLE, S_WACC, S_BRESP, S_RACC, S_RRESP} state_t;
  state_t state;

  logic              aw_held, w_held;
  logic [ADDR_W-1:0] addr_q;
  logic [31:0]       wdata_q;
  logic [3:0]        wstrb_q;
  logic              ns_q;
  axi_resp_t         resp_q;
  logic [31:0]       rdata_q;

  // Ready signals: accept AW/W while idle and not yet held; AR only when no
  // write is in progress.
  assign axi_rsp.awready = (state == S_IDLE) && !aw_held;
  assign axi_rsp.wready  = (state == S_IDLE) && !w_held;
  assign axi_rsp.arready = (state == S_IDLE) && !aw_held && !w_held && !axi_req.awvalid && !axi_req.wvalid;
  assign axi_rsp.bvalid  = (state == S_BRESP);
  assign axi_rsp.bresp   = resp_q;
  assign axi_rsp.rvalid  = (state == S_RRESP);
  assign axi_rsp.rresp   = resp_q;
  assign axi_rsp.rdata   = rdata_q;

  assign reg_wr    = (state == S_WACC);
  assign reg_rd    = (state == S_RACC);
  assign reg_addr  = addr_q;
  assign reg_wdata = wdata_q;
  assign reg_wstrb = wstrb_q;
  assign reg_ns    = ns_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      aw_held <= 1'b0;
      w_held  <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
      wstrb_q <= '0;
      ns_q    <= 1'b0;
      resp_q  <= RESP_OKAY;
      rdata_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (axi_req.awvalid && axi_rsp.awready) begin
            aw_held <= 1'b1;
            addr_q  <= axi_req.awaddr[ADDR_W-1:0];
            ns_q    <= axi_req.awprot[1];
          end
          if (axi_req.wvalid && axi_rsp.wready) begin
            w_held  <= 1'b1;
            wdata_q <= axi_req.wdata;
            wstrb_q <= axi_req.wstrb;
          end
          if ((aw_held || (axi_req.awvalid && axi_rsp.awready)) &&
              (w_held  || (axi_req.wvalid  && axi_rsp.wready))) begin
            state <= S_WACC;
          end else if (axi_req.arvalid && axi_rsp.arready) begin
            addr_q <= axi_req.araddr[ADDR_W-1:0];
            ns_q   <= axi_req.arprot[1];
            state  <= S_RACC;
          end
        end
        S_WACC: begin
          aw_held <= 1'b0;
          w_held  <= 1'b0;
          resp_q  <= reg_err ? RESP_SLVERR : RESP_OKAY;
          state   <= S_BRESP;
        end
        S_BRESP: if (axi_req.bready) state <= S_IDLE;
        S_RACC: begin
          resp_q  <= reg_err ? RESP_SLVERR : RESP_OKAY;
          rdata_q <= reg_err ? 32'h0 : reg_rdata;
          state   <= S_RRESP;
        end
        S_RRESP: if (axi_req.rready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A response, once offered, stays until taken.
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
    axi_rsp.bvalid && !axi_req.bready |=> axi_rsp.bvalid && $stable(axi_rsp.bresp));
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    axi_rsp.rvalid && !axi_req.rready |=> axi_rsp.rvalid && $stable(axi_rsp.rdata));
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(reg_wr && reg_rd));

endmodule
