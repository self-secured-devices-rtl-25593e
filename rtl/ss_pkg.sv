// ss_pkg: types and constants shared by the self-secured timer and UART.
//
// Both devices sit on an AXI4-Lite bus whose AWPROT[1]/ARPROT[1] carry the
// TrustZone non-secure bit of the master. The request and response channel
// bundles are packed structs so that a whole slave port is two signals.
// Register offsets are this design's choice (the register sets, their
// banking and the control-bit layout of the timer follow the published
// description; numeric offsets were never given there).
package ss_pkg;

  localparam int unsigned AXI_AW = 12;  // byte address bits seen by a device
  localparam int unsigned AXI_DW = 32;

  typedef logic [1:0] axi_resp_t;
  localparam axi_resp_t RESP_OKAY   = 2'b00;
  localparam axi_resp_t RESP_SLVERR = 2'b10;

  // Master -> slave half of AXI4-Lite.
  typedef struct packed {
    logic [AXI_AW-1:0] awaddr;
    logic [2:0]        awprot;   // [1] = non-secure
    logic              awvalid;
    logic [AXI_DW-1:0] wdata;
    logic [3:0]        wstrb;
    logic              wvalid;
    logic              bready;
    logic [AXI_AW-1:0] araddr;
    logic [2:0]        arprot;   // [1] = non-secure
    logic              arvalid;
    logic              rready;
  } axil_req_t;

  // Slave -> master half of AXI4-Lite.
  typedef struct packed {
    logic              awready;
    logic              wready;
    axi_resp_t         bresp;
    logic              bvalid;
    logic              arready;
    logic [AXI_DW-1:0] rdata;
    axi_resp_t         rresp;
    logic              rvalid;
  } axil_rsp_t;

  // ---------------- Timer ----------------
  // Secure window (secure masters only)
  localparam logic [AXI_AW-1:0] TMR_S_LOAD   = 12'h000;
  localparam logic [AXI_AW-1:0] TMR_S_COUNT  = 12'h004;
  localparam logic [AXI_AW-1:0] TMR_CTRL     = 12'h008;
  localparam logic [AXI_AW-1:0] TMR_ISR      = 12'h00C;
  // Non-secure window (both worlds)
  localparam logic [AXI_AW-1:0] TMR_NS_LOAD  = 12'h020;
  localparam logic [AXI_AW-1:0] TMR_NS_COUNT = 12'h024;
  localparam logic [AXI_AW-1:0] TMR_NS_CTRL  = 12'h028;
  localparam logic [AXI_AW-1:0] TMR_NS_ISR   = 12'h02C;

  // Control register bit positions (secure owner in brackets)
  localparam int unsigned TC_EN_S    = 0;  // Enable (S)
  localparam int unsigned TC_AR_S    = 1;  // Auto Reload (S)
  localparam int unsigned TC_FIQEN   = 2;  // FIQ Enable (S)
  localparam int unsigned TC_EN_NS   = 3;  // Enable (NS)
  localparam int unsigned TC_AR_NS   = 4;  // Auto Reload (NS)
  localparam int unsigned TC_IRQEN   = 5;  // IRQ Enable (S)
  localparam int unsigned TC_PRE_LSB = 8;  // Prescaler (S) [15:8]
  localparam logic [31:0] TC_NS_MASK = 32'h0000_0018;  // bits the normal world owns
  localparam logic [31:0] TC_MASK    = 32'h0000_FF3F;  // implemented bits
  // Interrupt status bits
  localparam int unsigned TI_FIQ = 0;  // FIQ flag (S)
  localparam int unsigned TI_IRQ = 1;  // IRQ flag (NS)

  // ---------------- UART ----------------
  localparam logic [AXI_AW-1:0] UART_NS_BASE = 12'h100;  // non-secure bank window
  // secure-only registers
  localparam logic [7:0] U_CR      = 8'h00;
  localparam logic [7:0] U_MR      = 8'h04;
  localparam logic [7:0] U_IER     = 8'h08;
  localparam logic [7:0] U_IDR     = 8'h0C;
  localparam logic [7:0] U_IMR     = 8'h10;
  localparam logic [7:0] U_BAUDGEN = 8'h18;
  localparam logic [7:0] U_RXTOUT  = 8'h1C;
  localparam logic [7:0] U_MODEMCR = 8'h24;
  localparam logic [7:0] U_BAUDDIV = 8'h34;
  localparam logic [7:0] U_FLOWDEL = 8'h38;
  // banked registers (one copy per world)
  localparam logic [7:0] U_ISR     = 8'h14;
  localparam logic [7:0] U_RXWM    = 8'h20;
  localparam logic [7:0] U_MODEMSR = 8'h28;
  localparam logic [7:0] U_SR      = 8'h2C;
  localparam logic [7:0] U_FIFO    = 8'h30;
  localparam logic [7:0] U_TXWM    = 8'h44;

  // Control register bits
  localparam int unsigned CR_RXRST  = 0;
  localparam int unsigned CR_TXRST  = 1;
  localparam int unsigned CR_RXEN   = 2;
  localparam int unsigned CR_RXDIS  = 3;
  localparam int unsigned CR_TXEN   = 4;
  localparam int unsigned CR_TXDIS  = 5;
  localparam int unsigned CR_RSTTO  = 6;
  localparam int unsigned CR_STTBRK = 7;
  localparam int unsigned CR_STPBRK = 8;

  // Interrupt (ISR/IMR) bits
  localparam int unsigned IX_RTRIG   = 0;
  localparam int unsigned IX_REMPTY  = 1;
  localparam int unsigned IX_RFUL    = 2;
  localparam int unsigned IX_TEMPTY  = 3;
  localparam int unsigned IX_TFUL    = 4;
  localparam int unsigned IX_ROVR    = 5;
  localparam int unsigned IX_FRAME   = 6;
  localparam int unsigned IX_PARE    = 7;
  localparam int unsigned IX_TIMEOUT = 8;
  localparam int unsigned IX_DMSI    = 9;
  localparam int unsigned IX_TTRIG   = 10;
  localparam int unsigned IX_TNFUL   = 11;
  localparam int unsigned IX_TOVR    = 12;
  localparam int unsigned IX_BREAK   = 13;
  localparam int unsigned IX_N       = 14;

  // Channel status (SR) bits
  localparam int unsigned SR_RTRIG   = 0;
  localparam int unsigned SR_REMPTY  = 1;
  localparam int unsigned SR_RFUL    = 2;
  localparam int unsigned SR_TEMPTY  = 3;
  localparam int unsigned SR_TFUL    = 4;
  localparam int unsigned SR_TACTIVE = 11;
  localparam int unsigned SR_RACTIVE = 10;
  localparam int unsigned SR_TTRIG   = 13;
  localparam int unsigned SR_TNFUL   = 14;

  // Frame format, decoded from the Mode register
  typedef enum logic [1:0] {PAR_EVEN, PAR_ODD, PAR_SPACE, PAR_MARK} par_kind_t;
  typedef struct packed {
    logic [3:0] nbits;     // 6, 7 or 8 data bits
    logic       par_en;
    par_kind_t  par;
    logic       two_stop;
  } uart_fmt_t;

  typedef enum logic [1:0] {
    CH_NORMAL = 2'b00, CH_ECHO = 2'b01, CH_LLOOP = 2'b10, CH_RLOOP = 2'b11
  } chmode_t;

  // Mode register: [2:1] data length (11:6, 10:7, 0x:8), [5:3] parity
  // (000 even, 001 odd, 010 space, 011 mark, 1xx none), [7:6] stop bits
  // (00: 1, otherwise 2), [9:8] channel mode.
  function automatic uart_fmt_t decode_mode(input logic [9:0] mr);
    uart_fmt_t f;
    f.nbits    = (mr[2:1] == 2'b11) ? 4'd6 : (mr[2:1] == 2'b10) ? 4'd7 : 4'd8;
    f.par_en   = ~mr[5];
    f.par      = par_kind_t'(mr[4:3]);
    f.two_stop = (mr[7:6] != 2'b00);
    return f;
  endfunction

  // Parity bit to send / expect for data d with n bits.
  function automatic logic parity_bit(input logic [7:0] d, input logic [3:0] n, input par_kind_t p);
    logic x;
    x = ^(d & ((8'd1 << n) - 8'd1));
    unique case (p)
      PAR_EVEN:  return x;
      PAR_ODD:   return ~x;
      PAR_SPACE: return 1'b0;
      default:   return 1'b1;
    endcase
  endfunction

endpackage
