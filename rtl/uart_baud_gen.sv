// uart_baud_gen: baud rate generator of the UART.
//
// Two secure-only registers set the line speed: the Baud Rate Generator
// value CD divides the reference clock down to an oversampling strobe
// (sample_en, one clock in CD), and the Baud Rate Divider BDIV sets how many
// samples make one bit (BDIV+1). The result is
//     baud = f_clk / (CD * (BDIV + 1)).
// tx_bit_en pulses once per bit time for the transmitter; the receiver
// counts sample_en itself so it can align to a start bit. CD = 0 stops both
// strobes. BDIV below 3 is raised to 3 so the receiver can find mid-bit.
// The two registers are named in the published design; this divider
// arrangement is the usual one for such a register pair and is this
// design's choice.
module uart_baud_gen #(
  parameter int unsigned CD_W   = 16,
  parameter int unsigned BDIV_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [CD_W-1:0]   cd,
  input  logic [BDIV_W-1:0] bdiv,
  output logic              sample_en,
  output logic              tx_bit_en
);

  logic [CD_W-1:0]   cd_cnt;
  logic [BDIV_W-1:0] smp_cnt, bdiv_eff;

  assign bdiv_eff = (bdiv < BDIV_W'(3)) ? BDIV_W'(3) : bdiv;

  always_ff @(posedge clk) begin
    if (!rst_n || !en || cd == '0) begin
      cd_cnt    <= '0;
      smp_cnt   <= '0;
      sample_en <= 1'b0;
      tx_bit_en <= 1'b0;
    end else begin
      sample_en <= 1'b0;
      tx_bit_en <= 1'b0;
      if (cd_cnt >= cd - 1'b1) begin
        cd_cnt    <= '0;
        sample_en <= 1'b1;
        if (smp_cnt >= bdiv_eff) begin
          smp_cnt   <= '0;
          tx_bit_en <= 1'b1;
        end else begin
          smp_cnt <= smp_cnt + 1'b1;
        end
      end else begin
        cd_cnt <= cd_cnt + 1'b1;
      end
    end
  end

endmodule
