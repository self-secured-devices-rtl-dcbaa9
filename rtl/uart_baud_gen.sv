// uart_baud_gen: baud rate generator of the self-secured UART.
//
// Three dividers in a chain, all producing one-cycle enable pulses rather
// than clocks (this design's choice, to stay in one clock domain):
//   1. clock select: every cycle (clk_sel=0) or every 8th cycle (clk_sel=1,
//      "ref clock / 8"), from mode register bit 0;
//   2. clock programmable divider: one `baud_sample` pulse every `cd`
//      selected-clock pulses (baud generator register); cd=0 stops it;
//   3. baud programmable divider: one bit tick every (bdiv+1) baud samples,
//      built twice so that the transmitter (`baud_tx`) and the receiver
//      (`baud_rx`) have independent ticks. `rx_resync` restarts the receiver
//      divider: the next `baud_rx` then comes (bdiv+1) samples later, which
//      the receiver uses to place its bit ticks in the middle of each bit.
// Resulting rates: baud_sample = f/(sel*cd), baud = f/(sel*cd*(bdiv+1)).
module uart_baud_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_sel,
  input  logic [15:0] cd,
  input  logic [15:0] bdiv,
  input  logic        rx_resync,
  output logic        baud_sample,
  output logic        baud_tx,
  output logic        baud_rx
);
  logic [2:0]  pre;
  logic        sel_en;
  logic [15:0] cd_cnt, tx_cnt, rx_cnt;

  assign sel_en = !clk_sel || (pre == 3'd7);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre         <= '0;
      cd_cnt      <= '0;
      tx_cnt      <= '0;
      rx_cnt      <= '0;
      baud_sample <= 1'b0;
      baud_tx     <= 1'b0;
      baud_rx     <= 1'b0;
    end else begin
      pre         <= pre + 1'b1;
      baud_sample <= 1'b0;
      baud_tx     <= 1'b0;
      baud_rx     <= 1'b0;
      if (sel_en && cd != '0) begin
        if (cd_cnt >= cd - 1'b1) begin
          cd_cnt      <= '0;
          baud_sample <= 1'b1;
        end else
          cd_cnt <= cd_cnt + 1'b1;
      end
      // bit dividers advance on the sample pulse
      if (baud_sample) begin
        if (tx_cnt >= bdiv) begin
          tx_cnt  <= '0;
          baud_tx <= 1'b1;
        end else
          tx_cnt <= tx_cnt + 1'b1;
        if (rx_cnt >= bdiv) begin
          rx_cnt  <= '0;
          baud_rx <= 1'b1;
        end else
          rx_cnt <= rx_cnt + 1'b1;
      end
      if (rx_resync) begin
        rx_cnt  <= '0;
        baud_rx <= 1'b0;
      end
    end
  end
endmodule
