// uart_modem: modem control of the self-secured UART.
//
// Inputs CTS, DSR, RI and DCD are brought into the clock domain by two
// flip-flops each. The modem status register (MSR) holds their current levels
// and four sticky change bits, set when a line changes and cleared by writing
// 1: bit 0 delta CTS, bit 1 delta DSR, bit 2 trailing edge of RI (RI going
// from asserted to deasserted), bit 3 delta DCD; bits 4..7 are CTS, DSR, RI,
// DCD and bit 8 mirrors the flow control mode. `dmsi` pulses for one cycle
// whenever a change bit is set.
//
// Modem control register (MCR): bit 0 DTR, bit 1 RTS, bit 5 automatic flow
// control. In manual mode DTR and RTS follow the register. In automatic mode
// both are asserted while the receive FIFO level is below the flow delay
// value `fdel` (a value of 0 keeps them asserted), and the transmitter may
// only start a character while CTS is asserted (`cts_ok`). `fdel_hit` is the
// flow-delay trigger status. All modem lines are active high here; the pin
// polarity is left to the pad ring (this design's choice).
module uart_modem (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] mcr,
  input  logic [5:0] fdel,
  input  logic [6:0] rx_level,
  input  logic [8:0] msr_clr,
  input  logic       cts,
  input  logic       dsr,
  input  logic       ri,
  input  logic       dcd,
  output logic       rts,
  output logic       dtr,
  output logic [8:0] msr,
  output logic       dmsi,
  output logic       cts_ok,
  output logic       fdel_hit
);
  logic [3:0] s1, s2, prev;   // {dcd, ri, dsr, cts}
  logic [3:0] delta, chg;
  logic       afc;

  assign afc      = mcr[5];
  assign fdel_hit = (fdel != '0) && (rx_level >= 7'(fdel));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1    <= '0;
      s2    <= '0;
      prev  <= '0;
      delta <= '0;
      dmsi  <= 1'b0;
    end else begin
      s1   <= {dcd, ri, dsr, cts};
      s2   <= s1;
      prev <= s2;
      dmsi <= |chg;
      delta <= (delta & ~msr_clr[3:0]) | chg;
    end
  end

  // change events: CTS, DSR, DCD on any edge; RI on its trailing edge
  assign chg = {s2[3] ^ prev[3], prev[2] & ~s2[2], s2[1] ^ prev[1], s2[0] ^ prev[0]};

  assign msr    = {afc, s2[3], s2[2], s2[1], s2[0], delta[3], delta[2], delta[1], delta[0]};
  assign dtr    = afc ? !fdel_hit : mcr[0];
  assign rts    = afc ? !fdel_hit : mcr[1];
  assign cts_ok = !afc || s2[0];
endmodule
