// uart_mode_switch: channel-mode routing of one UART terminal.
//
// Purely combinational. For the mode in mode register bits 9..8 it connects
// the receiver input and the TxD pin:
//   00 normal          receiver <- RxD pin,   TxD pin <- transmitter
//   01 automatic echo  receiver <- RxD pin,   TxD pin <- RxD pin
//   10 local loopback  receiver <- transmitter, TxD pin idle (1)
//   11 remote loopback receiver idle (1),     TxD pin <- RxD pin
// The four modes follow the original UART; the 2-bit encoding and holding an
// unconnected line at the idle level 1 are this design's choices. The
// self-secured UART has one instance for the secure and one for the
// non-secure terminal, both driven by the same (secure) mode register.
module uart_mode_switch (
  input  ss_pkg::chmode_e chmode,
  input  logic            rxd_pin,
  output logic            txd_pin,
  input  logic            tx_int,
  output logic            rx_int
);
  import ss_pkg::*;

  always_comb begin
    unique case (chmode)
      CH_NORMAL:    begin rx_int = rxd_pin; txd_pin = tx_int;  end
      CH_ECHO:      begin rx_int = rxd_pin; txd_pin = rxd_pin; end
      CH_LOCAL_LB:  begin rx_int = tx_int;  txd_pin = 1'b1;    end
      CH_REMOTE_LB: begin rx_int = 1'b1;    txd_pin = rxd_pin; end
      default:      begin rx_int = rxd_pin; txd_pin = tx_int;  end
    endcase
  end
endmodule
