// tb_uart_mode_switch: exhaustive check of the four channel modes (normal,
// automatic echo, local loopback, remote loopback) for every combination of
// RxD pin and transmitter output.
module tb_uart_mode_switch;
  import ss_pkg::*;
  chmode_e chmode;
  logic rxd_pin, txd_pin, tx_int, rx_int;

  uart_mode_switch dut (.chmode, .rxd_pin, .txd_pin, .tx_int, .rx_int);

  int checks = 0, failures = 0;
  initial begin
    for (int m = 0; m < 4; m++)
      for (int v = 0; v < 4; v++) begin
        logic e_rx, e_tx;
        chmode = chmode_e'(m); rxd_pin = v[0]; tx_int = v[1];
        #1;
        case (m)
          0: begin e_rx = v[0]; e_tx = v[1]; end   // normal
          1: begin e_rx = v[0]; e_tx = v[0]; end   // echo
          2: begin e_rx = v[1]; e_tx = 1'b1; end   // local loopback
          default: begin e_rx = 1'b1; e_tx = v[0]; end // remote loopback
        endcase
        checks++;
        if (rx_int !== e_rx || txd_pin !== e_tx) begin
          failures++;
          $display("FAIL: mode %0d rxd %b tx %b -> rx %b txd %b", m, v[0], v[1], rx_int, txd_pin);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
