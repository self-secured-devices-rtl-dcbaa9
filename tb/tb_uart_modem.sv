// tb_uart_modem: checks the modem control block: manual DTR/RTS from the
// control register; automatic flow control driving both from the receive
// FIFO level against the flow delay and gating transmission on CTS; delta
// bits and the DMSI pulse on input changes (RI only on its trailing edge);
// write-1-to-clear of the delta bits; the flow control mode bit in MSR.
module tb_uart_modem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] mcr, fdel;
  logic [6:0] rx_level;
  logic [8:0] msr_clr, msr;
  logic cts, dsr, ri, dcd, rts, dtr, dmsi, cts_ok, fdel_hit;

  uart_modem dut (.clk, .rst_n, .mcr, .fdel, .rx_level, .msr_clr, .cts, .dsr, .ri, .dcd,
                  .rts, .dtr, .msr, .dmsi, .cts_ok, .fdel_hit);

  int checks = 0, failures = 0, n_dmsi = 0;
  always @(posedge clk) if (rst_n && dmsi) n_dmsi++;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    mcr = 0; fdel = 0; rx_level = 0; msr_clr = 0; {cts, dsr, ri, dcd} = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    chk(msr[3:0] == 0 && n_dmsi == 0, "no change after reset");
    // manual mode
    mcr = 6'b000001; #1; chk(dtr && !rts, "manual DTR");
    mcr = 6'b000010; #1; chk(!dtr && rts, "manual RTS");
    chk(cts_ok, "manual mode always may send");
    // inputs: CTS rises
    @(negedge clk); cts = 1; repeat (5) @(posedge clk);
    chk(msr[0] && msr[4] && n_dmsi == 1, "delta CTS and CTS level");
    @(negedge clk); msr_clr = 9'h001; @(negedge clk); msr_clr = 0;
    chk(!msr[0] && msr[4], "delta CTS cleared, level stays");
    // RI: rising edge must not set TERI, falling edge must
    @(negedge clk); ri = 1; repeat (5) @(posedge clk);
    chk(!msr[2] && msr[6], "no TERI on RI rising");
    @(negedge clk); ri = 0; repeat (5) @(posedge clk);
    chk(msr[2], "TERI on RI falling");
    @(negedge clk); dsr = 1; dcd = 1; repeat (5) @(posedge clk);
    chk(msr[1] && msr[3] && msr[5] && msr[7], "DDSR, DDCD and levels");
    @(negedge clk); msr_clr = 9'h1FF; @(negedge clk); msr_clr = 0;
    chk(msr[3:0] == 0, "all deltas cleared");
    // automatic flow control
    mcr = 6'b100000; fdel = 6'd10; rx_level = 5; #1;
    chk(rts && dtr && !fdel_hit && msr[8], "auto mode below flow delay");
    rx_level = 10; #1;
    chk(!rts && !dtr && fdel_hit, "auto mode at flow delay");
    chk(cts_ok, "CTS asserted: may send");
    @(negedge clk); cts = 0; repeat (5) @(posedge clk);
    chk(!cts_ok, "CTS deasserted: hold");
    chk(n_dmsi == 4, $sformatf("DMSI pulses %0d", n_dmsi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
