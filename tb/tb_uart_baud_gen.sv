// tb_uart_baud_gen: checks the baud rate generator rates and the receiver
// resynchronisation. With clock select 0 the sample tick must come every
// cd cycles and the Tx/Rx bit ticks every cd*(bdiv+1) cycles; with clock
// select 1 (reference clock / 8) every 8*cd and 8*cd*(bdiv+1) cycles. After a
// resync on a sample the next Rx tick must follow (bdiv+1) samples later.
module tb_uart_baud_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clk_sel, rx_resync, baud_sample, baud_tx, baud_rx;
  logic [15:0] cd, bdiv;

  uart_baud_gen dut (.clk, .rst_n, .clk_sel, .cd, .bdiv, .rx_resync,
                     .baud_sample, .baud_tx, .baud_rx);

  int checks = 0, failures = 0;

  // spacing of the last two pulses of a signal
  int cyc = 0, ls = -1, ps = -1, lt = -1, pt = -1, lr = -1, pr = -1;
  always @(posedge clk) begin
    cyc++;
    if (baud_sample) begin ps = ls; ls = cyc; end
    if (baud_tx)     begin pt = lt; lt = cyc; end
    if (baud_rx)     begin pr = lr; lr = cyc; end
  end

  task automatic measure(input int sel, input int c, input int b);
    clk_sel = sel[0]; cd = 16'(c); bdiv = 16'(b);
    repeat (3 * 8 * c * (b + 1) + 10) @(posedge clk);
    checks += 3;
    if (ls - ps != (sel ? 8 : 1) * c) begin
      failures++; $display("FAIL: sample spacing %0d (sel %0d cd %0d)", ls - ps, sel, c);
    end
    if (lt - pt != (sel ? 8 : 1) * c * (b + 1)) begin
      failures++; $display("FAIL: tx spacing %0d (sel %0d cd %0d bdiv %0d)", lt - pt, sel, c, b);
    end
    if (lr - pr != (sel ? 8 : 1) * c * (b + 1)) begin
      failures++; $display("FAIL: rx spacing %0d", lr - pr);
    end
  endtask

  initial begin
    clk_sel = 0; cd = 4; bdiv = 4; rx_resync = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    measure(0, 3, 4);
    measure(0, 1, 15);
    measure(0, 7, 6);
    measure(1, 2, 4);
    // resync: pulse on a sample, then the Rx tick comes (bdiv+1) samples later
    clk_sel = 0; cd = 3; bdiv = 4;
    repeat (50) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      int t0;
      repeat (k + 2) @(posedge clk);
      @(negedge clk); while (!baud_sample) @(negedge clk);
      rx_resync = 1; t0 = cyc; @(negedge clk); rx_resync = 0;
      while (!baud_rx) @(negedge clk);
      checks++;
      if (cyc - t0 != 3 * 5 + 1) begin
        failures++; $display("FAIL: resync to Rx tick %0d cycles", cyc - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
