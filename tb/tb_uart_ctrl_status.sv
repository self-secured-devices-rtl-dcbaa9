// tb_uart_ctrl_status: checks the control and status unit of the
// self-secured UART on its register bus (no AXI, no serial engines).
//
// Checked: reset values; which offsets each world may write and read (every
// offset 0..92, both worlds); byte-wide writes; self-clearing reset and
// timeout-restart bits; enable/disable and break decoding; IER/IDR/IMR mask
// handling; interrupt status set on the rising edge of an enabled event and
// cleared by writing 1; secure events to FIQ and non-secure ones to IRQ;
// Tx FIFO pushes and Rx FIFO pops to the right bank.
module tb_uart_ctrl_status;
  import ss_pkg::*;
  localparam int AW = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, wr_ns = 0, rd_en = 0, rd_ns = 0, wr_err, rd_err;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [3:0] wr_strb = 4'hF;
  logic [9:0] mode; logic [15:0] cd, bdiv; logic [7:0] rto; logic [5:0] mcr, fdel;
  logic tx_en, rx_en, tx_rst, rx_rst, rsttout, brk;
  logic [5:0] rtrig_s, ttrig_s, rtrig_ns, ttrig_ns;
  logic txf_wr_s, txf_wr_ns, rxf_rd_s, rxf_rd_ns;
  logic [7:0] txf_din, rxf_dout_s = 8'h5A, rxf_dout_ns = 8'hC3;
  logic rxf_valid_s = 0, rxf_valid_ns = 0;
  bank_stat_t st_s = '0, st_ns = '0;
  rx_err_t err_s = '0, err_ns = '0;
  logic fdelt = 0, dmsi = 0, fiq, irq;
  logic [8:0] msr = 9'h0A5, msr_clr;

  uart_ctrl_status #(.ADDR_W(AW)) dut (.*);

  // Rx FIFO model: the pop returns valid data in the next cycle
  always @(posedge clk) begin
    rxf_valid_s  <= rxf_rd_s;
    rxf_valid_ns <= rxf_rd_ns;
  end
  int pushes_s = 0, pushes_ns = 0, pulses_rx = 0, pulses_tx = 0, pulses_to = 0;
  logic [7:0] last_push;
  always @(posedge clk) if (rst_n) begin
    if (txf_wr_s)  begin pushes_s++;  last_push = txf_din; end
    if (txf_wr_ns) begin pushes_ns++; last_push = txf_din; end
    pulses_rx += rx_rst; pulses_tx += tx_rst; pulses_to += rsttout;
  end

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic err_w, err_r; logic [31:0] val;
  task automatic wr(input int a, input logic [31:0] d, input logic ns);
    @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = d; wr_ns = ns;
    #1 err_w = wr_err;
    @(negedge clk); wr_en = 0;
  endtask
  task automatic rd(input int a, input logic ns);
    @(negedge clk); rd_en = 1; rd_addr = AW'(a); rd_ns = ns;
    @(negedge clk); rd_en = 0;
    val = rd_data; err_r = rd_err;     // sampled one cycle after the strobe
  endtask

  function automatic logic shared(input int a);
    return a == U_MSR || (a >= U_NS_RTRIG && a <= U_NS_SR);
  endfunction

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // reset values
    rd(U_CR, 0);      chk(val == 32'h128 && !err_r, "CR reset");
    rd(U_BAUDGEN, 0); chk(val == 651, "baud generator reset");
    rd(U_BDIV, 0);    chk(val == 15, "baud divider reset");
    rd(U_RTRIG, 0);   chk(val == 32, "Rx trigger reset");
    chk(!tx_en && !rx_en && !brk, "disabled after reset");
    // access map
    for (int a = 0; a <= 92; a += 4) begin
      rd(a, 1); chk(err_r == !shared(a), $sformatf("NS read %0d err=%b", a, err_r));
      rd(a, 0); chk(err_r == (a > U_NS_SR), $sformatf("S read %0d err=%b", a, err_r));
    end
    wr(U_MR, 32'h3FF, 1);    chk(err_w, "NS write to mode refused");
    rd(U_MR, 0);             chk(val == 0, "mode unchanged");
    wr(U_NS_RTRIG, 7, 1);    chk(!err_w, "NS write to NS trigger");
    chk(rtrig_ns == 7 && rtrig_s == 32, "NS trigger only");
    wr(U_BAUDGEN, 32'h1234, 0); chk(cd == 16'h1234, "baud generator write");
    wr_strb = 4'b0010; wr(U_BAUDGEN, 32'h0000_AB00, 0); wr_strb = 4'hF;
    chk(cd == 16'hAB34, "byte strobe write");
    // control: enables, resets, break
    wr(U_CR, 32'h0000_0057, 0);   // rx/tx reset, rx en, tx en, restart timeout
    @(negedge clk);                       // reset pulses are registered
    chk(tx_en && rx_en && pulses_rx == 1 && pulses_tx == 1 && pulses_to == 1, "control pulses and enables");
    rd(U_CR, 0); chk(val == 32'h14, "self-clearing bits read 0");
    wr(U_CR, 32'h0000_0094, 0); chk(brk, "start break");
    wr(U_CR, 32'h0000_0114, 0); chk(!brk, "stop break");
    wr(U_CR, 32'h0000_0028, 0); chk(!tx_en && !rx_en, "disable");
    // FIFO registers
    wr(U_TXFIFO, 32'h41, 0);    chk(pushes_s == 1 && last_push == 8'h41, "secure Tx push");
    wr(U_TXFIFO, 32'h42, 1);    chk(err_w && pushes_s == 1, "NS cannot push secure Tx FIFO");
    wr(U_NS_TXFIFO, 32'h43, 1); chk(pushes_ns == 1 && last_push == 8'h43, "NS Tx push from NS");
    wr(U_NS_TXFIFO, 32'h44, 0); chk(pushes_ns == 2, "NS Tx push from secure world");
    rd(U_RXFIFO, 0);    chk(val == 32'h5A, "secure Rx pop");
    rd(U_NS_RXFIFO, 1); chk(val == 32'hC3, "NS Rx pop");
    rd(U_RXFIFO, 1);    chk(err_r, "NS cannot pop secure Rx FIFO");
    // interrupts
    wr(U_IER, 32'h0000_01E1, 0);          // RTRIG, ROVR, FRAME, PARE, TIMEOUT
    wr(U_IDR, 32'h0000_0040, 0);          // not FRAME
    rd(U_IMR, 0); chk(val == 32'h1A1, "mask after enable/disable");
    @(negedge clk); err_s.par = 1; @(negedge clk); err_s.par = 0;
    @(negedge clk);
    chk(fiq && !irq, "secure parity error -> FIQ");
    @(negedge clk); err_ns.frame = 1; @(negedge clk); err_ns.frame = 0;
    @(negedge clk);
    chk(!irq, "masked framing error ignored");
    @(negedge clk); st_ns.rtrig = 1; @(negedge clk);
    @(negedge clk);
    chk(irq, "NS Rx trigger -> IRQ");
    rd(U_NS_ISR, 1); chk(val == 32'h1, "NS ISR contents");
    rd(U_ISR, 0);    chk(val == 32'h80, "secure ISR contents");
    wr(U_NS_ISR, 32'h1, 1); @(negedge clk);
    chk(!irq, "NS clears its ISR; level still high gives no new edge");
    wr(U_ISR, 32'hFFFF, 1); chk(err_w && fiq, "NS cannot clear the secure ISR");
    wr(U_ISR, 32'h80, 0); @(negedge clk); chk(!fiq, "secure clears its ISR");
    st_ns.rtrig = 0;
    // a non-secure event alone raises IRQ and leaves FIQ low
    @(negedge clk); err_ns.tout = 1; @(negedge clk); err_ns.tout = 0;
    @(negedge clk);
    chk(irq && !fiq, "NS timeout -> IRQ only");
    wr(U_NS_ISR, 32'h100, 0); @(negedge clk);
    chk(!irq, "secure world may clear the NS ISR");
    // modem status shared, write-1-to-clear forwarded
    rd(U_MSR, 1); chk(val == 32'h0A5, "NS reads modem status");
    @(negedge clk); wr_en = 1; wr_addr = AW'(U_MSR); wr_data = 32'h1; wr_ns = 1; #1;
    chk(msr_clr == 9'h1, "modem delta clear");
    @(negedge clk); wr_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
