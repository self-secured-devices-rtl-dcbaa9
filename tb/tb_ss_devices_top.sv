// tb_ss_devices_top: end-to-end test of the self-secured private timer and
// the self-secured UART, with every parameter of the top at its default.
//
// Two AXI4-lite masters play the secure and the non-secure software (the
// AxPROT[1] bit of each access says which world issues it) and two serial
// terminals sit on the UART lines. The test walks through the scenarios the
// devices are built for and counts how often each security or device
// mechanism was seen; a mechanism never seen is a failure:
//   ns_denied        a non-secure access to a secure register answered SLVERR
//   tmr_fiq/tmr_irq  secure timer expiry on FIQ, non-secure expiry on IRQ
//   tmr_period       auto-reload period of (load+1)*(prescaler+1) cycles
//   both_banks_secure the secure world runs both timer banks; the lower
//                    non-secure count raises IRQ before the secure FIQ
//   tx_split         each world's string on its own terminal only
//   secure_to_ns_term the secure world writes to the non-secure terminal
//   tx_priority      queued secure characters sent before queued non-secure ones
//   rx_split         received bytes in the receive FIFO of their line
//   rx_preempt       a secure start bit takes the receiver from a non-secure character
//   uart_fiq/irq     receiver errors routed by the security of the line
//   rx_overflow      byte dropped when the receive FIFO stays full
//   tx_overflow      write into a full transmit FIFO flagged
//   rx_timeout       receiver timeout after the programmed idle time
//   loopback         local loopback channel mode
//   modem_delta      modem status change interrupt (secure side)
//   reset_baud       one character at the reset baud settings (16 x 651 cycles per bit)
module tb_ss_devices_top;
  import ss_pkg::*;
  localparam int BIT = 16;       // cycles per bit with cd=2, bdiv=7
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // timer bus
  logic [4:0] t_awaddr, t_araddr; logic [2:0] t_awprot, t_arprot;
  logic t_awvalid, t_awready, t_wvalid, t_wready, t_bvalid, t_bready, t_arvalid, t_arready, t_rvalid, t_rready;
  logic [31:0] t_wdata, t_rdata; logic [3:0] t_wstrb; logic [1:0] t_bresp, t_rresp;
  // UART bus
  logic [6:0] u_awaddr, u_araddr; logic [2:0] u_awprot, u_arprot;
  logic u_awvalid, u_awready, u_wvalid, u_wready, u_bvalid, u_bready, u_arvalid, u_arready, u_rvalid, u_rready;
  logic [31:0] u_wdata, u_rdata; logic [3:0] u_wstrb; logic [1:0] u_bresp, u_rresp;
  logic tmr_fiq, tmr_irq, uart_fiq, uart_irq;
  logic rxd_s, txd_s, rxd_ns, txd_ns, rts, dtr;
  logic cts = 0, dsr = 0, ri = 0, dcd = 0;

  axil_bfm #(.ADDR_W(5)) tbus (.clk, .awaddr(t_awaddr), .awprot(t_awprot), .awvalid(t_awvalid),
    .awready(t_awready), .wdata(t_wdata), .wstrb(t_wstrb), .wvalid(t_wvalid), .wready(t_wready),
    .bresp(t_bresp), .bvalid(t_bvalid), .bready(t_bready), .araddr(t_araddr), .arprot(t_arprot),
    .arvalid(t_arvalid), .arready(t_arready), .rdata(t_rdata), .rresp(t_rresp), .rvalid(t_rvalid),
    .rready(t_rready));
  axil_bfm #(.ADDR_W(7)) ubus (.clk, .awaddr(u_awaddr), .awprot(u_awprot), .awvalid(u_awvalid),
    .awready(u_awready), .wdata(u_wdata), .wstrb(u_wstrb), .wvalid(u_wvalid), .wready(u_wready),
    .bresp(u_bresp), .bvalid(u_bvalid), .bready(u_bready), .araddr(u_araddr), .arprot(u_arprot),
    .arvalid(u_arvalid), .arready(u_arready), .rdata(u_rdata), .rresp(u_rresp), .rvalid(u_rvalid),
    .rready(u_rready));

  ss_devices_top dut (
    .clk, .rst_n,
    .tmr_awaddr(t_awaddr), .tmr_awprot(t_awprot), .tmr_awvalid(t_awvalid), .tmr_awready(t_awready),
    .tmr_wdata(t_wdata), .tmr_wstrb(t_wstrb), .tmr_wvalid(t_wvalid), .tmr_wready(t_wready),
    .tmr_bresp(t_bresp), .tmr_bvalid(t_bvalid), .tmr_bready(t_bready),
    .tmr_araddr(t_araddr), .tmr_arprot(t_arprot), .tmr_arvalid(t_arvalid), .tmr_arready(t_arready),
    .tmr_rdata(t_rdata), .tmr_rresp(t_rresp), .tmr_rvalid(t_rvalid), .tmr_rready(t_rready),
    .uart_awaddr(u_awaddr), .uart_awprot(u_awprot), .uart_awvalid(u_awvalid), .uart_awready(u_awready),
    .uart_wdata(u_wdata), .uart_wstrb(u_wstrb), .uart_wvalid(u_wvalid), .uart_wready(u_wready),
    .uart_bresp(u_bresp), .uart_bvalid(u_bvalid), .uart_bready(u_bready),
    .uart_araddr(u_araddr), .uart_arprot(u_arprot), .uart_arvalid(u_arvalid), .uart_arready(u_arready),
    .uart_rdata(u_rdata), .uart_rresp(u_rresp), .uart_rvalid(u_rvalid), .uart_rready(u_rready),
    .tmr_fiq, .tmr_irq, .uart_fiq, .uart_irq,
    .rxd_s, .txd_s, .rxd_ns, .txd_ns, .cts, .dsr, .ri, .dcd, .rts, .dtr);

  uart_term #(.BIT(BIT)) term_s  (.clk, .txd(txd_s),  .rxd(rxd_s));
  uart_term #(.BIT(BIT)) term_ns (.clk, .txd(txd_ns), .rxd(rxd_ns));

  int checks = 0, failures = 0;
  int seen[string];
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic saw(input logic ok, input string mech);
    if (ok) seen[mech] = seen.exists(mech) ? seen[mech] + 1 : 1;
  endtask

  logic [1:0] resp; logic [31:0] val; int cyc;
  task automatic twr(input int a, input logic [31:0] d, input logic ns); tbus.write(a, d, ns, resp, cyc); endtask
  task automatic trd(input int a, input logic ns); tbus.read(a, ns, val, resp, cyc); endtask
  task automatic uwr(input int a, input logic [31:0] d, input logic ns); ubus.write(a, d, ns, resp, cyc); endtask
  task automatic urd(input int a, input logic ns); ubus.read(a, ns, val, resp, cyc); endtask
  // a non-secure access that must be refused
  task automatic denied_wr(input logic uart, input int a, input logic [31:0] d);
    if (uart) uwr(a, d, 1); else twr(a, d, 1);
    chk(resp == RESP_SLVERR, $sformatf("NS write to %s offset %0d refused", uart ? "UART" : "timer", a));
    saw(resp == RESP_SLVERR, "ns_denied");
  endtask
  task automatic denied_rd(input logic uart, input int a);
    if (uart) urd(a, 1); else trd(a, 1);
    chk(resp == RESP_SLVERR && val == 0, $sformatf("NS read of %s offset %0d refused", uart ? "UART" : "timer", a));
    saw(resp == RESP_SLVERR && val == 0, "ns_denied");
  endtask
  task automatic wait_bits(input int n); repeat (n * BIT) @(negedge clk); endtask

  // interrupt edge times
  longint tf_t[$], ti_t[$];
  logic tf_q = 0, ti_q = 0;
  always @(posedge clk) begin
    tf_q <= tmr_fiq; ti_q <= tmr_irq;
    if (rst_n && tmr_fiq && !tf_q) tf_t.push_back($time / 10);
    if (rst_n && tmr_irq && !ti_q) ti_t.push_back($time / 10);
  end

  localparam int PRESC = 1, LOAD_S = 20, LOAD_NS = 10;
  string s_str = "FIQ-side", ns_str = "irq-side";

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;

    // ---------------- private timer ----------------
    twr(TMR_LOAD_S, LOAD_S, 0);
    denied_wr(0, TMR_LOAD_S, 5);
    denied_rd(0, TMR_CNT_S);
    trd(TMR_LOAD_S, 0); chk(val == LOAD_S, "secure load kept");
    twr(TMR_CTRL, (PRESC << TC_PRESC_LO) | (1 << TC_EN) | (1 << TC_AR) | (1 << TC_IRQEN) | (1 << TC_IRQEN_NS), 0);
    // three secure expiries, each cleared by the secure world
    for (int i = 0; i < 3; i++) begin
      @(posedge tmr_fiq);
      saw(!tmr_irq, "tmr_fiq");
      chk(!tmr_irq, "secure expiry on FIQ only");
      twr(TMR_ISR, 1 << TI_S, 1);  chk(tmr_fiq, "NS cannot clear the secure flag");
      twr(TMR_ISR, 1 << TI_S, 0);  chk(!tmr_fiq, "secure world clears FIQ");
    end
    chk(tf_t.size() == 3 && tf_t[2] - tf_t[1] == (LOAD_S + 1) * (PRESC + 1),
        $sformatf("secure period %0d", tf_t[2] - tf_t[1]));
    saw(tf_t[2] - tf_t[1] == (LOAD_S + 1) * (PRESC + 1), "tmr_period");
    twr(TMR_CTRL, PRESC << TC_PRESC_LO | (1 << TC_IRQEN_NS), 0);   // stop the secure timer
    // non-secure timer, run by the non-secure world
    twr(TMR_LOAD_NS, LOAD_NS, 1); chk(resp == RESP_OKAY, "NS load write");
    twr(TMR_CTRL, 32'hFFFF_FFFF & ~(1 << TC_EN_NS | 1 << TC_AR_NS) | (1 << TC_EN_NS) | (1 << TC_AR_NS), 1);
    trd(TMR_CTRL, 0);
    chk(!val[TC_EN] && val[TC_EN_NS] && val[TC_IRQEN_NS] && val[15:8] == PRESC,
        "NS control write reaches only the NS bits");
    for (int i = 0; i < 3; i++) begin
      @(posedge tmr_irq);
      saw(!tmr_fiq, "tmr_irq");
      chk(!tmr_fiq, "NS expiry on IRQ only");
      twr(TMR_ISR, 1 << TI_NS, 1); chk(!tmr_irq, "NS world clears IRQ");
    end
    chk(ti_t.size() == 3 && ti_t[2] - ti_t[1] == (LOAD_NS + 1) * (PRESC + 1),
        $sformatf("NS period %0d", ti_t[2] - ti_t[1]));
    saw(ti_t[2] - ti_t[1] == (LOAD_NS + 1) * (PRESC + 1), "tmr_period");
    twr(TMR_CTRL, 0, 0);
    twr(TMR_ISR, 3, 0);
    // the secure world sets up both banks, the non-secure one with the lower
    // count: its IRQ comes first, then the secure FIQ
    twr(TMR_LOAD_S, 40, 0); twr(TMR_LOAD_NS, 12, 0);
    twr(TMR_CTRL, (1 << TC_EN) | (1 << TC_IRQEN) | (1 << TC_EN_NS) | (1 << TC_IRQEN_NS), 0);
    wait (tmr_irq);
    chk(!tmr_fiq, "non-secure expiry first");
    wait (tmr_fiq);
    trd(TMR_ISR, 0); chk(val[1:0] == 2'b11, "both flags set");
    saw(val[1:0] == 2'b11 && ti_t[$] < tf_t[$], "both_banks_secure");
    trd(TMR_CNT_S, 0); chk(val == 0, "secure counter stopped at zero without auto-reload");
    twr(TMR_CTRL, 0, 0); twr(TMR_ISR, 3, 0);
    chk(!tmr_fiq && !tmr_irq, "flags cleared");

    // ---------------- UART at the reset baud settings ----------------
    urd(U_BAUDGEN, 0); chk(val == 651, "reset baud generator");
    term_s.bit_len = 651 * 16;
    uwr(U_MR, 32'h20, 0);                // 8 data bits, no parity, 1 stop bit
    uwr(U_CR, 32'h14, 0);                // enable Rx and Tx
    uwr(U_TXFIFO, "K", 0);
    repeat (12 * 651 * 16) @(negedge clk);
    chk(term_s.got.size() == 1 && term_s.got[0] == "K", "character at the reset baud rate");
    saw(term_s.got.size() == 1 && term_s.got[0] == "K", "reset_baud");
    term_s.got.delete(); term_s.got_t.delete(); term_s.bit_len = BIT;

    // ---------------- UART configuration ----------------
    uwr(U_BAUDGEN, 2, 0); uwr(U_BDIV, 7, 0);
    denied_wr(1, U_BAUDGEN, 1);
    denied_wr(1, U_MR, 32'h200);
    denied_wr(1, U_IER, 32'h1FFF);
    uwr(U_CR, 32'h17, 0);

    // transmit: the NS string is queued first, then the secure one
    foreach (ns_str[i]) uwr(U_NS_TXFIFO, ns_str[i], 1);
    foreach (s_str[i])  uwr(U_TXFIFO, s_str[i], 0);
    denied_wr(1, U_TXFIFO, "!");
    wait_bits(11 * (s_str.len() + ns_str.len() + 1));
    // the secure world may also write to the non-secure terminal
    uwr(U_NS_TXFIFO, "$", 0); chk(resp == RESP_OKAY, "secure write to NS Tx FIFO");
    wait_bits(12);
    chk(term_ns.got.size() == ns_str.len() + 1 && term_ns.got[$] == "$", "secure char on the NS terminal");
    saw(term_ns.got.size() == ns_str.len() + 1 && term_ns.got[$] == "$", "secure_to_ns_term");
    void'(term_ns.got.pop_back());
    begin
      logic ok_s, ok_ns;
      ok_s = term_s.got.size() == s_str.len(); ok_ns = term_ns.got.size() == ns_str.len();
      foreach (term_s.got[i])  ok_s &= term_s.got[i] == s_str[i];
      foreach (term_ns.got[i]) ok_ns &= term_ns.got[i] == ns_str[i];
      chk(ok_s && ok_ns, "strings on their own terminals");
      saw(ok_s && ok_ns, "tx_split");
      if (ok_s && ok_ns) begin
        chk(term_ns.got_t[1] > term_s.got_t[s_str.len()-1], "secure string first");
        saw(term_ns.got_t[1] > term_s.got_t[s_str.len()-1], "tx_priority");
      end
    end

    // receive
    term_s.send(8'h5E); term_ns.send(8'h4E);
    wait_bits(1);
    denied_rd(1, U_RXFIFO);
    urd(U_RXFIFO, 0);    chk(val == 32'h5E, "secure byte");
    urd(U_NS_RXFIFO, 1); chk(val == 32'h4E, "NS byte");
    saw(val == 32'h4E, "rx_split");
    fork
      term_ns.send(8'h99);
      begin wait_bits(4); term_s.send(8'h66); end
    join
    wait_bits(1);
    urd(U_RXFIFO, 0);    chk(val == 32'h66, "pre-empting secure byte");
    urd(U_NS_SR, 1);     chk(val[SR_REMPTY], "pre-empted NS byte dropped");
    saw(val[SR_REMPTY], "rx_preempt");

    // receiver errors by line. Parity type 000: the parity bit is 1 when the
    // data holds an even number of ones; the terminals send it inverted.
    uwr(U_MR, 32'h00, 0);
    term_s.par_en = 1; term_ns.par_en = 1; term_s.par_odd = 1; term_ns.par_odd = 1;
    uwr(U_IER, (1 << IX_PARE) | (1 << IX_FRAME), 0);
    term_s.send(8'h00, 1);
    wait_bits(1);
    chk(uart_fiq && !uart_irq, "secure parity error -> FIQ");
    saw(uart_fiq && !uart_irq, "uart_fiq");
    urd(U_ISR, 0); chk(val[IX_PARE], "secure ISR parity bit");
    uwr(U_ISR, val, 0);
    term_ns.send(8'h00, 1);
    wait_bits(1);
    chk(uart_irq && !uart_fiq, "NS parity error -> IRQ");
    saw(uart_irq && !uart_fiq, "uart_irq");
    urd(U_NS_ISR, 1); chk(val[IX_PARE], "NS ISR parity bit");
    denied_wr(1, U_ISR, 32'hFFFF);
    uwr(U_NS_ISR, val, 1); chk(!uart_irq, "IRQ cleared");
    term_s.par_en = 0; term_ns.par_en = 0;
    uwr(U_MR, 32'h20, 0);
    uwr(U_IDR, 32'h1FFF, 0);
    uwr(U_CR, 32'h15, 0);

    // receive overflow on the NS line: 64 bytes fill the FIFO, the 65th
    // waits, the start of the 66th drops it
    uwr(U_IER, 1 << IX_ROVR, 0);
    for (int i = 0; i < 64 + 2; i++) term_ns.send(8'(i));
    wait_bits(1);
    urd(U_NS_SR, 1); chk(val[SR_RFULL], "NS Rx FIFO full");
    chk(uart_irq && !uart_fiq, "overflow on IRQ");
    urd(U_NS_ISR, 1); chk(val[IX_ROVR], "NS overflow bit");
    saw(val[IX_ROVR] && uart_irq, "rx_overflow");
    uwr(U_NS_ISR, val, 1);
    for (int i = 0; i < 64; i++) begin
      urd(U_NS_RXFIFO, 1);
      if (val != i) chk(0, $sformatf("byte %0d read %0d", i, val));
    end
    checks++;
    uwr(U_IDR, 32'h1FFF, 0);
    uwr(U_CR, 32'h15, 0);

    // transmit overflow: transmitter off, 65 writes into the NS Tx FIFO
    uwr(U_IER, 1 << IX_TOVR, 0);
    uwr(U_CR, 32'h24, 0);                      // Tx disabled
    for (int i = 0; i < 65; i++) uwr(U_NS_TXFIFO, 8'(i), 1);
    urd(U_NS_ISR, 1); chk(val[IX_TOVR] && uart_irq, "NS Tx overflow on IRQ");
    saw(val[IX_TOVR] && uart_irq, "tx_overflow");
    uwr(U_NS_ISR, val, 1);
    uwr(U_IDR, 32'h1FFF, 0);
    uwr(U_CR, 32'h16, 0);                      // flush Tx, enable again
    term_ns.got.delete(); term_s.got.delete();

    // receiver timeout after a secure byte
    uwr(U_RTO, 4, 0);
    uwr(U_IER, 1 << IX_TIMEOUT, 0);
    term_s.send(8'h7A);                        // ends with two idle bits
    chk(!uart_fiq, "no timeout yet");
    wait_bits(4);
    chk(uart_fiq && !uart_irq, "secure timeout on FIQ");
    urd(U_ISR, 0); saw(val[IX_TIMEOUT], "rx_timeout");
    chk(val[IX_TIMEOUT], "timeout bit");
    uwr(U_ISR, val, 0);
    uwr(U_IDR, 32'h1FFF, 0);
    uwr(U_RTO, 0, 0);
    uwr(U_CR, 32'h15, 0);

    // local loopback: both channels turn back inside the device
    uwr(U_MR, 32'h220, 0);
    uwr(U_TXFIFO, 8'hA1, 0); uwr(U_NS_TXFIFO, 8'hB2, 1);
    wait_bits(24);
    urd(U_RXFIFO, 0);    chk(val == 32'hA1, "secure loopback byte");
    urd(U_NS_RXFIFO, 1); chk(val == 32'hB2, "NS loopback byte");
    saw(val == 32'hB2 && term_s.got.size() == 0 && term_ns.got.size() == 0, "loopback");
    uwr(U_MR, 32'h20, 0);

    // modem status change
    uwr(U_IER, 1 << IX_DMSI, 0);
    cts = 1; repeat (5) @(negedge clk);
    chk(uart_fiq && !uart_irq, "modem change on FIQ");
    urd(U_MSR, 1); chk(val[4] && val[0], "CTS and its delta in the modem status");
    saw(uart_fiq && val[0], "modem_delta");
    uwr(U_MSR, 1, 0); uwr(U_ISR, 1 << IX_DMSI, 0);
    chk(!uart_fiq, "modem interrupt cleared");

    foreach (seen[m]) $display("mechanism %-12s seen %0d", m, seen[m]);
    foreach (mechs[i]) begin
      checks++;
      if (!seen.exists(mechs[i])) begin failures++; $display("FAIL: mechanism %s never seen", mechs[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string mechs[] = '{"ns_denied", "tmr_fiq", "tmr_irq", "tmr_period", "reset_baud", "tx_split",
                     "tx_priority", "rx_split", "rx_preempt", "uart_fiq", "uart_irq",
                     "rx_overflow", "tx_overflow", "rx_timeout", "loopback", "modem_delta",
                     "both_banks_secure", "secure_to_ns_term"};

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
