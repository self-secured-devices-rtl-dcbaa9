// tb_ss_uart: checks the self-secured UART through its AXI4-lite port and
// two serial terminals (secure and non-secure), 16 clock cycles per bit.
//
// Checked: reset value of the control register; the secure world configures
// the shared settings while a non-secure write to them is refused; strings
// written by each world come out on that world's terminal only, and a string
// queued on the secure side goes out before a non-secure one queued at the
// same time; a non-secure write to the secure transmit FIFO is refused and
// sends nothing; bytes received on each terminal land in that world's receive
// FIFO, and a non-secure read of the secure FIFO is refused with zero data;
// a secure character starting during a non-secure one takes the receiver;
// a parity error on the secure line raises FIQ only and one on the
// non-secure line IRQ only, each cleared by its own world; the non-secure
// receive trigger level; local loopback of the secure channel; automatic
// flow control (RTS/DTR follow the receive FIFO level, transmission waits
// for CTS).
module tb_ss_uart;
  import ss_pkg::*;
  localparam int AW = 7, BIT = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] awaddr, araddr; logic [2:0] awprot, arprot;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata; logic [3:0] wstrb; logic [1:0] bresp, rresp;
  logic rxd_s, txd_s, rxd_ns, txd_ns, rts, dtr, fiq, irq;
  logic cts = 0;

  axil_bfm #(.ADDR_W(AW)) bfm (.*);
  ss_uart #(.ADDR_W(AW)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .rxd_s, .txd_s, .rxd_ns, .txd_ns,
    .cts, .dsr(1'b0), .ri(1'b0), .dcd(1'b0), .rts, .dtr, .fiq, .irq);
  uart_term #(.BIT(BIT)) term_s  (.clk, .txd(txd_s),  .rxd(rxd_s));
  uart_term #(.BIT(BIT)) term_ns (.clk, .txd(txd_ns), .rxd(rxd_ns));

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic [1:0] resp; logic [31:0] val; int cyc;
  task automatic wr(input int a, input logic [31:0] d, input logic ns);
    bfm.write(a, d, ns, resp, cyc);
  endtask
  task automatic rd(input int a, input logic ns);
    bfm.read(a, ns, val, resp, cyc);
  endtask
  task automatic wait_bits(input int n);
    repeat (n * BIT) @(negedge clk);
  endtask

  string s_str = "SECURE", ns_str = "normal";

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    rd(U_CR, 0); chk(val == 32'h128 && resp == RESP_OKAY, "CR reset value");
    // configuration by the secure world
    wr(U_BAUDGEN, 2, 0); wr(U_BDIV, 7, 0); wr(U_MR, 32'h20, 0);
    wr(U_MR, 32'h0, 1);  chk(resp == RESP_SLVERR, "NS mode write refused");
    rd(U_MR, 0);         chk(val == 32'h20, "mode kept");
    wr(U_CR, 32'h17, 0); // reset both paths, enable Rx and Tx

    // transmit: both worlds queue a string, the secure one goes first
    foreach (ns_str[i]) begin wr(U_NS_TXFIFO, ns_str[i], 1); chk(resp == RESP_OKAY, "NS Tx write"); end
    foreach (s_str[i])  begin wr(U_TXFIFO, s_str[i], 0);     chk(resp == RESP_OKAY, "S Tx write"); end
    wr(U_TXFIFO, "X", 1); chk(resp == RESP_SLVERR, "NS write to secure Tx FIFO refused");
    wait_bits(10 * (s_str.len() + ns_str.len() + 2));
    chk(term_s.got.size() == s_str.len(), $sformatf("secure terminal got %0d chars", term_s.got.size()));
    chk(term_ns.got.size() == ns_str.len(), $sformatf("NS terminal got %0d chars", term_ns.got.size()));
    foreach (term_s.got[i])  chk(term_s.got[i] == s_str[i], "secure string");
    foreach (term_ns.got[i]) chk(term_ns.got[i] == ns_str[i], "NS string");
    // The first NS char may have been fetched before the secure bytes were
    // written; from then on every secure char precedes the remaining NS ones.
    chk(term_ns.got_t[1] > term_s.got_t[s_str.len()-1], "secure string has priority");
    rd(U_SR, 0);    chk(val[SR_TEMPTY], "secure Tx FIFO empty");
    rd(U_NS_SR, 1); chk(val[SR_TEMPTY], "NS Tx FIFO empty");

    // receive
    term_s.send(8'hA5); term_ns.send(8'h3C);
    wait_bits(2);
    rd(U_RXFIFO, 1);    chk(resp == RESP_SLVERR && val == 0, "NS read of secure Rx FIFO refused");
    rd(U_RXFIFO, 0);    chk(val == 32'hA5 && resp == RESP_OKAY, "secure byte received");
    rd(U_NS_RXFIFO, 1); chk(val == 32'h3C && resp == RESP_OKAY, "NS byte received");
    rd(U_NS_SR, 1);     chk(val[SR_REMPTY], "NS Rx FIFO empty after read");
    // a secure start bit during a non-secure character takes the receiver
    fork
      term_ns.send(8'h5C);
      begin wait_bits(3); term_s.send(8'hC5); end
    join
    wait_bits(2);
    rd(U_RXFIFO, 0);  chk(val == 32'hC5, "pre-empting secure byte received");
    rd(U_NS_SR, 1);   chk(val[SR_REMPTY], "pre-empted NS byte dropped");

    // parity errors: even parity, error interrupt enabled
    // Parity type 000: the parity bit is 1 when the data holds an even
    // number of ones, so the terminals start their parity sum at 1.
    wr(U_MR, 32'h00, 0);
    term_s.par_en = 1; term_ns.par_en = 1; term_s.par_odd = 1; term_ns.par_odd = 1;
    wr(U_IER, 32'h1 << IX_PARE, 0);
    wr(U_IER, 32'h1 << IX_PARE, 1); chk(resp == RESP_SLVERR, "NS interrupt enable refused");
    term_s.send(8'h11, 1); wait_bits(1);
    chk(fiq && !irq, "secure parity error -> FIQ only");
    rd(U_NS_ISR, 1); chk(val == 0, "NS status clean");
    wr(U_ISR, 32'hFFFF, 1); chk(resp == RESP_SLVERR && fiq, "NS cannot clear FIQ source");
    rd(U_ISR, 0); chk(val[IX_PARE], "secure status shows parity");
    wr(U_ISR, val, 0); chk(!fiq, "secure world clears FIQ");
    term_ns.send(8'h22, 1); wait_bits(1);
    chk(irq && !fiq, "NS parity error -> IRQ only");
    rd(U_NS_ISR, 1); chk(val[IX_PARE], "NS status shows parity");
    wr(U_NS_ISR, val, 1); chk(!irq, "NS world clears IRQ");
    term_s.send(8'h33, 0); wait_bits(1);
    chk(!fiq && !irq, "good parity, no interrupt");
    wr(U_CR, 32'h15, 0); // flush the receive FIFOs
    wr(U_IDR, 32'h1 << IX_PARE, 0);

    // non-secure receive trigger
    wr(U_NS_RTRIG, 2, 1); chk(resp == RESP_OKAY, "NS trigger write");
    wr(U_IER, 32'h1 << IX_RTRIG, 0);
    term_ns.send(8'h01); wait_bits(1);
    chk(!irq, "one byte under the trigger");
    term_ns.send(8'h02); wait_bits(1);
    chk(irq && !fiq, "NS trigger -> IRQ");
    rd(U_NS_RXFIFO, 1); rd(U_NS_RXFIFO, 1); chk(val == 32'h02, "NS bytes in order");
    rd(U_NS_ISR, 1); wr(U_NS_ISR, val, 1); chk(!irq, "trigger interrupt cleared");
    wr(U_IDR, 32'h1 << IX_RTRIG, 0);

    // local loopback of the secure channel
    term_s.got.delete(); term_s.par_en = 0; term_ns.par_en = 0;
    wr(U_MR, 32'h220, 0);
    wr(U_TXFIFO, 32'h77, 0);
    wait_bits(12);
    rd(U_RXFIFO, 0); chk(val == 32'h77, "loopback byte received");
    chk(term_s.got.size() == 0, "nothing on the secure pin in loopback");

    // automatic flow control: RTS drops at the flow delay level, the
    // transmitter waits for CTS
    wr(U_MR, 32'h20, 0); wr(U_CR, 32'h17, 0);
    wr(U_FDEL, 2, 0); wr(U_MCR, 32'h20, 0);
    chk(rts && dtr, "RTS/DTR asserted with room in the FIFOs");
    term_ns.send(8'h10); term_ns.send(8'h11); wait_bits(1);
    chk(!rts && !dtr, "RTS/DTR dropped at the flow delay level");
    rd(U_NS_RXFIFO, 1); wait_bits(1);
    chk(rts, "RTS back after a read");
    wr(U_TXFIFO, 8'h3F, 0); wait_bits(14);
    chk(term_s.got.size() == 0, "transmitter waits for CTS");
    cts = 1; wait_bits(14);
    chk(term_s.got.size() == 1 && term_s.got[0] == 8'h3F, "sent once CTS is asserted");
    wr(U_MCR, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
