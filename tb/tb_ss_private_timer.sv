// tb_ss_private_timer: self-checking test of the self-secured private timer
// through its AXI4-lite port.
//
//  1. Secure world programs both banks (non-secure load smaller than secure
//     load), prescaler 1, auto-reload and interrupts on: the non-secure
//     overflow (IRQ) must come first and the secure one (FIQ) later, and the
//     distance between IRQ events must equal (prescaler+1)*(load+1) cycles.
//  2. Non-secure world: writes/reads to the secure load and counter answer
//     SLVERR and change nothing; a control write of all ones changes only the
//     non-secure enable/auto-reload bits; a status write of all ones clears
//     only the non-secure flag; the non-secure load still works.
//  3. Single-shot mode: the counter stops at zero and raises one event.
module tb_ss_private_timer;
  import ss_pkg::*;
  localparam int unsigned AW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] awaddr, araddr;
  logic [2:0]    awprot, arprot;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic fiq, irq;

  ss_private_timer #(.ADDR_W(AW)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .fiq, .irq
  );

  axil_bfm #(.ADDR_W(AW)) bfm (
    .clk, .awaddr, .awprot, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arprot, .arvalid, .arready, .rdata, .rresp,
    .rvalid, .rready
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // cycle counter and interrupt edge log
  int cyc = 0, irq_t[$], fiq_t[$];
  logic irq_q = 0, fiq_q = 0;
  always @(posedge clk) begin
    cyc++;
    irq_q <= irq; fiq_q <= fiq;
    if (rst_n && irq && !irq_q) irq_t.push_back(cyc);
    if (rst_n && fiq && !fiq_q) fiq_t.push_back(cyc);
  end

  logic [31:0] d; logic [1:0] r; int n;
  localparam logic S = 1'b0, NS = 1'b1;

  task automatic wr(input int unsigned a, input logic [31:0] v, input logic ns, input logic [1:0] exp);
    bfm.write(a, v, ns, r, n);
    check(r == exp, $sformatf("write %0d ns=%b resp %0d", a, ns, r));
  endtask
  task automatic rd(input int unsigned a, input logic ns, input logic [1:0] exp);
    bfm.read(a, ns, d, r, n);
    check(r == exp, $sformatf("read %0d ns=%b resp %0d", a, ns, r));
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // ---- 1: secure world drives both interfaces ----
    wr(TMR_LOAD_S, 40, S, RESP_OKAY);
    wr(TMR_LOAD_NS, 10, S, RESP_OKAY);
    rd(TMR_LOAD_NS, S, RESP_OKAY); check(d == 10, "secure reads NS load");
    rd(TMR_CNT_S, S, RESP_OKAY);   check(d == 40, "load also sets counter");
    wr(TMR_CTRL, 32'h0000_013F, S, RESP_OKAY);    // prescaler 1, all enables
    rd(TMR_CTRL, S, RESP_OKAY);    check(d == 32'h0000_013F, "control read back");
    wait (irq_t.size() >= 1);
    check(fiq_t.size() == 0, $sformatf("non-secure overflow first irq=%0d fiq=%0d", irq_t[0], fiq_t.size() ? fiq_t[0] : -1));
    wr(TMR_ISR, 32'h2, S, RESP_OKAY);             // secure clears the NS flag
    wait (fiq_t.size() >= 1);
    check(irq_t.size() >= 1, "secure overflow after non-secure");
    wr(TMR_ISR, 32'h1, S, RESP_OKAY);
    check(!fiq, "secure flag cleared");
    while (irq_t.size() < 4) begin
      @(posedge clk);
      if (irq) begin bfm.write(TMR_ISR, 32'h2, S, r, n); end
    end
    check(irq_t[3] - irq_t[2] == 2 * 11, $sformatf("NS period %0d, expected 22", irq_t[3] - irq_t[2]));
    // ---- 2: non-secure world ----
    wr(TMR_LOAD_S, 5, NS, RESP_SLVERR);
    rd(TMR_LOAD_S, S, RESP_OKAY);  check(d == 40, "secure load untouched by NS");
    rd(TMR_CNT_S, NS, RESP_SLVERR); check(d == 0, "NS read of secure counter gives 0");
    wr(TMR_CNT_S, 7, NS, RESP_SLVERR);
    wr(TMR_CTRL, 32'hFFFF_FFFF, NS, RESP_OKAY);
    rd(TMR_CTRL, S, RESP_OKAY);    check(d == 32'h0000_013F, "NS control write keeps secure bits");
    wr(TMR_CTRL, 32'h0000_0000, NS, RESP_OKAY);
    rd(TMR_CTRL, S, RESP_OKAY);    check(d == 32'h0000_0127, "NS control write clears NS enable/reload");
    rd(TMR_CTRL, NS, RESP_OKAY);   check(d == 32'h0, "NS sees only its bits");
    wait (fiq);
    wr(TMR_ISR, 32'hFFFF_FFFF, NS, RESP_OKAY);
    check(fiq, "NS cannot clear the secure flag");
    rd(TMR_ISR, NS, RESP_OKAY);    check(d[0] == 0, "NS does not see the secure flag");
    wr(TMR_ISR, 32'h1, S, RESP_OKAY);
    wr(TMR_LOAD_NS, 3, NS, RESP_OKAY);
    rd(TMR_LOAD_NS, NS, RESP_OKAY); check(d == 3, "NS load from NS world");
    wr(TMR_CTRL, 32'h18, NS, RESP_OKAY);          // NS enable + auto-reload again
    begin
      int k; k = irq_t.size();
      wait (irq_t.size() > k);
      check(1, "NS overflow from NS-programmed counter");
    end
    wr(TMR_ISR, 32'h2, NS, RESP_OKAY);
    // ---- 3: single shot on the secure bank ----
    wr(TMR_CTRL, 32'h0000_0005, S, RESP_OKAY);    // prescaler 0, enable, IRQ, no reload
    wr(TMR_ISR, 32'h3, S, RESP_OKAY);
    wr(TMR_CNT_S, 30, S, RESP_OKAY);
    begin
      int k; k = fiq_t.size();
      repeat (100) @(posedge clk);
      check(fiq_t.size() == k + 1, "single shot gives one event");
    end
    rd(TMR_CNT_S, S, RESP_OKAY);   check(d == 0, "single shot stops at zero");
    wr(TMR_ISR, 32'h1, S, RESP_OKAY);
    repeat (60) @(posedge clk);
    check(!fiq, "no further event in single shot");
    rd(TMR_ISR, NS, RESP_OKAY);    // any NS read ok
    wr(20, 9, S, RESP_OKAY);       // NS counter from secure world
    rd(TMR_CNT_NS, S, RESP_OKAY);  check(d == 9, "NS bank disabled: written count stays");
    wr(24, 0, S, RESP_SLVERR);     // unmapped
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
