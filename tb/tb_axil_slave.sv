// tb_axil_slave: self-checking test of the AXI4-lite slave front end.
//
// A small register model behind the slave (16 words; words 8..15 refuse the
// non-secure world) is written and read through the master BFM. Checks: data
// round trip, the NS bit reaching the register bus, SLVERR with zero data on
// refused accesses, the write (3 cycles) and read (4 cycles) latencies, and
// that a read response is held while RREADY is low.
module tb_axil_slave;
  localparam int unsigned AW = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] awaddr, araddr, wr_addr, rd_addr;
  logic [2:0]    awprot, arprot;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata, wr_data, rd_data;
  logic [3:0]  wstrb, wr_strb;
  logic [1:0]  bresp, rresp;
  logic wr_en, wr_ns, wr_err, rd_en, rd_ns, rd_err;

  axil_slave #(.ADDR_W(AW)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awprot(awprot), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(arprot), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_ns, .wr_err,
    .rd_en, .rd_addr, .rd_ns, .rd_data, .rd_err
  );

  axil_bfm #(.ADDR_W(AW)) bfm (
    .clk, .awaddr, .awprot, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arprot, .arvalid, .arready, .rdata, .rresp,
    .rvalid, .rready
  );

  // register model
  logic [31:0] regs [16];
  logic        last_wr_ns;
  assign wr_err  = wr_ns && wr_addr[5];
  assign rd_err  = rd_ns && rd_addr[5];
  assign rd_data = regs[rd_addr[5:2]];
  always_ff @(posedge clk) if (wr_en) begin
    if (!wr_err) regs[wr_addr[5:2]] <= wr_data;
    last_wr_ns <= wr_ns;
  end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] d; logic [1:0] r; int cyc;
  initial begin
    for (int i = 0; i < 16; i++) regs[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      bfm.write(4*i, 32'hA500_0000 + i, 1'b0, r, cyc);
      check(r == 2'b00, "secure write OKAY");
      check(cyc == 3, $sformatf("write latency %0d", cyc));
    end
    for (int i = 0; i < 16; i++) begin
      bfm.read(4*i, 1'b0, d, r, cyc);
      check(d == 32'hA500_0000 + i && r == 2'b00, $sformatf("secure read %0d = %h", i, d));
      check(cyc == 4, $sformatf("read latency %0d", cyc));
    end
    // non-secure: words 0..7 open, 8..15 refused
    bfm.write(4, 32'h1234_5678, 1'b1, r, cyc);
    check(r == 2'b00 && regs[1] == 32'h1234_5678 && last_wr_ns, "NS write to open word");
    bfm.write(40, 32'hDEAD_BEEF, 1'b1, r, cyc);
    check(r == 2'b10 && regs[10] == 32'hA500_000A, "NS write to closed word refused");
    bfm.read(40, 1'b1, d, r, cyc);
    check(r == 2'b10 && d == 0, "NS read of closed word refused");
    bfm.read(8, 1'b1, d, r, cyc);
    check(r == 2'b00 && d == 32'hA500_0002, "NS read of open word");
    // response held while RREADY low
    @(negedge clk); araddr = 12; arprot = 0; arvalid = 1; rready = 0;
    @(posedge clk); @(negedge clk); arvalid = 0;
    repeat (6) @(posedge clk);
    check(rvalid && rdata == 32'hA500_0003, "read response held");
    @(negedge clk); rready = 1; @(posedge clk); @(negedge clk); rready = 0;
    check(!rvalid, "read response released");
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
