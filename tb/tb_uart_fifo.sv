// tb_uart_fifo: random push/pop test of the 64-byte UART FIFO against a
// queue model. Checks the data order, the registered read with its one-cycle
// valid, the level, empty/full/nearly-full/trigger flags, the overflow pulse
// on a push into a full FIFO, and the soft clear.
module tb_uart_fifo;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, wr_en, rd_en, valid, empty, full, nfull, trig_hit, ovf;
  logic [7:0] din, dout;
  logic [6:0] trig, level;

  uart_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clr, .wr_en, .din, .rd_en, .dout, .valid,
    .trig, .level, .empty, .full, .nfull, .trig_hit, .ovf);

  logic [7:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0, n_trig = 0;
  logic exp_valid, exp_ovf; logic [7:0] exp_data;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    {clr, wr_en, rd_en} = '0; din = 0; trig = 7'd20;
    exp_valid = 0; exp_ovf = 0; exp_data = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 70 : 30;        // alternate filling and draining
      wr_en = ($urandom % 100) < bias;
      rd_en = ($urandom % 100) < 100 - bias;
      clr   = ($urandom % 3000) == 0;
      din   = 8'($urandom);
      // flags before the edge
      chk(level == 7'(q.size()), $sformatf("level %0d vs %0d", level, q.size()));
      chk(empty == (q.size() == 0) && full == (q.size() == DEPTH) &&
          nfull == (q.size() == DEPTH - 1) && trig_hit == (q.size() >= 20), "flags");
      if (full) n_full++;
      if (trig_hit) n_trig++;
      // model
      exp_valid = 0; exp_ovf = 0;
      if (clr) q.delete();
      else begin
        logic did_rd;
        did_rd = rd_en && q.size() != 0;
        if (did_rd) begin exp_data = q.pop_front(); exp_valid = 1; end
        if (wr_en) begin
          if (q.size() < DEPTH) q.push_back(din); else exp_ovf = 1;
        end
      end
      @(posedge clk); #1;
      chk(valid == exp_valid, "valid");
      if (exp_valid) chk(dout == exp_data, $sformatf("data %h vs %h", dout, exp_data));
      chk(ovf == exp_ovf, "overflow pulse");
      if (ovf) n_ovf++;
      @(negedge clk);
    end
    chk(n_full > 0 && n_ovf > 0 && n_trig > 0, "full, overflow and trigger all seen");
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
