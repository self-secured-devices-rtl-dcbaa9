// tb_timer_counter: checks one counter bank of the private timer against a
// behavioural model written from the timer description: decrement on tick
// while enabled, reload at zero in auto-reload mode, stop at zero in single
// shot mode, event flag on reaching zero only with the interrupt enabled,
// write-1-to-clear, and load/counter writes. Random stimulus plus directed
// checks of the auto-reload period (load+1 ticks).
module tb_timer_counter;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tick, enable, auto_reload, irq_en, load_we, cnt_we, flag_clr, flag;
  logic [W-1:0] wdata, load, count;

  timer_counter #(.W(W)) dut (.clk, .rst_n, .tick, .enable, .auto_reload, .irq_en,
    .load_we, .cnt_we, .wdata, .flag_clr, .load, .count, .flag);

  // model
  logic [W-1:0] m_load, m_count; logic m_flag;
  int checks = 0, failures = 0, events = 0;

  task automatic model_step();
    logic hit;
    hit = tick && enable && !load_we && !cnt_we &&
          (m_count == 1 || (m_count == 0 && auto_reload && m_load == 0));
    if (load_we) m_load = wdata;
    if (load_we || cnt_we) m_count = wdata;
    else if (tick && enable) begin
      if (m_count != 0) m_count = m_count - 1;
      else if (auto_reload) m_count = m_load;
    end
    if (hit && irq_en) begin m_flag = 1; events++; end
    else if (flag_clr) m_flag = 0;
  endtask

  task automatic cycle();
    @(posedge clk);
    model_step();
    #1;
    checks++;
    if (count !== m_count || load !== m_load || flag !== m_flag) begin
      failures++;
      if (failures < 10)
        $display("FAIL: t=%0t count %0d/%0d load %0d/%0d flag %b/%b", $time,
                 count, m_count, load, m_load, flag, m_flag);
    end
    @(negedge clk);
  endtask

  initial begin
    {tick, enable, auto_reload, irq_en, load_we, cnt_we, flag_clr} = '0;
    wdata = '0; m_load = 0; m_count = 0; m_flag = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    // directed: auto-reload period of load+1 ticks
    enable = 1; auto_reload = 1; irq_en = 1; tick = 1;
    wdata = 4; load_we = 1; cycle(); load_we = 0;
    begin
      int first, second;
      first = -1; second = -1;
      for (int c = 0; c < 20; c++) begin
        cycle();
        if (flag) begin
          if (first < 0) first = c; else if (second < 0 && c != first) second = c;
          flag_clr = 1;
        end else flag_clr = 0;
        if (second >= 0) break;
      end
      flag_clr = 0;
      checks++;
      if (second - first != 5) begin
        failures++; $display("FAIL: auto-reload period %0d", second - first);
      end
    end
    // random
    for (int i = 0; i < 4000; i++) begin
      tick        = ($urandom % 3) == 0;
      enable      = ($urandom % 8) != 0;
      auto_reload = ($urandom % 2);
      irq_en      = ($urandom % 4) != 0;
      load_we     = ($urandom % 40) == 0;
      cnt_we      = !load_we && ($urandom % 40) == 0;
      flag_clr    = ($urandom % 6) == 0;
      wdata       = W'($urandom % 12);
      cycle();
    end
    checks++;
    if (events < 20) begin failures++; $display("FAIL: only %0d events", events); end
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
