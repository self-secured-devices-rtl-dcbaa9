// tb_timer_prescaler: checks that the prescaler ticks exactly once every
// (prescaler+1) cycles for a set of prescaler values, including 0 (every
// cycle) and the largest 8-bit value.
module tb_timer_prescaler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] presc;
  logic tick;

  timer_prescaler #(.PRESC_W(8)) dut (.clk, .rst_n, .prescaler(presc), .tick);

  int checks = 0, failures = 0;
  int vals[6] = '{0, 1, 2, 7, 100, 255};

  initial begin
    presc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (vals[k]) begin
      int last, n;
      presc = 8'(vals[k]);
      // let the new value settle: skip two ticks
      n = 0;
      while (n < 2) begin @(posedge clk); if (tick) n++; end
      last = 0; n = 0;
      for (int c = 1; n < 5; c++) begin
        @(posedge clk);
        if (tick) begin
          checks++;
          if (c - last != vals[k] + 1) begin
            failures++;
            $display("FAIL: prescaler %0d: tick spacing %0d", vals[k], c - last);
          end
          last = c; n++;
        end
      end
    end
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
