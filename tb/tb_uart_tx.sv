// tb_uart_tx: checks the shared transmitter of the self-secured UART.
//
// Transmit FIFOs are modelled by queues with the registered read and valid of
// uart_fifo; the Tx bit tick comes every P cycles. A serial monitor, written
// from the frame format alone, samples the two Tx lines in the middle of
// each bit and decodes start, data, parity and stop bits. Checked: secure
// bytes leave before any non-secure byte, each byte appears on the line of its
// own FIFO with the other line idle, correct data for 8/7/6 data bits, parity
// for the four parity types, one and two stop bits, one bit period per bit,
// break holding the line low, and CTS holding off transmission.
module tb_uart_tx;
  localparam int P = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clr, tx_en, baud_tx, brk, cts_ok, empty_s, empty_ns, rd_s, rd_ns, valid_s, valid_ns;
  logic [9:0] mode;
  logic [7:0] dout_s, dout_ns;
  logic tx_s, tx_ns, active, active_sec;

  uart_tx dut (.clk, .rst_n, .clr, .tx_en, .baud_tx, .mode, .brk, .cts_ok,
    .empty_s, .empty_ns, .rd_s, .rd_ns, .valid_s, .valid_ns, .dout_s, .dout_ns,
    .tx_s, .tx_ns, .active, .active_sec);

  // FIFO models
  logic [7:0] qs[$], qn[$];
  assign empty_s  = qs.size() == 0;
  assign empty_ns = qn.size() == 0;
  always @(posedge clk) begin
    valid_s <= 0; valid_ns <= 0;
    if (rd_s && qs.size() != 0) begin dout_s <= qs.pop_front(); valid_s <= 1; end
    if (rd_ns && qn.size() != 0) begin dout_ns <= qn.pop_front(); valid_ns <= 1; end
  end

  // bit tick
  int tc = 0;
  always @(posedge clk) begin
    tc = (tc + 1) % P;
    baud_tx <= (tc == 0);
  end

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected frame contents
  typedef struct { logic [7:0] data; logic sec; } frame_t;
  frame_t exp_q[$];
  int nbits = 8, nstop = 1; logic par_en = 0; logic [1:0] par = 0;

  function automatic logic exp_par(input logic [7:0] d, input int n, input logic [1:0] p);
    int ones; ones = 0;
    for (int i = 0; i < n; i++) ones += d[i];
    case (p)
      2'b00: return (ones % 2) == 0;
      2'b01: return (ones % 2) == 1;
      2'b10: return 1'b0;
      default: return 1'b1;
    endcase
  endfunction

  // serial monitor
  int frames = 0;
  logic mon_en = 1;
  initial begin
    forever begin
      logic sec; logic [7:0] d; logic pb;
      @(negedge clk);
      if (rst_n && mon_en && (tx_s == 0 || tx_ns == 0)) begin
        sec = (tx_s == 0);
        chk(sec ? tx_ns : tx_s, "other line idle");
        repeat (P / 2) @(negedge clk);
        chk((sec ? tx_s : tx_ns) == 0, "start bit");
        d = 0;
        for (int i = 0; i < nbits; i++) begin
          repeat (P) @(negedge clk);
          d[i] = sec ? tx_s : tx_ns;
        end
        if (par_en) begin
          repeat (P) @(negedge clk);
          pb = sec ? tx_s : tx_ns;
        end
        for (int i = 0; i < nstop; i++) begin
          repeat (P) @(negedge clk);
          chk((sec ? tx_s : tx_ns) == 1, "stop bit");
        end
        frames++;
        if (exp_q.size() == 0) chk(0, "unexpected frame");
        else begin
          frame_t e; e = exp_q.pop_front();
          chk(e.sec == sec, $sformatf("frame %0d on line sec=%b, expected %b", frames, sec, e.sec));
          chk(e.data == d, $sformatf("frame %0d data %h, expected %h", frames, d, e.data));
          if (par_en) chk(pb == exp_par(d, nbits, par), $sformatf("parity of %h", d));
        end
        // wait out the stop bit
        repeat (P / 2 - 1) @(negedge clk);
      end
    end
  end

  task automatic send_set(input int nb, input int ns_cnt, input logic pe, input logic [1:0] pt,
                          input int stops);
    logic [7:0] m; frame_t f;
    nbits = nb; nstop = stops; par_en = pe; par = pt;
    mode = '0;
    mode[2:1] = (nb == 6) ? 2'b11 : (nb == 7) ? 2'b10 : 2'b00;
    mode[5:3] = pe ? {1'b0, pt} : 3'b100;
    mode[7:6] = (stops == 2) ? 2'b10 : 2'b00;
    m = 8'((1 << nb) - 1);
    tx_en = 0;
    // non-secure bytes first in time, secure bytes after: secure must still go first
    for (int i = 0; i < ns_cnt; i++) qn.push_back(8'($urandom) & m);
    for (int i = 0; i < 3; i++) qs.push_back(8'($urandom) & m);
    foreach (qs[i]) begin f.data = qs[i]; f.sec = 1; exp_q.push_back(f); end
    foreach (qn[i]) begin f.data = qn[i]; f.sec = 0; exp_q.push_back(f); end
    @(negedge clk); tx_en = 1;
    wait (exp_q.size() == 0);
    repeat (3 * P) @(negedge clk);
    chk(!active, "idle after the set");
  endtask

  initial begin
    clr = 0; tx_en = 0; brk = 0; cts_ok = 1; mode = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    send_set(8, 3, 0, 2'b00, 1);
    send_set(7, 2, 1, 2'b00, 1);
    send_set(8, 2, 1, 2'b01, 1);
    send_set(6, 2, 1, 2'b10, 2);
    send_set(8, 1, 1, 2'b11, 2);
    chk(frames == 25, $sformatf("frames %0d", frames));
    // frame length: start + 8 data + stop = 10 bit periods
    begin
      int t0, t1;
      mode = 10'b00_00_100_000; nbits = 8; par_en = 0; nstop = 1;
      qs.push_back(8'h55); exp_q.push_back('{data: 8'h55, sec: 1});
      @(negedge tx_s); t0 = $time;
      wait (!active); t1 = $time;
      chk((t1 - t0) / 10 >= 10 * P - 2 && (t1 - t0) / 10 <= 10 * P + 2,
          $sformatf("frame length %0d cycles", (t1 - t0) / 10));
    end
    repeat (2 * P) @(negedge clk);
    // CTS low holds off a pending byte
    cts_ok = 0; qn.push_back(8'hA3); exp_q.push_back('{data: 8'hA3, sec: 0});
    repeat (5 * P) @(negedge clk);
    chk(!active && tx_ns == 1, "held off by CTS");
    cts_ok = 1; wait (exp_q.size() == 0);
    repeat (3 * P) @(negedge clk);
    // break: line held low while requested
    mon_en = 0; brk = 1; repeat (3 * P) @(negedge clk);
    chk(tx_ns == 0 && tx_s == 1, "break on the last used line");
    repeat (3 * P) @(negedge clk);
    chk(tx_ns == 0, "break held");
    brk = 0; repeat (2 * P) @(negedge clk);
    chk(tx_ns == 1 && !active, "break released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
