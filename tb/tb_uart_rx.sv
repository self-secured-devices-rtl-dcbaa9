// tb_uart_rx: checks the shared receiver of the self-secured UART, driven by
// the real baud rate generator (cd=2, bdiv=7: 16 cycles per bit).
//
// Serial frames are generated by the testbench on the secure and the
// non-secure line. Checked: bytes land in the FIFO of their own line with the
// right data (8N1, 7 bits with parity, 6 bits with two stop bits); a wrong
// parity bit gives a parity error and a low stop bit a framing error, both
// tagged with the line's security; a secure frame starting during a
// non-secure one wins and the non-secure byte is dropped; a byte waiting for
// a full FIFO is dropped with an overflow error when the next frame starts;
// the timeout fires after the programmed number of idle bit periods; a low
// glitch shorter than half a bit is not taken as a start bit.
module tb_uart_rx;
  import ss_pkg::*;
  localparam int CD = 2, BDIV = 7, BIT = CD * (BDIV + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic baud_sample, baud_tx, baud_rx, rx_resync, rx_en, rsttout, full_s, full_ns;
  logic wr_s, wr_ns, active, active_sec, rxd_s, rxd_ns;
  logic [9:0] mode; logic [7:0] rto, wdata;
  rx_err_t err_s, err_ns;

  uart_baud_gen u_bg (.clk, .rst_n, .clk_sel(1'b0), .cd(16'(CD)), .bdiv(16'(BDIV)),
                      .rx_resync, .baud_sample, .baud_tx, .baud_rx);
  uart_rx dut (.clk, .rst_n, .clr(1'b0), .rx_en, .baud_sample, .baud_rx, .rx_resync,
               .bdiv(16'(BDIV)), .mode, .rxd_s, .rxd_ns, .rto, .rsttout, .full_s, .full_ns,
               .wr_s, .wr_ns, .wdata, .err_s, .err_ns, .active, .active_sec);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // capture
  logic [7:0] got_s[$], got_ns[$];
  int e_par_s, e_par_ns, e_fr_s, e_fr_ns, e_ovr_s, e_ovr_ns, e_to_s, e_to_ns;
  always @(posedge clk) if (rst_n) begin
    if (wr_s)  got_s.push_back(wdata);
    if (wr_ns) got_ns.push_back(wdata);
    e_par_s += err_s.par;  e_par_ns += err_ns.par;
    e_fr_s  += err_s.frame; e_fr_ns += err_ns.frame;
    e_ovr_s += err_s.ovr;  e_ovr_ns += err_ns.ovr;
    e_to_s  += err_s.tout; e_to_ns  += err_ns.tout;
  end

  task automatic drive(input logic sec, input logic v);
    if (sec) rxd_s = v; else rxd_ns = v;
  endtask

  // one frame; pbit < 0 means no parity bit
  task automatic send(input logic sec, input logic [7:0] d, input int nb, input int pbit,
                      input int stops, input logic stop_val);
    drive(sec, 0); repeat (BIT) @(negedge clk);
    for (int i = 0; i < nb; i++) begin drive(sec, d[i]); repeat (BIT) @(negedge clk); end
    if (pbit >= 0) begin drive(sec, pbit[0]); repeat (BIT) @(negedge clk); end
    for (int i = 0; i < stops; i++) begin drive(sec, stop_val); repeat (BIT) @(negedge clk); end
    drive(sec, 1); repeat (BIT) @(negedge clk);
  endtask

  function automatic int par_of(input logic [7:0] d, input int nb, input logic [1:0] p);
    int ones; ones = 0;
    for (int i = 0; i < nb; i++) ones += d[i];
    case (p)
      2'b00: return (ones % 2) == 0;
      2'b01: return ones % 2;
      2'b10: return 0;
      default: return 1;
    endcase
  endfunction

  initial begin
    {e_par_s, e_par_ns, e_fr_s, e_fr_ns, e_ovr_s, e_ovr_ns, e_to_s, e_to_ns} = '0;
    rxd_s = 1; rxd_ns = 1; rx_en = 0; rsttout = 0; full_s = 0; full_ns = 0; rto = 0;
    mode = 10'b00_00_100_000;   // 8 bits, no parity, 1 stop
    repeat (3) @(posedge clk); rst_n = 1; rx_en = 1;
    repeat (4 * BIT) @(negedge clk);
    // 1. 8N1 on both lines
    send(1, 8'hA5, 8, -1, 1, 1);
    send(0, 8'h3C, 8, -1, 1, 1);
    send(1, 8'hFF, 8, -1, 1, 1);
    send(0, 8'h00, 8, -1, 1, 1);
    chk(got_s.size() == 2 && got_s[0] == 8'hA5 && got_s[1] == 8'hFF, "secure bytes");
    chk(got_ns.size() == 2 && got_ns[0] == 8'h3C && got_ns[1] == 8'h00, "non-secure bytes");
    // 2. 7 data bits, parity type 01, correct then wrong
    mode = 10'b00_00_001_100;
    send(0, 8'h5B, 7, par_of(8'h5B, 7, 2'b01), 1, 1);
    chk(e_par_ns == 0 && got_ns[$] == 8'h5B, "7-bit frame with good parity");
    send(0, 8'h5B, 7, 1 - par_of(8'h5B, 7, 2'b01), 1, 1);
    chk(e_par_ns == 1 && e_par_s == 0, "parity error tagged non-secure");
    send(1, 8'h21, 7, 1 - par_of(8'h21, 7, 2'b01), 1, 1);
    chk(e_par_s == 1, "parity error tagged secure");
    // 3. 6 bits, parity 00, two stop bits; framing error on a low stop bit
    mode = 10'b00_10_000_110;
    send(1, 8'h2A, 6, par_of(8'h2A, 6, 2'b00), 2, 1);
    chk(got_s[$] == 8'h2A && e_par_s == 1 && e_fr_s == 0, "6-bit frame, 2 stop bits");
    send(1, 8'h15, 6, par_of(8'h15, 6, 2'b00), 2, 0);
    chk(e_fr_s == 1 && e_fr_ns == 0, "framing error tagged secure");
    mode = 10'b00_00_100_000;
    // 4. secure frame pre-empts a non-secure one
    begin
      int ns0, s0; ns0 = got_ns.size(); s0 = got_s.size();
      fork
        send(0, 8'h81, 8, -1, 1, 1);
        begin repeat (3 * BIT + 3) @(negedge clk); send(1, 8'h7E, 8, -1, 1, 1); end
      join
      repeat (2 * BIT) @(negedge clk);
      chk(got_ns.size() == ns0, "non-secure byte dropped");
      chk(got_s.size() == s0 + 1 && got_s[$] == 8'h7E, "secure byte received");
    end
    // 5. overflow while the FIFO is full
    begin
      int s0; s0 = got_s.size();
      full_s = 1;
      send(1, 8'h11, 8, -1, 1, 1);
      chk(got_s.size() == s0 && e_ovr_s == 0, "byte waits for space");
      send(1, 8'h22, 8, -1, 1, 1);
      chk(e_ovr_s == 1 && e_ovr_ns == 0, "overflow on the next start bit");
      full_s = 0; repeat (4) @(negedge clk);
      chk(got_s.size() == s0 + 1 && got_s[$] == 8'h22, "newest byte kept");
    end
    // 6. timeout after 5 idle bit periods, tagged by the last character
    rto = 5;
    send(0, 8'h44, 8, -1, 1, 1);
    repeat (3 * BIT) @(negedge clk);
    chk(e_to_ns == 0, "no timeout yet");
    repeat (4 * BIT) @(negedge clk);
    chk(e_to_ns == 1 && e_to_s == 0, "timeout tagged non-secure");
    repeat (10 * BIT) @(negedge clk);
    chk(e_to_ns == 1, "timeout fires once");
    rto = 0;
    // 7. short glitch is not a start bit
    begin
      int s0; s0 = got_s.size();
      rxd_s = 0; repeat (BIT / 4) @(negedge clk); rxd_s = 1;
      repeat (12 * BIT) @(negedge clk);
      chk(got_s.size() == s0 && e_fr_s == 1 && !active, "glitch ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
