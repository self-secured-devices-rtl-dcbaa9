// uart_term: serial terminal model used by the UART testbenches.
//
// `send` drives one frame on `rxd` (towards the device): start bit, `nbits`
// data bits LSB first, an optional parity bit (see `par_odd` below),
// then one stop bit. `bad_par` inverts the parity bit. Frames seen on `txd`
// (from the device) are decoded with the same settings and pushed into `got`
// together with their start time; `frame_errs` counts low stop bits.
// With `par_odd` clear the parity bit is the XOR of the data bits; with it
// set, the inverse.
module uart_term #(
  parameter int unsigned BIT = 16    // clock cycles per bit
) (
  input  logic clk,
  input  logic txd,
  output logic rxd
);
  int nbits = 8;
  int bit_len = BIT;               // may be changed between frames
  logic par_en = 0, par_odd = 0;
  logic [7:0] got[$];
  longint got_t[$];
  int frame_errs = 0;

  initial rxd = 1;

  task automatic send(input logic [7:0] d, input logic bad_par = 0);
    logic p;
    p = par_odd;
    rxd = 0; repeat (bit_len) @(negedge clk);
    for (int i = 0; i < nbits; i++) begin
      rxd = d[i]; p ^= d[i]; repeat (bit_len) @(negedge clk);
    end
    if (par_en) begin rxd = p ^ bad_par; repeat (bit_len) @(negedge clk); end
    rxd = 1; repeat (2 * bit_len) @(negedge clk);
  endtask

  // receiver: falling edge, then sample each bit in its middle
  initial begin
    logic [7:0] d;
    longint t0;
    forever begin
      @(negedge txd);
      t0 = $time;
      repeat (bit_len / 2) @(posedge clk);
      if (txd == 0) begin
        d = '0;
        for (int i = 0; i < nbits; i++) begin
          repeat (bit_len) @(posedge clk);
          d[i] = txd;
        end
        if (par_en) repeat (bit_len) @(posedge clk);
        repeat (bit_len) @(posedge clk);
        if (txd == 0) frame_errs++;
        got.push_back(d);
        got_t.push_back(t0);
      end
    end
  end
endmodule
