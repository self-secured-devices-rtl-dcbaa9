// uart_fifo: byte FIFO of the self-secured UART (transmit and receive, one
// for each world, four instances in all).
//
// DEPTH entries (64 bytes, as in the original UART) held in a memory array
// with a write pointer, a read pointer and a fill level. A pop (`rd_en`) moves
// the oldest byte into the registered output `dout` and raises `valid` for
// one cycle in the next cycle; popping an empty FIFO gives no `valid`. A push
// into a full FIFO is dropped and pulses `ovf`. `clr` empties the FIFO (soft
// reset of the transmitter or receiver).
//
// Flags: `empty`, `full`, `nfull` (exactly one free entry left), and
// `trig_hit`, set while the level is at or above the programmed trigger level
// `trig` (a trigger level of 0 disables it; this is this design's choice).
module uart_fifo #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned LW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          wr_en,
  input  logic [W-1:0]  din,
  input  logic          rd_en,
  output logic [W-1:0]  dout,
  output logic          valid,
  input  logic [LW-1:0] trig,
  output logic [LW-1:0] level,
  output logic          empty,
  output logic          full,
  output logic          nfull,
  output logic          trig_hit,
  output logic          ovf
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty    = (level == '0);
  assign full     = (level == LW'(DEPTH));
  assign nfull    = (level == LW'(DEPTH - 1));
  assign trig_hit = (trig != '0) && (level >= trig);

  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && (!full || do_rd);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
      valid <= 1'b0;
      ovf   <= 1'b0;
      dout  <= '0;
    end else begin
      valid <= do_rd;
      ovf   <= wr_en && !do_wr;
      if (do_rd) begin
        dout <= mem[rptr];
        rptr <= inc(rptr);
      end
      if (do_wr) wptr <= inc(wptr);
      level <= level + LW'(do_wr) - LW'(do_rd);
    end
  end

  a_level_range: assert property (@(posedge clk) disable iff (!rst_n) level <= LW'(DEPTH));
endmodule
