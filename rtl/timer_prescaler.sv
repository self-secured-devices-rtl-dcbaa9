// timer_prescaler: clock divider of the self-secured private timer.
//
// The timer counts at a rate set by the 8-bit prescaler field of its control
// register: one tick every (prescaler + 1) clock cycles, so a prescaler of 0
// ticks on every cycle. Instead of producing a divided clock the module emits
// a one-cycle enable pulse, `tick`, that both counter banks use; keeping the
// counters on the bus clock is this design's choice. The prescaler belongs to
// the secure world and is shared by the secure and non-secure counters.
//
// Timing: `tick` is registered. A new prescaler value takes effect at the next
// wrap of the internal count (or at once, if the count already exceeds it).
module timer_prescaler #(
  parameter int unsigned PRESC_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PRESC_W-1:0] prescaler,
  output logic               tick
);
  logic [PRESC_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt >= prescaler) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
