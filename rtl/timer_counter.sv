// timer_counter: one banked counter of the self-secured private timer.
//
// The self-secured timer holds two of these, one for the secure and one for
// the non-secure world. Each has its own load register, down-counter and
// sticky event flag, while the enable, auto-reload and interrupt-enable bits
// come from the control register of the timer.
//
// Behaviour, as in the ARM Cortex-A9 private timer the device replicates:
//  * writing the load register also loads the counter; writing the counter
//    register replaces the count;
//  * on each prescaler tick with the timer enabled the counter decrements
//    while it is above zero;
//  * at a tick with the counter at zero it reloads from the load register if
//    auto-reload is set, else it stays at zero (single shot), so in
//    auto-reload mode the event period is (prescaler+1)*(load+1) cycles;
//  * on the tick that brings the counter to zero, if the interrupt enable bit
//    is set, the sticky event flag is set; it is the interrupt output and is
//    cleared by writing 1 to its status bit (flag_clr). A set wins over a
//    clear in the same cycle.
// Register writes take priority over a tick in the same cycle. All state
// resets to zero (this design's choice).
module timer_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         enable,
  input  logic         auto_reload,
  input  logic         irq_en,
  input  logic         load_we,
  input  logic         cnt_we,
  input  logic [W-1:0] wdata,
  input  logic         flag_clr,
  output logic [W-1:0] load,
  output logic [W-1:0] count,
  output logic         flag
);
  logic hit_zero;

  // the counter becomes zero at this tick (a load of zero in auto-reload
  // mode stays at zero and counts as reaching it on every tick)
  assign hit_zero = tick && enable && !load_we && !cnt_we &&
                    ((count == W'(1)) || (count == '0 && auto_reload && load == '0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      load  <= '0;
      count <= '0;
    end else begin
      if (load_we) load <= wdata;
      if (load_we || cnt_we)
        count <= wdata;
      else if (tick && enable) begin
        if (count != '0)
          count <= count - 1'b1;
        else if (auto_reload)
          count <= load;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                  flag <= 1'b0;
    else if (hit_zero && irq_en) flag <= 1'b1;
    else if (flag_clr)           flag <= 1'b0;
  end
endmodule
