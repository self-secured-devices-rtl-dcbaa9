// uart_ctrl_status: control and status unit of the self-secured UART.
//
// Holds the device's AXI registers in two banks and enforces the TrustZone
// split with the non-secure bit of each access (`wr_ns`/`rd_ns` from
// axil_slave):
//   secure bank, secure world only (anything else answers SLVERR):
//     0x00 control, 0x04 mode, 0x08 IER, 0x0C IDR, 0x10 IMR (RO), 0x14 ISR,
//     0x18 baud generator, 0x1C receiver timeout, 0x20 Rx trigger,
//     0x24 modem control, 0x2C channel status (RO), 0x30 Tx FIFO,
//     0x34 baud divider, 0x38 flow delay, 0x3C Tx trigger, 0x40 Rx FIFO
//   shared by both worlds:
//     0x28 modem status (one copy)
//     0x44 NS Rx trigger, 0x48 NS Tx trigger, 0x4C NS Rx FIFO,
//     0x50 NS Tx FIFO, 0x54 NS ISR, 0x58 NS channel status (RO)
// Writing a Tx FIFO register pushes its low byte into that bank's transmit
// FIFO; reading an Rx FIFO register pops that bank's receive FIFO (0 when
// empty). The secure-only registers, which set data format, baud rate,
// channel mode, flow control, enables and interrupt masks, cannot be touched
// by the non-secure world; it only reaches its own FIFOs, triggers, status
// and interrupt status.
//
// Control register: bits 0/1 receiver/transmitter soft reset (self-clearing
// pulses that also empty the FIFOs), 2/3 Rx enable/disable, 4/5 Tx
// enable/disable, 6 restart receiver timeout (self-clearing), 7/8 start/stop
// break. The transmitter runs when enable=1 and disable=0; break is requested
// while start=1 and stop=0.
//
// Interrupts (bit positions of IER/IDR/IMR/ISR): 0 Rx trigger, 1 Rx empty,
// 2 Rx full, 3 Tx empty, 4 Tx full, 5 Rx overflow, 6 framing, 7 parity,
// 8 timeout, 9 modem status change, 10 Tx trigger, 11 Tx nearly full, 12 Tx
// overflow. Writing 1s to IER sets mask bits, writing 1s to IDR clears them,
// IMR reads the mask. An ISR bit is set on the rising edge of its event while
// the mask bit is set and is cleared by writing 1. The secure ISR collects the
// events of the secure FIFOs, receiver errors of secure characters and modem
// status changes and drives `fiq`; the non-secure ISR collects those of the
// non-secure FIFOs and characters and drives `irq`. The mask is shared and
// secure-only. Mask semantics, write-1-to-clear, modem changes going to the
// secure side and the reset values (those of the Cadence UART) are this
// design's reading of the original device.
//
// Timing: every output is registered or decoded from registers; the read
// mux is sampled by axil_slave one cycle after `rd_en`. Read data bits
// 31..16 are always 0 (no register is wider than 16 bits), as are modem
// control bits 4..2, which the original UART leaves reserved.
module uart_ctrl_status #(
  parameter int unsigned ADDR_W = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [31:0]       wr_data,
  input  logic [3:0]        wr_strb,
  input  logic              wr_ns,
  output logic              wr_err,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_ns,
  output logic [31:0]       rd_data,
  output logic              rd_err,
  // configuration
  output logic [9:0]        mode,
  output logic [15:0]       cd,
  output logic [15:0]       bdiv,
  output logic [7:0]        rto,
  output logic [5:0]        mcr,
  output logic [5:0]        fdel,
  output logic              tx_en,
  output logic              rx_en,
  output logic              tx_rst,
  output logic              rx_rst,
  output logic              rsttout,
  output logic              brk,
  output logic [5:0]        rtrig_s,
  output logic [5:0]        ttrig_s,
  output logic [5:0]        rtrig_ns,
  output logic [5:0]        ttrig_ns,
  // FIFO data
  output logic              txf_wr_s,
  output logic              txf_wr_ns,
  output logic [7:0]        txf_din,
  output logic              rxf_rd_s,
  output logic              rxf_rd_ns,
  input  logic [7:0]        rxf_dout_s,
  input  logic [7:0]        rxf_dout_ns,
  input  logic              rxf_valid_s,
  input  logic              rxf_valid_ns,
  // status and events
  input  ss_pkg::bank_stat_t st_s,
  input  ss_pkg::bank_stat_t st_ns,
  input  ss_pkg::rx_err_t   err_s,
  input  ss_pkg::rx_err_t   err_ns,
  input  logic              fdelt,
  input  logic              dmsi,
  input  logic [8:0]        msr,
  output logic [8:0]        msr_clr,
  // interrupts
  output logic              fiq,
  output logic              irq
);
  import ss_pkg::*;

  logic [31:0] cr;
  logic [N_IRQ-1:0] imr, isr_s, isr_ns, ev_s, ev_ns, prev_s, prev_ns;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++)
      if (strb[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  // ---------------- access decode ----------------
  function automatic logic is_shared(input logic [ADDR_W-1:0] a);
    return a == ADDR_W'(U_MSR)      || a == ADDR_W'(U_NS_RTRIG)  ||
           a == ADDR_W'(U_NS_TTRIG) || a == ADDR_W'(U_NS_RXFIFO) ||
           a == ADDR_W'(U_NS_TXFIFO)|| a == ADDR_W'(U_NS_ISR)    ||
           a == ADDR_W'(U_NS_SR);
  endfunction

  function automatic logic is_secure(input logic [ADDR_W-1:0] a);
    return a[1:0] == 2'b00 && 32'(a) <= U_RXFIFO && a != ADDR_W'(U_MSR);
  endfunction

  function automatic logic denied(input logic [ADDR_W-1:0] a, input logic ns);
    return !(is_shared(a) || (!ns && is_secure(a)));
  endfunction

  assign wr_err = denied(wr_addr, wr_ns);
  assign rd_err = denied(rd_addr, rd_ns);

  logic wr_ok, rd_ok;
  assign wr_ok = wr_en && !wr_err;
  assign rd_ok = rd_en && !rd_err;

  function automatic logic wsel(input logic ok, input logic [ADDR_W-1:0] a, input int unsigned off);
    return ok && a == ADDR_W'(off);
  endfunction

  logic [31:0] wcr, wmode, wcd, wbdiv, wrto, wmcr, wfdel, wrts, wtts, wrtn, wttn;
  assign wcr   = merge(cr, wr_data, wr_strb);
  assign wmode = merge(32'(mode), wr_data, wr_strb);
  assign wcd   = merge(32'(cd), wr_data, wr_strb);
  assign wbdiv = merge(32'(bdiv), wr_data, wr_strb);
  assign wrto  = merge(32'(rto), wr_data, wr_strb);
  assign wmcr  = merge(32'(mcr), wr_data, wr_strb);
  assign wfdel = merge(32'(fdel), wr_data, wr_strb);
  assign wrts  = merge(32'(rtrig_s), wr_data, wr_strb);
  assign wtts  = merge(32'(ttrig_s), wr_data, wr_strb);
  assign wrtn  = merge(32'(rtrig_ns), wr_data, wr_strb);
  assign wttn  = merge(32'(ttrig_ns), wr_data, wr_strb);

  logic [31:0] w1;   // bytes written as ones, for set/clear registers
  assign w1 = wr_data & {{8{wr_strb[3]}}, {8{wr_strb[2]}}, {8{wr_strb[1]}}, {8{wr_strb[0]}}};

  // ---------------- configuration registers ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cr       <= 32'h0000_0128;
      mode     <= '0;
      cd       <= 16'd651;
      bdiv     <= 16'd15;
      rto      <= '0;
      mcr      <= '0;
      fdel     <= '0;
      rtrig_s  <= 6'd32;
      ttrig_s  <= 6'd32;
      rtrig_ns <= 6'd32;
      ttrig_ns <= 6'd32;
      imr      <= '0;
      tx_rst   <= 1'b0;
      rx_rst   <= 1'b0;
      rsttout  <= 1'b0;
    end else begin
      tx_rst  <= 1'b0;
      rx_rst  <= 1'b0;
      rsttout <= 1'b0;
      if (wsel(wr_ok, wr_addr, U_CR)) begin
        cr      <= wcr & 32'h0000_01BC;   // reset and timeout-restart bits self-clear
        rx_rst  <= wcr[CR_RXRES];
        tx_rst  <= wcr[CR_TXRES];
        rsttout <= wcr[CR_RSTTO];
      end
      if (wsel(wr_ok, wr_addr, U_MR))      mode     <= wmode[9:0];
      if (wsel(wr_ok, wr_addr, U_BAUDGEN)) cd       <= wcd[15:0];
      if (wsel(wr_ok, wr_addr, U_BDIV))    bdiv     <= wbdiv[15:0];
      if (wsel(wr_ok, wr_addr, U_RTO))     rto      <= wrto[7:0];
      if (wsel(wr_ok, wr_addr, U_MCR))     mcr      <= wmcr[5:0] & 6'b10_0011;
      if (wsel(wr_ok, wr_addr, U_FDEL))    fdel     <= wfdel[5:0];
      if (wsel(wr_ok, wr_addr, U_RTRIG))   rtrig_s  <= wrts[5:0];
      if (wsel(wr_ok, wr_addr, U_TTRIG))   ttrig_s  <= wtts[5:0];
      if (wsel(wr_ok, wr_addr, U_NS_RTRIG))rtrig_ns <= wrtn[5:0];
      if (wsel(wr_ok, wr_addr, U_NS_TTRIG))ttrig_ns <= wttn[5:0];
      if (wsel(wr_ok, wr_addr, U_IER))     imr      <= imr | w1[N_IRQ-1:0];
      else if (wsel(wr_ok, wr_addr, U_IDR))imr      <= imr & ~w1[N_IRQ-1:0];
    end
  end

  assign tx_en = cr[CR_TXEN] && !cr[CR_TXDIS];
  assign rx_en = cr[CR_RXEN] && !cr[CR_RXDIS];
  assign brk   = cr[CR_STTBRK] && !cr[CR_STPBRK];

  // ---------------- FIFO access ----------------
  assign txf_din   = wr_data[7:0];
  assign txf_wr_s  = wsel(wr_ok, wr_addr, U_TXFIFO)    && wr_strb[0];
  assign txf_wr_ns = wsel(wr_ok, wr_addr, U_NS_TXFIFO) && wr_strb[0];
  assign rxf_rd_s  = wsel(rd_ok, rd_addr, U_RXFIFO);
  assign rxf_rd_ns = wsel(rd_ok, rd_addr, U_NS_RXFIFO);

  assign msr_clr = wsel(wr_ok, wr_addr, U_MSR) ? w1[8:0] : '0;

  // ---------------- interrupts ----------------
  function automatic logic [N_IRQ-1:0] events(input bank_stat_t st, input rx_err_t e,
                                              input logic ms);
    logic [N_IRQ-1:0] v;
    v = '0;
    v[IX_RTRIG]   = st.rtrig;
    v[IX_REMPTY]  = st.rempty;
    v[IX_RFULL]   = st.rfull;
    v[IX_TEMPTY]  = st.tempty;
    v[IX_TFULL]   = st.tfull;
    v[IX_ROVR]    = e.ovr;
    v[IX_FRAME]   = e.frame;
    v[IX_PARE]    = e.par;
    v[IX_TIMEOUT] = e.tout;
    v[IX_DMSI]    = ms;
    v[IX_TTRIG]   = st.ttrig;
    v[IX_TNFULL]  = st.tnfull;
    v[IX_TOVR]    = st.tovr;
    return v;
  endfunction

  assign ev_s  = events(st_s, err_s, dmsi);
  assign ev_ns = events(st_ns, err_ns, 1'b0);

  logic [N_IRQ-1:0] clr_s, clr_ns;
  assign clr_s  = wsel(wr_ok, wr_addr, U_ISR)    ? w1[N_IRQ-1:0] : '0;
  assign clr_ns = wsel(wr_ok, wr_addr, U_NS_ISR) ? w1[N_IRQ-1:0] : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_s  <= '0;
      prev_ns <= '0;
      isr_s   <= '0;
      isr_ns  <= '0;
    end else begin
      prev_s  <= ev_s;
      prev_ns <= ev_ns;
      isr_s   <= (isr_s  & ~clr_s)  | (ev_s  & ~prev_s  & imr);
      isr_ns  <= (isr_ns & ~clr_ns) | (ev_ns & ~prev_ns & imr);
    end
  end

  assign fiq = |isr_s;
  assign irq = |isr_ns;

  // ---------------- read mux ----------------
  function automatic logic [31:0] chan_status(input bank_stat_t st, input logic fd);
    logic [31:0] v;
    v = '0;
    v[SR_RTRIG]   = st.rtrig;
    v[SR_REMPTY]  = st.rempty;
    v[SR_RFULL]   = st.rfull;
    v[SR_TEMPTY]  = st.tempty;
    v[SR_TFULL]   = st.tfull;
    v[SR_RACTIVE] = st.ractive;
    v[SR_TACTIVE] = st.tactive;
    v[SR_FDELT]   = fd;
    v[SR_TTRIG]   = st.ttrig;
    v[SR_TNFULL]  = st.tnfull;
    return v;
  endfunction

  always_comb begin
    rd_data = '0;
    case (32'(rd_addr))
      U_CR:        rd_data = cr;
      U_MR:        rd_data = 32'(mode);
      U_IMR:       rd_data = 32'(imr);
      U_ISR:       rd_data = 32'(isr_s);
      U_BAUDGEN:   rd_data = 32'(cd);
      U_RTO:       rd_data = 32'(rto);
      U_RTRIG:     rd_data = 32'(rtrig_s);
      U_MCR:       rd_data = 32'(mcr);
      U_MSR:       rd_data = 32'(msr);
      U_SR:        rd_data = chan_status(st_s, fdelt);
      U_BDIV:      rd_data = 32'(bdiv);
      U_FDEL:      rd_data = 32'(fdel);
      U_TTRIG:     rd_data = 32'(ttrig_s);
      U_RXFIFO:    rd_data = rxf_valid_s ? 32'(rxf_dout_s) : '0;
      U_NS_RTRIG:  rd_data = 32'(rtrig_ns);
      U_NS_TTRIG:  rd_data = 32'(ttrig_ns);
      U_NS_RXFIFO: rd_data = rxf_valid_ns ? 32'(rxf_dout_ns) : '0;
      U_NS_ISR:    rd_data = 32'(isr_ns);
      U_NS_SR:     rd_data = chan_status(st_ns, 1'b0);
      default:     rd_data = '0;
    endcase
  end

  // Non-secure accesses never reach the secure bank.
  a_ns_isolated: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en && wr_ns |-> !txf_wr_s && clr_s == '0);
endmodule
