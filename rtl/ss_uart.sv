// ss_uart: self-secured UART.
//
// A UART in the style of the Cadence UART of the Zynq-7000 (programmable baud
// rate, 6/7/8 data bits, 1/1.5/2 stop bits, parity, 64-byte FIFOs, echo and
// loopback modes, modem control) whose data path is split between the two
// TrustZone worlds. It serves two serial terminals, a secure one (rxd_s/txd_s)
// and a non-secure one (rxd_ns/txd_ns), through one shared transmitter and
// one shared receiver:
//   * each world has its own transmit and receive FIFO (four uart_fifo);
//   * the transmitter empties the secure FIFO first and sends each byte on
//     the terminal of its FIFO (uart_tx);
//   * the receiver takes characters from both terminals, lets a secure
//     character pre-empt a non-secure one, and stores each byte in the FIFO
//     of its terminal (uart_rx);
//   * the control and status unit holds the secure and the non-secure
//     register banks and refuses the non-secure world everything but its own
//     FIFOs, triggers, status and interrupt status (uart_ctrl_status);
//   * interrupts of the secure bank leave as `fiq`, those of the non-secure
//     bank as `irq`.
// Baud rate, data format, channel mode and flow control are one set of
// secure registers shared by both terminals; each terminal has its own mode
// switch driven by that setting.
//
// Interface: AXI4-lite slave (register map in uart_ctrl_status), serial and
// modem lines (active high), two interrupt outputs. All logic runs on `clk`,
// which is also the UART reference clock.
module ss_uart #(
  parameter int unsigned ADDR_W     = 7,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic [2:0]        s_axi_awprot,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic [2:0]        s_axi_arprot,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  input  logic              rxd_s,
  output logic              txd_s,
  input  logic              rxd_ns,
  output logic              txd_ns,
  input  logic              cts,
  input  logic              dsr,
  input  logic              ri,
  input  logic              dcd,
  output logic              rts,
  output logic              dtr,
  output logic              fiq,
  output logic              irq
);
  import ss_pkg::*;

  localparam int unsigned LW = $clog2(FIFO_DEPTH + 1);

  // register bus
  logic              wr_en, wr_ns, wr_err, rd_en, rd_ns, rd_err;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [31:0]       wr_data, rd_data;
  logic [3:0]        wr_strb;

  axil_slave #(.ADDR_W(ADDR_W), .DATA_W(32)) u_axi (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awprot, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arprot, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_ns, .wr_err,
    .rd_en, .rd_addr, .rd_ns, .rd_data, .rd_err
  );

  // configuration
  logic [9:0]  mode;
  logic [15:0] cd, bdiv;
  logic [7:0]  rto;
  logic [5:0]  mcr, fdel, rtrig_s, ttrig_s, rtrig_ns, ttrig_ns;
  logic        tx_en, rx_en, tx_rst, rx_rst, rsttout, brk;

  // FIFOs
  logic          txf_wr_s, txf_wr_ns, rxf_rd_s, rxf_rd_ns;
  logic [7:0]    txf_din, rxf_dout_s, rxf_dout_ns, txf_dout_s, txf_dout_ns, rx_wdata;
  logic          rxf_valid_s, rxf_valid_ns, txf_valid_s, txf_valid_ns;
  logic          txf_rd_s, txf_rd_ns, rxf_wr_s, rxf_wr_ns;
  logic [LW-1:0] tl_s, tl_ns, rl_s, rl_ns;
  logic          te_s, tf_s, tn_s, tt_s, to_s, te_ns, tf_ns, tn_ns, tt_ns, to_ns;
  logic          re_s, rf_s, rt_s, re_ns, rf_ns, rt_ns;
  logic          rn_s, rn_ns, ro_s, ro_ns;

  // engines
  logic       baud_sample, baud_tx, baud_rx, rx_resync;
  logic       tx_s_int, tx_ns_int, rx_s_int, rx_ns_int;
  logic       tx_active, tx_sec, rx_active, rx_sec;
  rx_err_t    err_s, err_ns;
  bank_stat_t st_s, st_ns;

  // modem
  logic [8:0] msr, msr_clr;
  logic       dmsi, cts_ok, fdel_hit;

  uart_ctrl_status #(.ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_ns, .wr_err,
    .rd_en, .rd_addr, .rd_ns, .rd_data, .rd_err,
    .mode, .cd, .bdiv, .rto, .mcr, .fdel, .tx_en, .rx_en, .tx_rst, .rx_rst,
    .rsttout, .brk, .rtrig_s, .ttrig_s, .rtrig_ns, .ttrig_ns,
    .txf_wr_s, .txf_wr_ns, .txf_din, .rxf_rd_s, .rxf_rd_ns,
    .rxf_dout_s, .rxf_dout_ns, .rxf_valid_s, .rxf_valid_ns,
    .st_s, .st_ns, .err_s, .err_ns, .fdelt(fdel_hit), .dmsi, .msr, .msr_clr,
    .fiq, .irq
  );

  uart_baud_gen u_baud (
    .clk, .rst_n, .clk_sel(mode[0]), .cd, .bdiv, .rx_resync,
    .baud_sample, .baud_tx, .baud_rx
  );

  uart_fifo #(.DEPTH(FIFO_DEPTH)) u_txf_s (
    .clk, .rst_n, .clr(tx_rst), .wr_en(txf_wr_s), .din(txf_din), .rd_en(txf_rd_s),
    .dout(txf_dout_s), .valid(txf_valid_s), .trig(LW'(ttrig_s)), .level(tl_s),
    .empty(te_s), .full(tf_s), .nfull(tn_s), .trig_hit(tt_s), .ovf(to_s)
  );
  uart_fifo #(.DEPTH(FIFO_DEPTH)) u_txf_ns (
    .clk, .rst_n, .clr(tx_rst), .wr_en(txf_wr_ns), .din(txf_din), .rd_en(txf_rd_ns),
    .dout(txf_dout_ns), .valid(txf_valid_ns), .trig(LW'(ttrig_ns)), .level(tl_ns),
    .empty(te_ns), .full(tf_ns), .nfull(tn_ns), .trig_hit(tt_ns), .ovf(to_ns)
  );
  uart_fifo #(.DEPTH(FIFO_DEPTH)) u_rxf_s (
    .clk, .rst_n, .clr(rx_rst), .wr_en(rxf_wr_s), .din(rx_wdata), .rd_en(rxf_rd_s),
    .dout(rxf_dout_s), .valid(rxf_valid_s), .trig(LW'(rtrig_s)), .level(rl_s),
    .empty(re_s), .full(rf_s), .nfull(rn_s), .trig_hit(rt_s), .ovf(ro_s)
  );
  uart_fifo #(.DEPTH(FIFO_DEPTH)) u_rxf_ns (
    .clk, .rst_n, .clr(rx_rst), .wr_en(rxf_wr_ns), .din(rx_wdata), .rd_en(rxf_rd_ns),
    .dout(rxf_dout_ns), .valid(rxf_valid_ns), .trig(LW'(rtrig_ns)), .level(rl_ns),
    .empty(re_ns), .full(rf_ns), .nfull(rn_ns), .trig_hit(rt_ns), .ovf(ro_ns)
  );

  uart_tx u_tx (
    .clk, .rst_n, .clr(tx_rst), .tx_en, .baud_tx, .mode, .brk, .cts_ok,
    .empty_s(te_s), .empty_ns(te_ns), .rd_s(txf_rd_s), .rd_ns(txf_rd_ns),
    .valid_s(txf_valid_s), .valid_ns(txf_valid_ns),
    .dout_s(txf_dout_s), .dout_ns(txf_dout_ns),
    .tx_s(tx_s_int), .tx_ns(tx_ns_int), .active(tx_active), .active_sec(tx_sec)
  );

  uart_rx u_rx (
    .clk, .rst_n, .clr(rx_rst), .rx_en, .baud_sample, .baud_rx, .rx_resync,
    .bdiv, .mode, .rxd_s(rx_s_int), .rxd_ns(rx_ns_int), .rto, .rsttout,
    .full_s(rf_s), .full_ns(rf_ns), .wr_s(rxf_wr_s), .wr_ns(rxf_wr_ns),
    .wdata(rx_wdata), .err_s, .err_ns, .active(rx_active), .active_sec(rx_sec)
  );

  uart_mode_switch u_ms_s (
    .chmode(chmode_e'(mode[9:8])), .rxd_pin(rxd_s), .txd_pin(txd_s),
    .tx_int(tx_s_int), .rx_int(rx_s_int)
  );
  uart_mode_switch u_ms_ns (
    .chmode(chmode_e'(mode[9:8])), .rxd_pin(rxd_ns), .txd_pin(txd_ns),
    .tx_int(tx_ns_int), .rx_int(rx_ns_int)
  );

  uart_modem u_modem (
    .clk, .rst_n, .mcr, .fdel,
    .rx_level(7'(rl_s > rl_ns ? rl_s : rl_ns)),
    .msr_clr, .cts, .dsr, .ri, .dcd, .rts, .dtr, .msr, .dmsi, .cts_ok, .fdel_hit
  );

  always_comb begin
    st_s = '{rtrig: rt_s, rempty: re_s, rfull: rf_s, tempty: te_s, tfull: tf_s,
             ttrig: tt_s, tnfull: tn_s, tovr: to_s,
             ractive: rx_active && rx_sec, tactive: tx_active && tx_sec};
    st_ns = '{rtrig: rt_ns, rempty: re_ns, rfull: rf_ns, tempty: te_ns, tfull: tf_ns,
              ttrig: tt_ns, tnfull: tn_ns, tovr: to_ns,
              ractive: rx_active && !rx_sec, tactive: tx_active && !tx_sec};
  end
endmodule
