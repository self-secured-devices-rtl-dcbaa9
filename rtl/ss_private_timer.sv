// ss_private_timer: self-secured private timer, default approach.
//
// A replica of the Cortex-A9 private timer (32-bit down-counter, load value,
// single-shot or auto-reload, 8-bit prescaler) whose counting part is
// duplicated into a secure and a non-secure bank. The TrustZone non-secure bit
// of each AXI access (AWPROT[1] for writes, ARPROT[1] for reads) selects what
// the access may reach:
//
//   offset  register                     secure world      non-secure world
//   0x00    secure load                  read/write        denied (SLVERR)
//   0x04    secure counter               read/write        denied (SLVERR)
//   0x08    control                      all bits          only bits 3,4
//   0x0C    interrupt status (W1C)       both flags        only bit 1
//   0x10    non-secure load              read/write        read/write
//   0x14    non-secure counter           read/write        read/write
//
// Control register: bit 0 secure enable, bit 1 secure auto-reload, bit 2
// secure IRQ enable, bits 15..8 prescaler (these follow the original timer);
// bit 3 non-secure enable, bit 4 non-secure auto-reload and bit 5 non-secure
// IRQ enable are the extension, and their positions are this design's choice.
// The prescaler and both IRQ enables can only be changed by the secure world;
// a non-secure write to the control register changes only bits 3 and 4 and
// is otherwise ignored, and a non-secure read shows only those bits. Interrupt
// status: bit 0 secure event flag, driving `fiq`; bit 1 non-secure event
// flag, driving `irq`; each is cleared by writing 1.
//
// Timing: AXI4-lite through axil_slave (write response two cycles after the
// handshake, read data three cycles after). Counters tick every
// (prescaler+1) cycles; interrupts are registered flags.
module ss_private_timer #(
  parameter int unsigned ADDR_W  = 5,
  parameter int unsigned W       = 32,
  parameter int unsigned PRESC_W = 8
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
  output logic              fiq,
  output logic              irq
);
  import ss_pkg::*;

  logic              wr_en, wr_ns, wr_err, rd_en, rd_ns, rd_err;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [31:0]       wr_data, rd_data, wdata_m;
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

  // control register fields
  logic               en_s, ar_s, irqen_s, en_ns, ar_ns, irqen_ns;
  logic [PRESC_W-1:0] presc;
  logic               tick;

  logic [W-1:0] load_s, cnt_s, load_ns, cnt_ns;
  logic         flag_s, flag_ns;

  // Old register value with the written bytes replaced.
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++)
      if (strb[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  // ---------------- access decode ----------------
  function automatic logic known(input logic [ADDR_W-1:0] a);
    return a == ADDR_W'(TMR_LOAD_S) || a == ADDR_W'(TMR_CNT_S) ||
           a == ADDR_W'(TMR_CTRL)   || a == ADDR_W'(TMR_ISR)   ||
           a == ADDR_W'(TMR_LOAD_NS)|| a == ADDR_W'(TMR_CNT_NS);
  endfunction

  // secure-bank registers are closed to the non-secure world
  function automatic logic denied(input logic [ADDR_W-1:0] a, input logic ns);
    return !known(a) || (ns && (a == ADDR_W'(TMR_LOAD_S) || a == ADDR_W'(TMR_CNT_S)));
  endfunction

  assign wr_err = denied(wr_addr, wr_ns);
  assign rd_err = denied(rd_addr, rd_ns);

  logic wr_ok;
  assign wr_ok = wr_en && !wr_err;

  logic [31:0] ctrl_q;
  always_comb begin
    ctrl_q = '0;
    ctrl_q[TC_EN]       = en_s;
    ctrl_q[TC_AR]       = ar_s;
    ctrl_q[TC_IRQEN]    = irqen_s;
    ctrl_q[TC_EN_NS]    = en_ns;
    ctrl_q[TC_AR_NS]    = ar_ns;
    ctrl_q[TC_IRQEN_NS] = irqen_ns;
    ctrl_q[TC_PRESC_LO +: PRESC_W] = presc;
  end

  assign wdata_m = merge(ctrl_q, wr_data, wr_strb);

  // W-bit value written into a counter bank register
  logic [31:0] wval_load_s, wval_cnt_s, wval_load_ns, wval_cnt_ns;
  assign wval_load_s  = merge(32'(load_s),  wr_data, wr_strb);
  assign wval_cnt_s   = merge(32'(cnt_s),   wr_data, wr_strb);
  assign wval_load_ns = merge(32'(load_ns), wr_data, wr_strb);
  assign wval_cnt_ns  = merge(32'(cnt_ns),  wr_data, wr_strb);

  logic we_load_s, we_cnt_s, we_load_ns, we_cnt_ns, we_ctrl, we_isr;
  assign we_load_s  = wr_ok && wr_addr == ADDR_W'(TMR_LOAD_S);
  assign we_cnt_s   = wr_ok && wr_addr == ADDR_W'(TMR_CNT_S);
  assign we_ctrl    = wr_ok && wr_addr == ADDR_W'(TMR_CTRL);
  assign we_isr     = wr_ok && wr_addr == ADDR_W'(TMR_ISR);
  assign we_load_ns = wr_ok && wr_addr == ADDR_W'(TMR_LOAD_NS);
  assign we_cnt_ns  = wr_ok && wr_addr == ADDR_W'(TMR_CNT_NS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {en_s, ar_s, irqen_s, en_ns, ar_ns, irqen_ns} <= '0;
      presc <= '0;
    end else if (we_ctrl) begin
      // both worlds reach the non-secure banked enable and auto-reload bits
      en_ns <= wdata_m[TC_EN_NS];
      ar_ns <= wdata_m[TC_AR_NS];
      if (!wr_ns) begin
        en_s     <= wdata_m[TC_EN];
        ar_s     <= wdata_m[TC_AR];
        irqen_s  <= wdata_m[TC_IRQEN];
        irqen_ns <= wdata_m[TC_IRQEN_NS];
        presc    <= wdata_m[TC_PRESC_LO +: PRESC_W];
      end
    end
  end

  // interrupt status: write 1 to clear; the secure flag only from the secure world
  logic clr_s, clr_ns;
  assign clr_s  = we_isr && !wr_ns && wr_strb[0] && wr_data[TI_S];
  assign clr_ns = we_isr && wr_strb[0] && wr_data[TI_NS];

  timer_prescaler #(.PRESC_W(PRESC_W)) u_presc (
    .clk, .rst_n, .prescaler(presc), .tick
  );

  timer_counter #(.W(W)) u_cnt_s (
    .clk, .rst_n, .tick, .enable(en_s), .auto_reload(ar_s), .irq_en(irqen_s),
    .load_we(we_load_s), .cnt_we(we_cnt_s),
    .wdata(we_load_s ? W'(wval_load_s) : W'(wval_cnt_s)),
    .flag_clr(clr_s), .load(load_s), .count(cnt_s), .flag(flag_s)
  );

  timer_counter #(.W(W)) u_cnt_ns (
    .clk, .rst_n, .tick, .enable(en_ns), .auto_reload(ar_ns), .irq_en(irqen_ns),
    .load_we(we_load_ns), .cnt_we(we_cnt_ns),
    .wdata(we_load_ns ? W'(wval_load_ns) : W'(wval_cnt_ns)),
    .flag_clr(clr_ns), .load(load_ns), .count(cnt_ns), .flag(flag_ns)
  );

  assign fiq = flag_s;
  assign irq = flag_ns;

  // ---------------- read mux ----------------
  always_comb begin
    rd_data = '0;
    case (32'(rd_addr))
      TMR_LOAD_S:  rd_data = 32'(load_s);
      TMR_CNT_S:   rd_data = 32'(cnt_s);
      TMR_CTRL: begin
        if (rd_ns) begin
          rd_data[TC_EN_NS] = en_ns;
          rd_data[TC_AR_NS] = ar_ns;
        end else
          rd_data = ctrl_q;
      end
      TMR_ISR: begin
        rd_data[TI_NS] = flag_ns;
        if (!rd_ns) rd_data[TI_S] = flag_s;
      end
      TMR_LOAD_NS: rd_data = 32'(load_ns);
      TMR_CNT_NS:  rd_data = 32'(cnt_ns);
      default:     rd_data = '0;
    endcase
  end

  // The non-secure world never changes secure state.
  a_ns_no_secure_write: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en && wr_ns |-> !we_load_s && !we_cnt_s && !clr_s);

endmodule
