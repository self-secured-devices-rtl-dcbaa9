// ss_devices_top: programmable-logic side of a TrustZone system with two
// self-secured devices.
//
// A self-secured device lets the secure and the non-secure world share one
// peripheral without a hypervisor in the access path: the device itself keeps
// a secure and a non-secure register bank, checks the TrustZone non-secure
// bit (AxPROT[1]) of every AXI access, refuses the non-secure world the
// secure bank, and raises secure events as FIQ and non-secure events as IRQ.
// This top holds the two devices of the design side by side:
//   * ss_private_timer - a Cortex-A9-style private timer with a secure and a
//     non-secure counter (low-complexity example);
//   * ss_uart          - a Cadence-style UART serving a secure and a
//     non-secure serial terminal (medium-complexity example).
// Each has its own AXI4-lite slave port (addresses are offsets within the
// device); in a Zynq system both sit behind the AXI interconnect on the
// processor's general-purpose master port, and the four interrupt lines go
// to the PL-to-PS interrupt inputs of the GIC, which routes FIQs to the secure
// world and IRQs to the non-secure world. The processor, interconnect and
// reset block are outside this RTL. One clock and one active-low synchronous
// reset serve both devices.
module ss_devices_top #(
  parameter int unsigned TMR_ADDR_W  = 5,
  parameter int unsigned UART_ADDR_W = 7,
  parameter int unsigned FIFO_DEPTH  = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // private timer AXI4-lite slave
  input  logic [TMR_ADDR_W-1:0]  tmr_awaddr,
  input  logic [2:0]             tmr_awprot,
  input  logic                   tmr_awvalid,
  output logic                   tmr_awready,
  input  logic [31:0]            tmr_wdata,
  input  logic [3:0]             tmr_wstrb,
  input  logic                   tmr_wvalid,
  output logic                   tmr_wready,
  output logic [1:0]             tmr_bresp,
  output logic                   tmr_bvalid,
  input  logic                   tmr_bready,
  input  logic [TMR_ADDR_W-1:0]  tmr_araddr,
  input  logic [2:0]             tmr_arprot,
  input  logic                   tmr_arvalid,
  output logic                   tmr_arready,
  output logic [31:0]            tmr_rdata,
  output logic [1:0]             tmr_rresp,
  output logic                   tmr_rvalid,
  input  logic                   tmr_rready,
  // UART AXI4-lite slave
  input  logic [UART_ADDR_W-1:0] uart_awaddr,
  input  logic [2:0]             uart_awprot,
  input  logic                   uart_awvalid,
  output logic                   uart_awready,
  input  logic [31:0]            uart_wdata,
  input  logic [3:0]             uart_wstrb,
  input  logic                   uart_wvalid,
  output logic                   uart_wready,
  output logic [1:0]             uart_bresp,
  output logic                   uart_bvalid,
  input  logic                   uart_bready,
  input  logic [UART_ADDR_W-1:0] uart_araddr,
  input  logic [2:0]             uart_arprot,
  input  logic                   uart_arvalid,
  output logic                   uart_arready,
  output logic [31:0]            uart_rdata,
  output logic [1:0]             uart_rresp,
  output logic                   uart_rvalid,
  input  logic                   uart_rready,
  // interrupts to the processing system
  output logic                   tmr_fiq,
  output logic                   tmr_irq,
  output logic                   uart_fiq,
  output logic                   uart_irq,
  // UART terminals and modem lines
  input  logic                   rxd_s,
  output logic                   txd_s,
  input  logic                   rxd_ns,
  output logic                   txd_ns,
  input  logic                   cts,
  input  logic                   dsr,
  input  logic                   ri,
  input  logic                   dcd,
  output logic                   rts,
  output logic                   dtr
);

  ss_private_timer #(.ADDR_W(TMR_ADDR_W)) u_timer (
    .clk, .rst_n,
    .s_axi_awaddr(tmr_awaddr), .s_axi_awprot(tmr_awprot), .s_axi_awvalid(tmr_awvalid),
    .s_axi_awready(tmr_awready), .s_axi_wdata(tmr_wdata), .s_axi_wstrb(tmr_wstrb),
    .s_axi_wvalid(tmr_wvalid), .s_axi_wready(tmr_wready), .s_axi_bresp(tmr_bresp),
    .s_axi_bvalid(tmr_bvalid), .s_axi_bready(tmr_bready), .s_axi_araddr(tmr_araddr),
    .s_axi_arprot(tmr_arprot), .s_axi_arvalid(tmr_arvalid), .s_axi_arready(tmr_arready),
    .s_axi_rdata(tmr_rdata), .s_axi_rresp(tmr_rresp), .s_axi_rvalid(tmr_rvalid),
    .s_axi_rready(tmr_rready),
    .fiq(tmr_fiq), .irq(tmr_irq)
  );

  ss_uart #(.ADDR_W(UART_ADDR_W), .FIFO_DEPTH(FIFO_DEPTH)) u_uart (
    .clk, .rst_n,
    .s_axi_awaddr(uart_awaddr), .s_axi_awprot(uart_awprot), .s_axi_awvalid(uart_awvalid),
    .s_axi_awready(uart_awready), .s_axi_wdata(uart_wdata), .s_axi_wstrb(uart_wstrb),
    .s_axi_wvalid(uart_wvalid), .s_axi_wready(uart_wready), .s_axi_bresp(uart_bresp),
    .s_axi_bvalid(uart_bvalid), .s_axi_bready(uart_bready), .s_axi_araddr(uart_araddr),
    .s_axi_arprot(uart_arprot), .s_axi_arvalid(uart_arvalid), .s_axi_arready(uart_arready),
    .s_axi_rdata(uart_rdata), .s_axi_rresp(uart_rresp), .s_axi_rvalid(uart_rvalid),
    .s_axi_rready(uart_rready),
    .rxd_s, .txd_s, .rxd_ns, .txd_ns, .cts, .dsr, .ri, .dcd, .rts, .dtr,
    .fiq(uart_fiq), .irq(uart_irq)
  );
endmodule
