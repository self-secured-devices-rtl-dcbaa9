// axil_slave: AXI4-lite slave front end shared by the self-secured timer and
// the self-secured UART.
//
// It turns each AXI4-lite transaction into a one-cycle strobe on a simple
// register bus and carries the TrustZone non-secure bit, AWPROT[1] for writes
// and ARPROT[1] for reads, along with the address. The register file behind it
// decides, from that bit and the address, whether the access is allowed; a
// denied access is answered with SLVERR and, for reads, zero data. Answering
// with SLVERR rather than failing silently is this design's choice; the
// protocol leaves it to the implementation.
//
// Timing (one transaction per channel at a time, write address and data are
// taken together):
//   write: cycle T  AWVALID&WVALID seen, AWREADY=WREADY=1, address/data latched
//          cycle T+1 wr_en=1 with the latched fields; wr_err sampled
//          cycle T+2 BVALID=1 until BREADY
//   read:  cycle T  ARVALID seen, ARREADY=1, address latched
//          cycle T+1 rd_en=1 (a FIFO register pops here)
//          cycle T+2 rd_data/rd_err sampled (rd_addr still held)
//          cycle T+3 RVALID=1 until RREADY
//          rd_data is sampled one cycle after rd_en so that a FIFO with a
//          registered output can deliver its byte.
module axil_slave #(
  parameter int unsigned ADDR_W = 7,
  parameter int unsigned DATA_W = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AXI4-lite slave
  input  logic [ADDR_W-1:0]     s_axi_awaddr,
  input  logic [2:0]            s_axi_awprot,
  input  logic                  s_axi_awvalid,
  output logic                  s_axi_awready,
  input  logic [DATA_W-1:0]     s_axi_wdata,
  input  logic [DATA_W/8-1:0]   s_axi_wstrb,
  input  logic                  s_axi_wvalid,
  output logic                  s_axi_wready,
  output logic [1:0]            s_axi_bresp,
  output logic                  s_axi_bvalid,
  input  logic                  s_axi_bready,
  input  logic [ADDR_W-1:0]     s_axi_araddr,
  input  logic [2:0]            s_axi_arprot,
  input  logic                  s_axi_arvalid,
  output logic                  s_axi_arready,
  output logic [DATA_W-1:0]     s_axi_rdata,
  output logic [1:0]            s_axi_rresp,
  output logic                  s_axi_rvalid,
  input  logic                  s_axi_rready,
  // register bus
  output logic                  wr_en,
  output logic [ADDR_W-1:0]     wr_addr,
  output logic [DATA_W-1:0]     wr_data,
  output logic [DATA_W/8-1:0]   wr_strb,
  output logic                  wr_ns,
  input  logic                  wr_err,
  output logic                  rd_en,
  output logic [ADDR_W-1:0]     rd_addr,
  output logic                  rd_ns,
  input  logic [DATA_W-1:0]     rd_data,
  input  logic                  rd_err
);
  import ss_pkg::*;

  typedef enum logic [1:0] {CH_IDLE, CH_STROBE, CH_SAMPLE, CH_RESP} ch_state_e;

  ch_state_e wst, rst;

  // ---------------- write channel ----------------
  assign s_axi_awready = (wst == CH_IDLE) && s_axi_awvalid && s_axi_wvalid;
  assign s_axi_wready  = s_axi_awready;
  assign wr_en         = (wst == CH_STROBE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst          <= CH_IDLE;
      wr_addr      <= '0;
      wr_data      <= '0;
      wr_strb      <= '0;
      wr_ns        <= 1'b1;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= RESP_OKAY;
    end else begin
      unique case (wst)
        CH_IDLE: if (s_axi_awready) begin
          wr_addr <= s_axi_awaddr;
          wr_data <= s_axi_wdata;
          wr_strb <= s_axi_wstrb;
          wr_ns   <= s_axi_awprot[1];
          wst     <= CH_STROBE;
        end
        CH_STROBE: begin
          s_axi_bresp  <= wr_err ? RESP_SLVERR : RESP_OKAY;
          s_axi_bvalid <= 1'b1;
          wst          <= CH_RESP;
        end
        CH_RESP: if (s_axi_bready) begin
          s_axi_bvalid <= 1'b0;
          wst          <= CH_IDLE;
        end
        default: wst <= CH_IDLE;
      endcase
    end
  end

  // ---------------- read channel ----------------
  assign s_axi_arready = (rst == CH_IDLE);
  assign rd_en         = (rst == CH_STROBE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rst          <= CH_IDLE;
      rd_addr      <= '0;
      rd_ns        <= 1'b1;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= RESP_OKAY;
    end else begin
      unique case (rst)
        CH_IDLE: if (s_axi_arvalid) begin
          rd_addr <= s_axi_araddr;
          rd_ns   <= s_axi_arprot[1];
          rst     <= CH_STROBE;
        end
        CH_STROBE: rst <= CH_SAMPLE;
        CH_SAMPLE: begin
          s_axi_rdata  <= rd_err ? '0 : rd_data;
          s_axi_rresp  <= rd_err ? RESP_SLVERR : RESP_OKAY;
          s_axi_rvalid <= 1'b1;
          rst          <= CH_RESP;
        end
        CH_RESP: if (s_axi_rready) begin
          s_axi_rvalid <= 1'b0;
          rst          <= CH_IDLE;
        end
        default: rst <= CH_IDLE;
      endcase
    end
  end

  // A response, once offered, stays until the master takes it.
  property p_hold(valid, ready);
    @(posedge clk) disable iff (!rst_n) valid && !ready |=> valid;
  endproperty
  a_bvalid_hold: assert property (p_hold(s_axi_bvalid, s_axi_bready));
  a_rvalid_hold: assert property (p_hold(s_axi_rvalid, s_axi_rready));
  a_rdata_stable: assert property (@(posedge clk) disable iff (!rst_n)
                    s_axi_rvalid && !s_axi_rready |=> $stable(s_axi_rdata));

endmodule
