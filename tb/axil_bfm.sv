// axil_bfm: AXI4-lite master bus-functional model used by the testbenches.
//
// Drives one transaction at a time. `write` presents address and data
// together and waits for the write response; `read` waits for the read data.
// `ns` sets AxPROT[1], the TrustZone non-secure bit; AxPROT[0] and [2] stay 0.
// Both tasks return the response code and the number of clock cycles from
// the first valid to the response handshake.
module axil_bfm #(
  parameter int unsigned ADDR_W = 7
) (
  input  logic              clk,
  output logic [ADDR_W-1:0] awaddr,
  output logic [2:0]        awprot,
  output logic              awvalid,
  input  logic              awready,
  output logic [31:0]       wdata,
  output logic [3:0]        wstrb,
  output logic              wvalid,
  input  logic              wready,
  input  logic [1:0]        bresp,
  input  logic              bvalid,
  output logic              bready,
  output logic [ADDR_W-1:0] araddr,
  output logic [2:0]        arprot,
  output logic              arvalid,
  input  logic              arready,
  input  logic [31:0]       rdata,
  input  logic [1:0]        rresp,
  input  logic              rvalid,
  output logic              rready
);
  initial begin
    awaddr = '0; awprot = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0;
    bready = 0; araddr = '0; arprot = '0; arvalid = 0; rready = 0;
  end

  task automatic write(input int unsigned addr, input logic [31:0] data, input logic ns,
                       output logic [1:0] resp, output int cycles);
    cycles = 0;
    @(negedge clk);
    awaddr = ADDR_W'(addr); awprot = {1'b0, ns, 1'b0}; awvalid = 1;
    wdata = data; wstrb = 4'hF; wvalid = 1; bready = 1;
    do begin @(posedge clk); cycles++; end while (!(awready && wready));
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) begin @(posedge clk); cycles++; @(negedge clk); end
    resp = bresp;
    @(posedge clk); cycles++;
    @(negedge clk); bready = 0;
  endtask

  task automatic read(input int unsigned addr, input logic ns,
                      output logic [31:0] data, output logic [1:0] resp, output int cycles);
    cycles = 0;
    @(negedge clk);
    araddr = ADDR_W'(addr); arprot = {1'b0, ns, 1'b0}; arvalid = 1; rready = 1;
    do begin @(posedge clk); cycles++; end while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) begin @(posedge clk); cycles++; @(negedge clk); end
    data = rdata; resp = rresp;
    @(posedge clk); cycles++;
    @(negedge clk); rready = 0;
  endtask
endmodule
