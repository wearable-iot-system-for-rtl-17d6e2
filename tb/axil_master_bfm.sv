// axil_master_bfm: AXI4-Lite master for the testbenches.
// Tasks write() and read() run one transaction each. Bus signals change at the
// falling clock edge; a handshake completes at the rising edge that follows a
// falling edge at which both VALID and READY were high. Responses other than OKAY
// are counted in bad_resp.
module axil_master_bfm #(
  parameter int AW = 8
) (
  input  logic          clk,
  output logic [AW-1:0] awaddr,
  output logic          awvalid,
  input  logic          awready,
  output logic [31:0]   wdata,
  output logic [3:0]    wstrb,
  output logic          wvalid,
  input  logic          wready,
  input  logic [1:0]    bresp,
  input  logic          bvalid,
  output logic          bready,
  output logic [AW-1:0] araddr,
  output logic          arvalid,
  input  logic          arready,
  input  logic [31:0]   rdata,
  input  logic [1:0]    rresp,
  input  logic          rvalid,
  output logic          rready
);
  int bad_resp = 0;

  initial begin
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
  end

  task automatic write(input logic [AW-1:0] addr, input logic [31:0] data);
    @(negedge clk);
    awaddr = addr; awvalid = 1; wdata = data; wstrb = 4'hF; wvalid = 1;
    #1;  // let the combinational ready settle
    while (!(awready && wready)) @(negedge clk);
    @(negedge clk);
    awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(negedge clk);
    if (bresp != 2'b00) bad_resp++;
    @(negedge clk);
    bready = 0;
  endtask

  task automatic read(input logic [AW-1:0] addr, output logic [31:0] data);
    @(negedge clk);
    araddr = addr; arvalid = 1;
    while (!arready) @(negedge clk);
    @(negedge clk);
    arvalid = 0; rready = 1;
    while (!rvalid) @(negedge clk);
    data = rdata;
    if (rresp != 2'b00) bad_resp++;
    @(negedge clk);
    rready = 0;
  endtask
endmodule
