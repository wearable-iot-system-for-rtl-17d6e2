// axil_regs: AXI4-Lite slave front end shared by the cores that the processor
// controls (PPG core, EEG sorting core).
//
// It turns bus transactions into a plain register port. A write is taken when the
// write address and write data are both valid; the core sees a one-clock reg_wr pulse
// with the word address, data and byte strobes, and the OKAY response follows on the
// next clock. A read is taken when there is no read response pending; the core's
// reg_rdata is looked up combinationally from reg_raddr in that clock (reg_rd marks it)
// and registered as the read response. Addresses are byte addresses; bits [1:0] are
// ignored. Only OKAY responses are produced.
//
// The document names AXI4-Lite as the link between the processor's general-purpose
// ports and the cores; the handshake details here follow the AXI4-Lite standard and
// the register-port split is this design's own.
module axil_regs #(
  parameter int unsigned ADDR_W = 8     // byte-address width
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // register port
  output logic              reg_wr,
  output logic [ADDR_W-3:0] reg_waddr,
  output logic [31:0]       reg_wdata,
  output logic [3:0]        reg_wstrb,
  output logic              reg_rd,
  output logic [ADDR_W-3:0] reg_raddr,
  input  logic [31:0]       reg_rdata
);
  // write channel: address and data accepted together, one transaction at a time
  assign s_axil_awready = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_wready  = s_axil_awready;
  assign s_axil_bresp   = 2'b00;
  assign reg_wr         = s_axil_awready;
  assign reg_waddr      = s_axil_awaddr[ADDR_W-1:2];
  assign reg_wdata      = s_axil_wdata;
  assign reg_wstrb      = s_axil_wstrb;

  // read channel
  assign s_axil_arready = !s_axil_rvalid;
  assign s_axil_rresp   = 2'b00;
  assign reg_rd         = s_axil_arvalid && s_axil_arready;
  assign reg_raddr      = s_axil_araddr[ADDR_W-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (reg_wr)                             s_axil_bvalid <= 1'b1;
      else if (s_axil_bready)                 s_axil_bvalid <= 1'b0;
      if (reg_rd) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= reg_rdata;
      end else if (s_axil_rready)             s_axil_rvalid <= 1'b0;
    end
  end

  // AXI rule: a response stays valid until it is taken
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
endmodule
