// eeg_sortdist: sorting core of the EEG k-nearest-neighbour classifier.
//
// It receives the stream of Canberra distances from eeg_calcdist, one per training
// instance, numbers them 0, 1, 2, ... in arrival order, and keeps the K shortest with
// their numbers (indexes) in a chain of K sort_cell elements. Each distance enters the
// first cell and ripples down the chain in the same clock: every cell either takes it
// and passes its old pair on, or passes it on untouched, so after every clock the
// chain holds the K shortest distances seen so far in ascending order (equal
// distances in no guaranteed order). The distance that carries TLAST ends the
// search: the core sets DONE and stops accepting until the processor starts a new
// search.
//
// Registers (32-bit, AXI4-Lite, byte address = 4 * word):
//   word 0      write: bit 0 = START (empty the chain, index counter to 0, accept data)
//               read : bit 0 = RUNNING, bit 1 = DONE, bits 26:16 = distances received
//   word 1+i    read : cell i (i = 0 nearest) {distance[15:0], 6'b0, index[9:0]};
//               an empty cell reads distance 0xFFFF
// The core accepts data straight after reset, as if START had been written.
//
// Timing: one distance per clock, no stall; DONE is set the clock after the last one.
//
// From the document: the chain of K = 21 distance/index cells, the 16-bit distance and
// 10-bit index widths, insertion by compare-and-pass, the results read over AXI4-Lite.
// This design's choices: the register map, the START/DONE protocol and the empty value.
module eeg_sortdist
  import wearable_pkg::*;
#(
  parameter int unsigned K      = EEG_K,   // number of nearest neighbours kept
  parameter int unsigned ADDR_W = 8        // AXI4-Lite byte-address width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // distance stream in
  input  logic [EEG_DIST_W-1:0] s_axis_tdata,
  input  logic                  s_axis_tvalid,
  input  logic                  s_axis_tlast,
  output logic                  s_axis_tready,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]     s_axil_awaddr,
  input  logic                  s_axil_awvalid,
  output logic                  s_axil_awready,
  input  logic [31:0]           s_axil_wdata,
  input  logic [3:0]            s_axil_wstrb,
  input  logic                  s_axil_wvalid,
  output logic                  s_axil_wready,
  output logic [1:0]            s_axil_bresp,
  output logic                  s_axil_bvalid,
  input  logic                  s_axil_bready,
  input  logic [ADDR_W-1:0]     s_axil_araddr,
  input  logic                  s_axil_arvalid,
  output logic                  s_axil_arready,
  output logic [31:0]           s_axil_rdata,
  output logic [1:0]            s_axil_rresp,
  output logic                  s_axil_rvalid,
  input  logic                  s_axil_rready,
  // status for the system
  output logic                  done
);
  localparam int unsigned CNT_W = EEG_IDX_W + 1;

  logic              reg_wr, reg_rd;
  logic [ADDR_W-3:0] reg_waddr, reg_raddr;
  logic [31:0]       reg_wdata, reg_rdata;
  logic [3:0]        reg_wstrb;

  axil_regs #(.ADDR_W(ADDR_W)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .reg_wr, .reg_waddr, .reg_wdata, .reg_wstrb,
    .reg_rd, .reg_raddr, .reg_rdata
  );

  logic             running;
  logic [CNT_W-1:0] count;
  logic             start;
  logic             in_fire;

  assign start         = reg_wr && reg_waddr == (ADDR_W-2)'(REG_CTRL) && reg_wstrb[0] && reg_wdata[0];
  assign s_axis_tready = running;
  assign in_fire       = s_axis_tvalid && s_axis_tready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b1;
      done    <= 1'b0;
      count   <= '0;
    end else if (start) begin
      running <= 1'b1;
      done    <= 1'b0;
      count   <= '0;
    end else if (in_fire) begin
      count <= count + 1'b1;
      if (s_axis_tlast) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  // ---- the chain ----
  logic [EEG_DIST_W-1:0] dist_link  [K+1];
  logic [EEG_IDX_W-1:0]  index_link [K+1];
  logic [EEG_DIST_W-1:0] cell_dist  [K];
  logic [EEG_IDX_W-1:0]  cell_index [K];

  assign dist_link[0]  = s_axis_tdata;
  assign index_link[0] = count[EEG_IDX_W-1:0];

  for (genvar i = 0; i < K; i++) begin : g_cell
    sort_cell #(.DIST_W(EEG_DIST_W), .IDX_W(EEG_IDX_W)) u_cell (
      .clk, .rst_n,
      .clear     (start),
      .in_valid  (in_fire),
      .dist_in   (dist_link[i]),
      .index_in  (index_link[i]),
      .dist_out  (dist_link[i+1]),
      .index_out (index_link[i+1]),
      .distance  (cell_dist[i]),
      .index     (cell_index[i])
    );
  end

  // ---- register read ----
  always_comb begin
    reg_rdata = '0;
    if (reg_raddr == (ADDR_W-2)'(REG_CTRL)) begin
      reg_rdata[0]     = running;
      reg_rdata[1]     = done;
      reg_rdata[26:16] = count;
    end else begin
      for (int i = 0; i < K; i++) begin
        if (reg_raddr == (ADDR_W-2)'(i + 1))
          reg_rdata = {cell_dist[i], 6'b0, cell_index[i]};
      end
    end
  end
endmodule
