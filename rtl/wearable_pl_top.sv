// wearable_pl_top: programmable-logic side of the wearable biometric monitor.
//
// Two independent sub-systems sit side by side, each fed by its own DMA engine and
// controlled by the processor over its own AXI4-Lite port:
//
//   PPG sub-system  ppg_core: RED/IR sample buffers arrive on ppg_s_axis, results
//                   (preprocessing packet or one autocorrelation value) leave on
//                   ppg_m_axis; ppg_axil programs the operation.
//   EEG sub-system  eeg_calcdist -> eeg_sortdist: a test feature vector followed by
//                   the training vectors arrive on eeg_s_axis; the Canberra distances
//                   stream straight from the first core into the second without the
//                   processor; the K nearest training indexes are read on eeg_axil.
//
// The processor, the DMA engines, the AXI interconnects and the reset generator are
// outside this module; their connections are the ports. Everything runs on one clock
// (the system was built around a 100 MHz fabric clock) with one active-low reset.
// ppg_done and eeg_done mirror the DONE status bits for use as interrupts.
//
// The split into these three cores and the direct stream from the distance core to
// the sorting core are the document's; the port naming and widths of the control
// ports are this design's.
module wearable_pl_top
  import wearable_pkg::*;
#(
  parameter int unsigned PPG_N    = PPG_N_MAX,  // PPG buffer depth per channel
  parameter int unsigned EEG_NW   = EEG_WORDS,  // 64-bit words per EEG feature vector
  parameter int unsigned KNN_K    = EEG_K,      // nearest neighbours kept
  parameter int unsigned AXIL_AW  = 8           // AXI4-Lite byte-address width
) (
  input  logic                   clk,
  input  logic                   rst_n,

  // ---- PPG: sample stream in, result stream out ----
  input  logic [31:0]            ppg_s_axis_tdata,
  input  logic                   ppg_s_axis_tvalid,
  input  logic                   ppg_s_axis_tlast,
  output logic                   ppg_s_axis_tready,
  output logic [PPG_OUT_W-1:0]   ppg_m_axis_tdata,
  output logic                   ppg_m_axis_tvalid,
  output logic                   ppg_m_axis_tlast,
  input  logic                   ppg_m_axis_tready,
  // ---- PPG: AXI4-Lite control ----
  input  logic [AXIL_AW-1:0]     ppg_axil_awaddr,
  input  logic                   ppg_axil_awvalid,
  output logic                   ppg_axil_awready,
  input  logic [31:0]            ppg_axil_wdata,
  input  logic [3:0]             ppg_axil_wstrb,
  input  logic                   ppg_axil_wvalid,
  output logic                   ppg_axil_wready,
  output logic [1:0]             ppg_axil_bresp,
  output logic                   ppg_axil_bvalid,
  input  logic                   ppg_axil_bready,
  input  logic [AXIL_AW-1:0]     ppg_axil_araddr,
  input  logic                   ppg_axil_arvalid,
  output logic                   ppg_axil_arready,
  output logic [31:0]            ppg_axil_rdata,
  output logic [1:0]             ppg_axil_rresp,
  output logic                   ppg_axil_rvalid,
  input  logic                   ppg_axil_rready,
  output logic                   ppg_done,

  // ---- EEG: feature stream in ----
  input  logic [EEG_WORD_W-1:0]  eeg_s_axis_tdata,
  input  logic                   eeg_s_axis_tvalid,
  input  logic                   eeg_s_axis_tlast,
  output logic                   eeg_s_axis_tready,
  // ---- EEG: AXI4-Lite read-out of the sorting core ----
  input  logic [AXIL_AW-1:0]     eeg_axil_awaddr,
  input  logic                   eeg_axil_awvalid,
  output logic                   eeg_axil_awready,
  input  logic [31:0]            eeg_axil_wdata,
  input  logic [3:0]             eeg_axil_wstrb,
  input  logic                   eeg_axil_wvalid,
  output logic                   eeg_axil_wready,
  output logic [1:0]             eeg_axil_bresp,
  output logic                   eeg_axil_bvalid,
  input  logic                   eeg_axil_bready,
  input  logic [AXIL_AW-1:0]     eeg_axil_araddr,
  input  logic                   eeg_axil_arvalid,
  output logic                   eeg_axil_arready,
  output logic [31:0]            eeg_axil_rdata,
  output logic [1:0]             eeg_axil_rresp,
  output logic                   eeg_axil_rvalid,
  input  logic                   eeg_axil_rready,
  output logic                   eeg_done
);

  // ================= PPG sub-system =================
  ppg_core #(.N_MAX(PPG_N), .ADDR_W(AXIL_AW)) u_ppg (
    .clk, .rst_n,
    .s_axis_tdata  (ppg_s_axis_tdata),
    .s_axis_tvalid (ppg_s_axis_tvalid),
    .s_axis_tlast  (ppg_s_axis_tlast),
    .s_axis_tready (ppg_s_axis_tready),
    .m_axis_tdata  (ppg_m_axis_tdata),
    .m_axis_tvalid (ppg_m_axis_tvalid),
    .m_axis_tlast  (ppg_m_axis_tlast),
    .m_axis_tready (ppg_m_axis_tready),
    .s_axil_awaddr (ppg_axil_awaddr),  .s_axil_awvalid (ppg_axil_awvalid),
    .s_axil_awready(ppg_axil_awready),
    .s_axil_wdata  (ppg_axil_wdata),   .s_axil_wstrb   (ppg_axil_wstrb),
    .s_axil_wvalid (ppg_axil_wvalid),  .s_axil_wready  (ppg_axil_wready),
    .s_axil_bresp  (ppg_axil_bresp),   .s_axil_bvalid  (ppg_axil_bvalid),
    .s_axil_bready (ppg_axil_bready),
    .s_axil_araddr (ppg_axil_araddr),  .s_axil_arvalid (ppg_axil_arvalid),
    .s_axil_arready(ppg_axil_arready),
    .s_axil_rdata  (ppg_axil_rdata),   .s_axil_rresp   (ppg_axil_rresp),
    .s_axil_rvalid (ppg_axil_rvalid),  .s_axil_rready  (ppg_axil_rready),
    .done          (ppg_done)
  );

  // ================= EEG sub-system =================
  logic [EEG_DIST_W-1:0] dist_tdata;
  logic                  dist_tvalid, dist_tlast, dist_tready;

  eeg_calcdist #(.WORDS(EEG_NW)) u_calcdist (
    .clk, .rst_n,
    .s_axis_tdata  (eeg_s_axis_tdata),
    .s_axis_tvalid (eeg_s_axis_tvalid),
    .s_axis_tlast  (eeg_s_axis_tlast),
    .s_axis_tready (eeg_s_axis_tready),
    .m_axis_tdata  (dist_tdata),
    .m_axis_tvalid (dist_tvalid),
    .m_axis_tlast  (dist_tlast),
    .m_axis_tready (dist_tready)
  );

  eeg_sortdist #(.K(KNN_K), .ADDR_W(AXIL_AW)) u_sortdist (
    .clk, .rst_n,
    .s_axis_tdata  (dist_tdata),
    .s_axis_tvalid (dist_tvalid),
    .s_axis_tlast  (dist_tlast),
    .s_axis_tready (dist_tready),
    .s_axil_awaddr (eeg_axil_awaddr),  .s_axil_awvalid (eeg_axil_awvalid),
    .s_axil_awready(eeg_axil_awready),
    .s_axil_wdata  (eeg_axil_wdata),   .s_axil_wstrb   (eeg_axil_wstrb),
    .s_axil_wvalid (eeg_axil_wvalid),  .s_axil_wready  (eeg_axil_wready),
    .s_axil_bresp  (eeg_axil_bresp),   .s_axil_bvalid  (eeg_axil_bvalid),
    .s_axil_bready (eeg_axil_bready),
    .s_axil_araddr (eeg_axil_araddr),  .s_axil_arvalid (eeg_axil_arvalid),
    .s_axil_arready(eeg_axil_arready),
    .s_axil_rdata  (eeg_axil_rdata),   .s_axil_rresp   (eeg_axil_rresp),
    .s_axil_rvalid (eeg_axil_rvalid),  .s_axil_rready  (eeg_axil_rready),
    .done          (eeg_done)
  );
endmodule
