// eeg_calcdist: Canberra-distance core of the EEG k-nearest-neighbour classifier.
//
// One AXI4-Stream packet of 64-bit words carries a test feature vector followed by
// any number of training feature vectors; the packet ends with TLAST on the last word
// of the last training vector. A feature vector is EEG_WORDS words of eight 8-bit
// features. A demultiplexer sends the first vector into the test buffer and every
// later word to the eight Canberra units, which compare its eight features with the
// matching word of the test buffer in parallel. Their eight terms are added into the
// distance accumulator; after the last word of a training vector the 16-bit distance
// is sent on the output stream, with TLAST on the distance of the last vector. The
// core then waits for the next test vector.
//
// Timing: one input word per clock when the output is not back-pressured, so a
// training vector costs EEG_WORDS clocks. A word passes one register stage (sum of
// the eight terms) before the accumulator; the distance leaves the core two clocks
// after the last word of its vector was accepted.
//
// From the document: the 64-bit input stream, the split into test and training data,
// eight parallel Canberra units, an accumulator that produces a 16-bit distance, the
// 20-word (160-feature) vector. This design's choices: the packet framing, summing all
// eight terms of a word in one clock (the document's measured run time of the core
// needs about one word per clock), the pipeline register and the output register.
module eeg_calcdist
  import wearable_pkg::*;
#(
  parameter int unsigned WORDS = EEG_WORDS   // words per feature vector
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // feature stream in
  input  logic [EEG_WORD_W-1:0] s_axis_tdata,
  input  logic                  s_axis_tvalid,
  input  logic                  s_axis_tlast,
  output logic                  s_axis_tready,
  // distance stream out
  output logic [EEG_DIST_W-1:0] m_axis_tdata,
  output logic                  m_axis_tvalid,
  output logic                  m_axis_tlast,
  input  logic                  m_axis_tready
);
  localparam int unsigned WW    = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned SUM_W = EEG_PART_W + $clog2(EEG_LANES);

  typedef enum logic {LOAD_TEST, TRAIN} state_e;
  state_e state;

  logic [EEG_WORD_W-1:0] test_buf [WORDS];
  logic [WW-1:0]         word_cnt;

  logic adv;          // pipeline moves this clock
  logic in_fire;      // input word accepted
  assign adv           = !m_axis_tvalid || m_axis_tready;
  assign s_axis_tready = adv;
  assign in_fire       = s_axis_tvalid && s_axis_tready;

  wire last_word = (word_cnt == WW'(WORDS - 1));

  // ---- eight Canberra units and the sum of their terms ----
  logic [EEG_PART_W-1:0] part [EEG_LANES];
  logic [SUM_W-1:0]      lane_sum;
  for (genvar l = 0; l < EEG_LANES; l++) begin : g_lane
    canberra #(.FEAT_W(EEG_FEAT_W), .PART_W(EEG_PART_W)) u_canberra (
      .u (s_axis_tdata[l*EEG_FEAT_W +: EEG_FEAT_W]),
      .v (test_buf[word_cnt][l*EEG_FEAT_W +: EEG_FEAT_W]),
      .d (part[l])
    );
  end
  always_comb begin
    lane_sum = '0;
    for (int l = 0; l < EEG_LANES; l++) lane_sum += SUM_W'(part[l]);
  end

  // ---- input side: demultiplex test / training words ----
  logic             s1_valid, s1_first, s1_last, s1_tlast;
  logic [SUM_W-1:0] s1_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= LOAD_TEST;
      word_cnt <= '0;
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_tlast <= 1'b0;
      s1_sum   <= '0;
    end else if (adv) begin
      s1_valid <= 1'b0;
      if (in_fire) begin
        word_cnt <= last_word ? '0 : word_cnt + 1'b1;
        if (state == LOAD_TEST) begin
          // a packet that ends inside the test vector carries no training data
          if (last_word && !s_axis_tlast) state <= TRAIN;
        end else begin
          s1_valid <= 1'b1;
          s1_first <= (word_cnt == '0);
          s1_last  <= last_word;
          s1_tlast <= s_axis_tlast;
          s1_sum   <= lane_sum;
          if (s_axis_tlast) begin
            state    <= LOAD_TEST;
            word_cnt <= '0;
          end
        end
      end
    end
  end

  // test buffer: written only while the test vector is loaded
  always_ff @(posedge clk) begin
    if (in_fire && state == LOAD_TEST) test_buf[word_cnt] <= s_axis_tdata;
  end

  // ---- accumulator and output register ----
  logic [EEG_DIST_W-1:0] acc;
  logic [EEG_DIST_W-1:0] acc_next;
  assign acc_next = (s1_first ? '0 : acc) + EEG_DIST_W'(s1_sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc           <= '0;
      m_axis_tdata  <= '0;
      m_axis_tvalid <= 1'b0;
      m_axis_tlast  <= 1'b0;
    end else if (adv) begin
      m_axis_tvalid <= 1'b0;
      if (s1_valid) begin
        acc <= acc_next;
        if (s1_last || s1_tlast) begin
          m_axis_tdata  <= acc_next;
          m_axis_tvalid <= 1'b1;
          m_axis_tlast  <= s1_tlast;
        end
      end
    end
  end

  // AXI4-Stream rule: data held stable while valid and not ready
  property p_out_stable;
    @(posedge clk) disable iff (!rst_n)
      m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast);
  endproperty
  a_out_stable: assert property (p_out_stable);
endmodule
