// wearable_pkg: sizes and encodings shared by the PPG core, the two EEG cores and
// their register interfaces.
//
// EEG: a feature vector is 160 features of 8 bits, carried as 20 words of 64 bits
// (eight features per word, feature 8*w+l in byte lane l of word w). Canberra
// distances are 16 bits, training-instance indexes 10 bits (1024 instances), and the
// sorting chain keeps the 21 shortest distances. These widths are the ones printed
// in the block diagrams of the two EEG cores; the lane order is this design's choice.
//
// PPG: samples are 16-bit unsigned sensor codes, two channels (RED, IR) packed into
// one 32-bit stream word, buffers of up to 1024 samples. Results are returned as
// 64-bit stream words.
package wearable_pkg;

  // ---------------- EEG ----------------
  localparam int unsigned EEG_FEAT_W   = 8;    // one normalised feature, unsigned [0,1)
  localparam int unsigned EEG_LANES    = 8;    // Canberra units working in parallel
  localparam int unsigned EEG_WORD_W   = EEG_FEAT_W * EEG_LANES;  // 64-bit stream
  localparam int unsigned EEG_WORDS    = 20;   // words per feature vector
  localparam int unsigned EEG_FEATURES = EEG_WORDS * EEG_LANES;   // 160
  localparam int unsigned EEG_PART_W   = 8;    // one partial Canberra term
  localparam int unsigned EEG_DIST_W   = 16;   // accumulated distance
  localparam int unsigned EEG_IDX_W    = 10;   // training-instance index
  localparam int unsigned EEG_K        = 21;   // length of the sorting chain

  // ---------------- PPG ----------------
  localparam int unsigned PPG_SAMPLE_W = 16;   // raw sample, unsigned
  localparam int unsigned PPG_N_MAX    = 1024; // samples per channel buffer
  localparam int unsigned PPG_OUT_W    = 64;   // result stream width
  localparam int unsigned PPG_SLOPE_FB = 16;   // fraction bits of the regression slope

  // Operation codes written to the PPG core's CTRL register.
  typedef enum logic [1:0] {
    PPG_OP_NONE       = 2'd0,
    PPG_OP_PREPROCESS = 2'd1,  // load buffer from stream, preprocess, return results
    PPG_OP_AUTOCORR   = 2'd2   // compute R(m) on the stored preprocessed buffer
  } ppg_op_e;

  // Register word addresses (byte address / 4) shared by the register maps.
  localparam logic [5:0] REG_CTRL   = 6'd0;    // write: command, read: status
  localparam logic [5:0] REG_ARG0   = 6'd1;    // PPG: buffer length
  localparam logic [5:0] REG_ARG1   = 6'd2;    // PPG: delay m and channel

endpackage
