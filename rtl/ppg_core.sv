// ppg_core: preprocessing and autocorrelation accelerator of the PPG heart-rate
// calculator.
//
// The processor programs the core over AXI4-Lite and moves sample buffers in and
// results out over two AXI4-Stream ports. Two operations exist:
//
// PREPROCESS reads one buffer of n samples per channel from the input stream (each
// 32-bit word holds RED in bits 15:0 and IR in bits 31:16, unsigned) and runs the
// preprocessing chain on both channels at once, in integer arithmetic:
//   1. DC mean        mean  = sum(x) / n                 (summed while loading)
//   2. DC removal     x'    = x - mean                   (pass A over the buffer)
//   3. regression     slope = (sum(x' * t) << 16) / sum(t^2), t = 2i - (n-1)
//                     (the sample index shifted to be centred on zero; doubled so it
//                     stays an integer; sums also taken in pass A)
//   4. detrending     x''   = x' - ((slope * t) >>> 16)  (pass B)
//   5. mean square    msq   = sum(x''^2) / n             (pass B)
//   6. correlation    cov   = sum(x''_red * x''_ir) / n  (pass B)
// and the quality test of the Pearson coefficient r = cov / sqrt(msq_red*msq_ir),
// r >= 0.8, done without a square root as cov >= 0 and 25*cov^2 >= 16*msq_red*msq_ir.
// The detrended samples stay in the core's buffers. The result packet has 8 words of
// 64 bits: mean_red, mean_ir, slope_red, slope_ir, msq_red, msq_ir, cov, and
// {quality in bit 0, n in bits 47:32}; TLAST marks the last. Divisions truncate
// toward zero; slope carries 16 fraction bits, everything else has none.
//
// AUTOCORR computes R(m) = sum_{i=0}^{n-1-m} x''(i) * x''(i+m) on one stored channel
// and returns it as a single 64-bit word with TLAST. The processor calls it for
// growing m and looks for the first local maximum k; heart rate is then fs*60/k.
//
// Registers (32-bit, byte address = 4 * word):
//   word 0 CTRL  write: bits 1:0 operation (1 PREPROCESS, 2 AUTOCORR); ignored while busy
//                read : bit 0 BUSY, bit 1 DONE, bit 2 QUALITY (r >= 0.8 in last PREPROCESS)
//   word 1 LEN   samples per channel n, 2..N_MAX (reset value N_MAX)
//   word 2 LAG   bits 15:0 delay m, bit 16 channel of AUTOCORR (0 IR, 1 RED)
// A PREPROCESS ends its load early if TLAST comes before n samples; n is then the
// number received.
//
// Timing: PREPROCESS takes about 3n + 7*(64+2) + 8 clocks (load, two passes, seven
// 64-clock divisions, result packet); AUTOCORR takes n - m + 3 clocks plus one output
// word. One sample per clock enters while loading.
//
// From the document: the six preprocessing steps and their order, the two channels,
// the 0.8 quality threshold, the autocorrelation formula, 16-bit samples, 1024-sample
// buffers, integer (no fraction bit) arithmetic, stream input and output plus AXI4-Lite.
// This design's choices: the doubled centred index, the 16 fraction bits of the slope,
// the register map, the packing of stream words and the result packet, testing the
// quality inside the core, and the sequential divider.
module ppg_core
  import wearable_pkg::*;
#(
  parameter int unsigned N_MAX    = PPG_N_MAX,      // buffer depth per channel
  parameter int unsigned SAMPLE_W = PPG_SAMPLE_W,   // raw sample width
  parameter int unsigned SLOPE_FB = PPG_SLOPE_FB,   // slope fraction bits
  parameter int unsigned ADDR_W   = 8               // AXI4-Lite byte-address width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // samples in: {IR, RED}
  input  logic [2*SAMPLE_W-1:0]  s_axis_tdata,
  input  logic                   s_axis_tvalid,
  input  logic                   s_axis_tlast,
  output logic                   s_axis_tready,
  // results out
  output logic [PPG_OUT_W-1:0]   m_axis_tdata,
  output logic                   m_axis_tvalid,
  output logic                   m_axis_tlast,
  input  logic                   m_axis_tready,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]      s_axil_awaddr,
  input  logic                   s_axil_awvalid,
  output logic                   s_axil_awready,
  input  logic [31:0]            s_axil_wdata,
  input  logic [3:0]             s_axil_wstrb,
  input  logic                   s_axil_wvalid,
  output logic                   s_axil_wready,
  output logic [1:0]             s_axil_bresp,
  output logic                   s_axil_bvalid,
  input  logic                   s_axil_bready,
  input  logic [ADDR_W-1:0]      s_axil_araddr,
  input  logic                   s_axil_arvalid,
  output logic                   s_axil_arready,
  output logic [31:0]            s_axil_rdata,
  output logic [1:0]             s_axil_rresp,
  output logic                   s_axil_rvalid,
  input  logic                   s_axil_rready,
  // status for the system
  output logic                   done
);
  localparam int unsigned AW    = $clog2(N_MAX);        // buffer address
  localparam int unsigned CW    = $clog2(N_MAX + 1);    // sample count
  localparam int unsigned WD    = SAMPLE_W + 3;         // stored (signed) sample
  localparam int unsigned TW    = CW + 2;               // signed centred index
  localparam int unsigned ACC_W = 64;
  localparam int unsigned NRES  = 7;
  // |slope * t| stays below about 1.8 * 2^(SAMPLE_W+SLOPE_FB), so the slope fits in:
  localparam int unsigned SLW   = SAMPLE_W + SLOPE_FB + 3;
  localparam int unsigned OPW   = 2 * WD + 2;           // quality compare operands
  localparam int unsigned QW    = 2 * OPW + 6;          // quality compare width

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [WD-1:0]    smp_t;

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_DIV, S_PASS_A, S_PASS_B, S_QUAL, S_SEND, S_ACORR
  } state_e;

  // ---------------- register interface ----------------
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

  state_e        state;
  logic [CW-1:0] len_reg;      // programmed buffer length
  logic [15:0]   lag_reg;      // delay m
  logic          chan_red;     // AUTOCORR channel
  logic          quality;

  wire wr_ctrl = reg_wr && reg_waddr == (ADDR_W-2)'(REG_CTRL) && reg_wstrb[0];
  wire wr_len  = reg_wr && reg_waddr == (ADDR_W-2)'(REG_ARG0);
  wire wr_lag  = reg_wr && reg_waddr == (ADDR_W-2)'(REG_ARG1);
  wire [1:0] wr_op = reg_wdata[1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_reg  <= CW'(N_MAX);
      lag_reg  <= '0;
      chan_red <= 1'b0;
    end else begin
      if (wr_len) begin
        if (reg_wdata < 32'd2)           len_reg <= CW'(2);
        else if (reg_wdata > 32'(N_MAX)) len_reg <= CW'(N_MAX);
        else                             len_reg <= CW'(reg_wdata);
      end
      if (wr_lag) begin
        lag_reg  <= reg_wdata[15:0];
        chan_red <= reg_wdata[16];
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    case (reg_raddr)
      (ADDR_W-2)'(REG_CTRL): reg_rdata = {29'b0, quality, done, state != S_IDLE};
      (ADDR_W-2)'(REG_ARG0): reg_rdata = 32'(len_reg);
      (ADDR_W-2)'(REG_ARG1): reg_rdata = {15'b0, chan_red, lag_reg};
      default:               reg_rdata = '0;
    endcase
  end

  // ---------------- sample buffers: one write port, two read ports ----------------
  smp_t buf_red [N_MAX];
  smp_t buf_ir  [N_MAX];
  logic          mem_we;
  logic [AW-1:0] mem_waddr, mem_raddr_a, mem_raddr_b;
  smp_t          mem_wred, mem_wir;
  smp_t          rd_red_a, rd_ir_a, rd_red_b, rd_ir_b;

  always_ff @(posedge clk) begin
    if (mem_we) begin
      buf_red[mem_waddr] <= mem_wred;
      buf_ir [mem_waddr] <= mem_wir;
    end
    rd_red_a <= buf_red[mem_raddr_a];
    rd_ir_a  <= buf_ir [mem_raddr_a];
    rd_red_b <= buf_red[mem_raddr_b];
    rd_ir_b  <= buf_ir [mem_raddr_b];
  end

  // ---------------- divider ----------------
  logic div_start, div_busy, div_done;
  acc_t div_num, div_den, div_quo;
  seq_div #(.W(ACC_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .quo(div_quo), .busy(div_busy), .done(div_done)
  );

  // ---------------- datapath state ----------------
  logic [CW-1:0] n;             // samples in the buffer
  logic [CW-1:0] cnt;           // issue counter of a pass
  logic          p1_valid;      // read data of sample p1_idx is on rd_*
  logic [CW-1:0] p1_idx;
  logic [2:0]    job;           // division in progress (index into res)
  logic          div_wait;
  logic [3:0]    send_idx;
  logic          send_one;      // AUTOCORR result: one word
  acc_t          res [NRES];    // mean_r, mean_i, slope_r, slope_i, msq_r, msq_i, cov
  acc_t          sum_r, sum_i;  // sums of pass: raw sums, dot with t, squares
  acc_t          sum_x;         // sum t^2 (pass A) or cross product (pass B)
  acc_t          acorr;

  // centred doubled index of the sample in stage 1
  logic signed [TW-1:0] t1;
  assign t1 = $signed({1'b0, p1_idx, 1'b0}) - $signed(TW'({1'b0, n}) - TW'(1));

  // stage-1 values
  smp_t x_red, x_ir;
  smp_t trend_r, trend_i;
  always_comb begin
    trend_r = WD'((ACC_W'($signed(res[2][SLW-1:0])) * ACC_W'(t1)) >>> SLOPE_FB);
    trend_i = WD'((ACC_W'($signed(res[3][SLW-1:0])) * ACC_W'(t1)) >>> SLOPE_FB);
    if (state == S_PASS_A) begin
      x_red = rd_red_a - WD'(res[0]);
      x_ir  = rd_ir_a  - WD'(res[1]);
    end else begin
      x_red = rd_red_a - trend_r;
      x_ir  = rd_ir_a  - trend_i;
    end
  end

  // division operands by job
  always_comb begin
    div_num = '0;
    div_den = ACC_W'(n);
    unique case (job)
      3'd0: div_num = sum_r;
      3'd1: div_num = sum_i;
      3'd2: begin div_num = sum_r <<< SLOPE_FB; div_den = sum_x; end
      3'd3: begin div_num = sum_i <<< SLOPE_FB; div_den = sum_x; end
      3'd4: div_num = sum_r;
      3'd5: div_num = sum_i;
      default: div_num = sum_x;
    endcase
  end
  assign div_start = (state == S_DIV) && !div_wait;

  // quality test of the Pearson coefficient: cov >= 0 and 25 cov^2 >= 16 msq_r msq_i
  // |cov| and msq are below 2^37 (squares of 19-bit samples), so 40-bit operands suffice
  logic signed [QW-1:0] q_lhs, q_rhs;
  logic signed [OPW-1:0] q_cov, q_msr, q_msi;
  assign q_cov = res[6][OPW-1:0];
  assign q_msr = res[4][OPW-1:0];
  assign q_msi = res[5][OPW-1:0];
  assign q_lhs = QW'(25) * QW'(q_cov) * QW'(q_cov);
  assign q_rhs = QW'(16) * QW'(q_msr) * QW'(q_msi);

  // stream handshakes
  assign s_axis_tready = (state == S_LOAD);
  wire   load_fire     = s_axis_tvalid && s_axis_tready;
  wire   load_end      = load_fire && (s_axis_tlast || cnt == len_reg - 1'b1);
  wire   issue         = (state == S_PASS_A || state == S_PASS_B) ? (cnt < n)
                       : (state == S_ACORR) ? (32'(cnt) + 32'(lag_reg) < 32'(n)) : 1'b0;
  wire   pass_end      = !issue && !p1_valid;

  logic [3:0] last_word;
  assign last_word     = send_one ? 4'd0 : 4'(NRES);
  assign m_axis_tvalid = (state == S_SEND);
  assign m_axis_tlast  = (send_idx == last_word);
  always_comb begin
    if (send_one)                   m_axis_tdata = acorr;
    else if (send_idx < 4'(NRES))   m_axis_tdata = res[send_idx[2:0]];
    else                            m_axis_tdata = {16'b0, 16'(n), 31'b0, quality};
  end

  // buffer ports
  always_comb begin
    mem_we      = 1'b0;
    mem_waddr   = p1_idx[AW-1:0];
    mem_wred    = x_red;
    mem_wir     = x_ir;
    mem_raddr_a = cnt[AW-1:0];
    mem_raddr_b = AW'(32'(cnt) + 32'(lag_reg));
    if (state == S_LOAD) begin
      mem_we    = load_fire;
      mem_waddr = cnt[AW-1:0];
      mem_wred  = WD'(s_axis_tdata[SAMPLE_W-1:0]);
      mem_wir   = WD'(s_axis_tdata[2*SAMPLE_W-1:SAMPLE_W]);
    end else if (state == S_PASS_A || state == S_PASS_B) begin
      mem_we    = p1_valid;
    end
  end

  // products of the autocorrelation stage
  smp_t ac_a, ac_b;
  assign ac_a = chan_red ? rd_red_a : rd_ir_a;
  assign ac_b = chan_red ? rd_red_b : rd_ir_b;

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      n        <= CW'(N_MAX);
      cnt      <= '0;
      p1_valid <= 1'b0;
      p1_idx   <= '0;
      job      <= '0;
      div_wait <= 1'b0;
      send_idx <= '0;
      send_one <= 1'b0;
      sum_r    <= '0;
      sum_i    <= '0;
      sum_x    <= '0;
      acorr    <= '0;
      quality  <= 1'b0;
      done     <= 1'b0;
      for (int r = 0; r < NRES; r++) res[r] <= '0;
    end else begin
      p1_valid <= 1'b0;
      if (issue) begin
        p1_valid <= 1'b1;
        p1_idx   <= cnt;
        cnt      <= cnt + 1'b1;
      end

      unique case (state)
        S_IDLE: begin
          if (wr_ctrl && wr_op == PPG_OP_PREPROCESS) begin
            state <= S_LOAD;
            done  <= 1'b0;
            cnt   <= '0;
            sum_r <= '0;
            sum_i <= '0;
          end else if (wr_ctrl && wr_op == PPG_OP_AUTOCORR) begin
            state <= S_ACORR;
            done  <= 1'b0;
            cnt   <= '0;
            acorr <= '0;
          end
        end

        S_LOAD: if (load_fire) begin
          sum_r <= sum_r + ACC_W'(s_axis_tdata[SAMPLE_W-1:0]);
          sum_i <= sum_i + ACC_W'(s_axis_tdata[2*SAMPLE_W-1:SAMPLE_W]);
          cnt   <= cnt + 1'b1;
          if (load_end) begin
            n     <= cnt + 1'b1;
            state <= S_DIV;
            job   <= 3'd0;
          end
        end

        S_DIV: begin
          if (!div_wait) div_wait <= 1'b1;
          else if (div_done) begin
            div_wait <= 1'b0;
            res[job] <= div_quo;
            job      <= job + 1'b1;
            if (job == 3'd1 || job == 3'd3) begin
              state <= (job == 3'd1) ? S_PASS_A : S_PASS_B;
              cnt   <= '0;
              sum_r <= '0;
              sum_i <= '0;
              sum_x <= '0;
            end else if (job == 3'd6) begin
              state <= S_QUAL;
            end
          end
        end

        S_PASS_A: begin
          if (p1_valid) begin
            sum_r <= sum_r + ACC_W'(x_red) * ACC_W'(t1);
            sum_i <= sum_i + ACC_W'(x_ir)  * ACC_W'(t1);
            sum_x <= sum_x + ACC_W'(t1)    * ACC_W'(t1);
          end
          if (pass_end) state <= S_DIV;
        end

        S_PASS_B: begin
          if (p1_valid) begin
            sum_r <= sum_r + ACC_W'(x_red) * ACC_W'(x_red);
            sum_i <= sum_i + ACC_W'(x_ir)  * ACC_W'(x_ir);
            sum_x <= sum_x + ACC_W'(x_red) * ACC_W'(x_ir);
          end
          if (pass_end) state <= S_DIV;
        end

        S_QUAL: begin
          quality  <= (res[6] >= 0) && (q_lhs >= q_rhs);
          state    <= S_SEND;
          send_idx <= '0;
          send_one <= 1'b0;
        end

        S_ACORR: begin
          if (p1_valid) acorr <= acorr + ACC_W'(ac_a) * ACC_W'(ac_b);
          if (pass_end) begin
            state    <= S_SEND;
            send_idx <= '0;
            send_one <= 1'b1;
          end
        end

        S_SEND: if (m_axis_tready) begin
          send_idx <= send_idx + 1'b1;
          if (m_axis_tlast) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
      div_start |-> !div_busy);
  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
      len_reg >= CW'(2) && len_reg <= CW'(N_MAX));
endmodule
