// tb_ppg_core: PPG core against a reference of the preprocessing chain computed in
// the testbench with 64-bit integers (and the quality test in floating point).
//
// Buffers: a synthetic two-channel pulse wave (125 Hz sampling, known heart rate,
// DC level, linear drift and noise) at the full 1024 samples and at 100 samples, a
// buffer whose two channels are unrelated noise (quality test must fail), and a
// short buffer ended early by TLAST. After a preprocessing run the testbench calls
// AUTOCORR for growing delays, checks every R(m), finds the first local maximum
// as the processor would and checks the heart rate it gives. Output back-pressure is
// random. The preprocessing of 1024 samples must finish within 6100 clocks, the
// 61 us the complete hardware/software preprocessing step took at 100 MHz.
module tb_ppg_core;
  import wearable_pkg::*;
  localparam int NMAX = PPG_N_MAX;
  localparam real FS = 125.0;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] s_axis_tdata = '0;
  logic        s_axis_tvalid = 0, s_axis_tlast = 0, s_axis_tready;
  logic [63:0] m_axis_tdata;
  logic        m_axis_tvalid, m_axis_tlast, m_axis_tready = 0;
  logic [7:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready, done;

  ppg_core dut (.*);

  axil_master_bfm #(.AW(8)) bfm (
    .clk, .awaddr(s_axil_awaddr), .awvalid(s_axil_awvalid), .awready(s_axil_awready),
    .wdata(s_axil_wdata), .wstrb(s_axil_wstrb), .wvalid(s_axil_wvalid), .wready(s_axil_wready),
    .bresp(s_axil_bresp), .bvalid(s_axil_bvalid), .bready(s_axil_bready),
    .araddr(s_axil_araddr), .arvalid(s_axil_arvalid), .arready(s_axil_arready),
    .rdata(s_axil_rdata), .rresp(s_axil_rresp), .rvalid(s_axil_rvalid), .rready(s_axil_rready)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- result stream collector ----
  longint rx_q[$];
  bit     rx_last_q[$];
  int     n_backpressure = 0;
  always @(posedge clk) begin
    if (m_axis_tvalid && m_axis_tready) begin
      rx_q.push_back(longint'(m_axis_tdata));
      rx_last_q.push_back(m_axis_tlast);
    end
    if (m_axis_tvalid && !m_axis_tready) n_backpressure++;
    m_axis_tready <= ($urandom_range(0, 3) != 0);
  end

  // ---- buffers and reference ----
  int     red [NMAX], ir [NMAX];
  longint xr [NMAX], xi [NMAX];     // preprocessed reference samples
  longint ref_res [7];
  bit     ref_quality;

  task automatic make_pulse(input int n, input real bpm, input real noise);
    for (int i = 0; i < n; i++) begin
      real ph = 2.0 * PI * bpm / 60.0 * real'(i) / FS;
      real wave = $sin(ph) + 0.35 * $sin(2.0 * ph + 0.8);
      real rn = noise * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      real in_ = noise * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      red[i] = int'(30000.0 + 1800.0 * wave + 3.0 * real'(i) + rn);
      ir[i]  = int'(42000.0 + 2600.0 * wave - 2.0 * real'(i) + in_);
    end
  endtask

  task automatic make_noise(input int n);
    for (int i = 0; i < n; i++) begin
      red[i] = $urandom_range(20000, 40000);
      ir[i]  = $urandom_range(20000, 40000);
    end
  endtask

  task automatic reference(input int n);
    longint sr = 0, si = 0, mr, mi, dr = 0, di = 0, stt = 0, slr, sli;
    longint qr = 0, qi = 0, cx = 0;
    real r;
    for (int i = 0; i < n; i++) begin sr += red[i]; si += ir[i]; end
    mr = sr / n; mi = si / n;
    for (int i = 0; i < n; i++) begin
      longint t = 2 * i - (n - 1);
      xr[i] = red[i] - mr; xi[i] = ir[i] - mi;
      dr += xr[i] * t; di += xi[i] * t; stt += t * t;
    end
    slr = (dr * 65536) / stt; sli = (di * 65536) / stt;
    for (int i = 0; i < n; i++) begin
      longint t = 2 * i - (n - 1);
      xr[i] -= (slr * t) >>> 16;
      xi[i] -= (sli * t) >>> 16;
      qr += xr[i] * xr[i]; qi += xi[i] * xi[i]; cx += xr[i] * xi[i];
    end
    ref_res = '{mr, mi, slr, sli, qr / n, qi / n, cx / n};
    r = real'(cx / n) / $sqrt(real'(qr / n) * real'(qi / n));
    ref_quality = (r >= 0.8);
  endtask

  function automatic longint ref_acorr(input int n, input int m, input bit use_red);
    longint s = 0;
    for (int i = 0; i + m < n; i++) s += use_red ? xr[i] * xr[i+m] : xi[i] * xi[i+m];
    return s;
  endfunction

  // ---- operations ----
  int n_quality_pass = 0, n_quality_fail = 0, n_early_tlast = 0;

  task automatic preprocess(input int len, input int send, input bit early_last, output int cycles);
    logic [31:0] v;
    int c0;
    bfm.write(8'h04, 32'(len));
    bfm.write(8'h00, 32'(PPG_OP_PREPROCESS));
    c0 = 0;
    fork
      begin
        for (int i = 0; i < send; i++) begin
          s_axis_tdata = {16'(ir[i]), 16'(red[i])};
          s_axis_tvalid = 1; s_axis_tlast = early_last && (i == send - 1);
          #1;
          while (!s_axis_tready) @(negedge clk);
          @(negedge clk);
          s_axis_tvalid = 0; s_axis_tlast = 0;
        end
      end
      begin
        while (rx_q.size() < 8) begin @(posedge clk); c0++; end
      end
    join
    cycles = c0;
    reference(send);
    for (int w = 0; w < 7; w++) check($sformatf("result word %0d", w), rx_q[w], ref_res[w]);
    check("quality bit", rx_q[7] & 1, ref_quality);
    check("n in result", (rx_q[7] >> 32) & 16'hFFFF, send);
    for (int w = 0; w < 8; w++) check("tlast position", rx_last_q[w], w == 7);
    rx_q.delete(); rx_last_q.delete();
    do bfm.read(8'h00, v); while (v[0]);
    check("status DONE", v[1], 1);
    check("status QUALITY", v[2], ref_quality);
    if (ref_quality) n_quality_pass++; else n_quality_fail++;
    if (early_last) n_early_tlast++;
  endtask

  task automatic autocorr(input int n, input int m, input bit use_red, output longint r);
    logic [31:0] v;
    bfm.write(8'h08, {15'b0, use_red, 16'(m)});
    bfm.write(8'h00, 32'(PPG_OP_AUTOCORR));
    while (rx_q.size() < 1) @(posedge clk);
    r = rx_q.pop_front();
    check("acorr tlast", rx_last_q.pop_front(), 1);
    check($sformatf("R(%0d)", m), r, ref_acorr(n, m, use_red));
    do bfm.read(8'h00, v); while (v[0]);
  endtask

  // heart rate from the autocorrelation, as the processor computes it
  task automatic heart_rate(input int n, input bit use_red, input real bpm);
    longint rp, rc, rn;
    int k = 0;
    autocorr(n, 1, use_red, rp);
    autocorr(n, 2, use_red, rc);
    for (int m = 3; m < n - 1 && k == 0; m++) begin
      autocorr(n, m, use_red, rn);
      if (rc > rp && rc >= rn) k = m - 1;
      rp = rc; rc = rn;
    end
    checks++;
    if (k == 0 || (FS * 60.0 / real'(k) - bpm) > 3.0 || (bpm - FS * 60.0 / real'(k)) > 3.0) begin
      failures++;
      $display("heart rate: k=%0d gives %0.1f bpm, expected %0.1f", k, FS * 60.0 / real'(k), bpm);
    end else
      $display("heart rate: k=%0d gives %0.1f bpm (signal %0.1f bpm)", k, FS * 60.0 / real'(k), bpm);
  endtask

  initial begin
    int cyc;
    longint r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // full-size buffer, 72 bpm
    make_pulse(NMAX, 72.0, 300.0);
    preprocess(NMAX, NMAX, 1'b1, cyc);
    $display("preprocessing of %0d samples: %0d clocks", NMAX, cyc);
    checks++;
    if (cyc > 6100) begin failures++; $display("too slow: %0d clocks", cyc); end
    autocorr(NMAX, 0, 1'b0, r);
    autocorr(NMAX, NMAX - 1, 1'b1, r);
    autocorr(NMAX, NMAX, 1'b1, r);          // delay beyond the buffer: empty sum
    heart_rate(NMAX, 1'b0, 72.0);

    // 100-sample buffer, 110 bpm
    make_pulse(100, 110.0, 150.0);
    preprocess(100, 100, 1'b0, cyc);
    heart_rate(100, 1'b1, 110.0);

    // unrelated channels: quality test must fail
    make_noise(256);
    preprocess(256, 256, 1'b1, cyc);

    // buffer ended early by TLAST
    make_pulse(300, 90.0, 100.0);
    preprocess(500, 300, 1'b1, cyc);

    if (n_quality_pass == 0 || n_quality_fail == 0 || n_early_tlast == 0 || n_backpressure == 0) begin
      failures++;
      $display("coverage: pass=%0d fail=%0d early=%0d bp=%0d", n_quality_pass, n_quality_fail,
               n_early_tlast, n_backpressure);
    end
    check("bus responses", bfm.bad_resp, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
