// tb_wearable_pl_top: end-to-end run of both sub-systems at full size, with the
// processor's share of each algorithm done by the testbench.
//
// PPG: a 1024-sample two-channel pulse wave (72 bpm at 125 Hz) is preprocessed; the
// result packet is checked against a 64-bit integer reference; the quality test must
// pass; AUTOCORR is called for growing delays until the first local maximum, whose
// delay must give the heart rate. A second buffer of unrelated noise must fail the
// quality test.
// EEG: 1024 training vectors of 160 features are made around five class centres
// (the five emotions: four quadrants and neutral). A test vector near one centre and
// the whole training set stream through the distance core into the sorting core; the
// 21 nearest are read over AXI4-Lite, checked against a reference sort of distances
// worked out in the testbench, and vote for the class, which must be the test
// vector's. This is repeated for a second class after START.
// Each mechanism must occur at least once: quality pass and fail, autocorrelation
// calls, a distance taken into the chain and one dropped from it, a search restart.
module tb_wearable_pl_top;
  import wearable_pkg::*;
  localparam int NMAX   = PPG_N_MAX;
  localparam int NW     = EEG_WORDS;
  localparam int K      = EEG_K;
  localparam int NTRAIN = 1 << EEG_IDX_W;       // 1024 training vectors
  localparam real FS = 125.0;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---- PPG ports ----
  logic [31:0] ppg_s_axis_tdata = '0;
  logic        ppg_s_axis_tvalid = 0, ppg_s_axis_tlast = 0, ppg_s_axis_tready;
  logic [63:0] ppg_m_axis_tdata;
  logic        ppg_m_axis_tvalid, ppg_m_axis_tlast, ppg_m_axis_tready = 0;
  logic [7:0]  ppg_axil_awaddr, ppg_axil_araddr;
  logic        ppg_axil_awvalid, ppg_axil_awready, ppg_axil_wvalid, ppg_axil_wready;
  logic [31:0] ppg_axil_wdata, ppg_axil_rdata;
  logic [3:0]  ppg_axil_wstrb;
  logic [1:0]  ppg_axil_bresp, ppg_axil_rresp;
  logic        ppg_axil_bvalid, ppg_axil_bready, ppg_axil_arvalid, ppg_axil_arready;
  logic        ppg_axil_rvalid, ppg_axil_rready, ppg_done;
  // ---- EEG ports ----
  logic [63:0] eeg_s_axis_tdata = '0;
  logic        eeg_s_axis_tvalid = 0, eeg_s_axis_tlast = 0, eeg_s_axis_tready;
  logic [7:0]  eeg_axil_awaddr, eeg_axil_araddr;
  logic        eeg_axil_awvalid, eeg_axil_awready, eeg_axil_wvalid, eeg_axil_wready;
  logic [31:0] eeg_axil_wdata, eeg_axil_rdata;
  logic [3:0]  eeg_axil_wstrb;
  logic [1:0]  eeg_axil_bresp, eeg_axil_rresp;
  logic        eeg_axil_bvalid, eeg_axil_bready, eeg_axil_arvalid, eeg_axil_arready;
  logic        eeg_axil_rvalid, eeg_axil_rready, eeg_done;

  wearable_pl_top dut (.*);

  axil_master_bfm #(.AW(8)) ppg_bus (
    .clk, .awaddr(ppg_axil_awaddr), .awvalid(ppg_axil_awvalid), .awready(ppg_axil_awready),
    .wdata(ppg_axil_wdata), .wstrb(ppg_axil_wstrb), .wvalid(ppg_axil_wvalid), .wready(ppg_axil_wready),
    .bresp(ppg_axil_bresp), .bvalid(ppg_axil_bvalid), .bready(ppg_axil_bready),
    .araddr(ppg_axil_araddr), .arvalid(ppg_axil_arvalid), .arready(ppg_axil_arready),
    .rdata(ppg_axil_rdata), .rresp(ppg_axil_rresp), .rvalid(ppg_axil_rvalid), .rready(ppg_axil_rready)
  );
  axil_master_bfm #(.AW(8)) eeg_bus (
    .clk, .awaddr(eeg_axil_awaddr), .awvalid(eeg_axil_awvalid), .awready(eeg_axil_awready),
    .wdata(eeg_axil_wdata), .wstrb(eeg_axil_wstrb), .wvalid(eeg_axil_wvalid), .wready(eeg_axil_wready),
    .bresp(eeg_axil_bresp), .bvalid(eeg_axil_bvalid), .bready(eeg_axil_bready),
    .araddr(eeg_axil_araddr), .arvalid(eeg_axil_arvalid), .arready(eeg_axil_arready),
    .rdata(eeg_axil_rdata), .rresp(eeg_axil_rresp), .rvalid(eeg_axil_rvalid), .rready(eeg_axil_rready)
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_quality_pass = 0, n_quality_fail = 0, n_acorr = 0;
  int n_taken = 0, n_dropped = 0, n_restart = 0;

  // =====================================================================
  // PPG
  // =====================================================================
  longint rx_q[$];
  bit     rx_last_q[$];
  always @(posedge clk) begin
    if (ppg_m_axis_tvalid && ppg_m_axis_tready) begin
      rx_q.push_back(longint'(ppg_m_axis_tdata));
      rx_last_q.push_back(ppg_m_axis_tlast);
    end
    ppg_m_axis_tready <= ($urandom_range(0, 3) != 0);
  end

  int     red [NMAX], ir [NMAX];
  longint xr [NMAX], xi [NMAX];
  longint ref_res [7];
  bit     ref_quality;

  task automatic reference(input int n);
    longint sr = 0, si = 0, mr, mi, dr = 0, di = 0, stt = 0, slr, sli, qr = 0, qi = 0, cx = 0;
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
      xr[i] -= (slr * t) >>> 16; xi[i] -= (sli * t) >>> 16;
      qr += xr[i] * xr[i]; qi += xi[i] * xi[i]; cx += xr[i] * xi[i];
    end
    ref_res = '{mr, mi, slr, sli, qr / n, qi / n, cx / n};
    ref_quality = (real'(cx / n) / $sqrt(real'(qr / n) * real'(qi / n))) >= 0.8;
  endtask

  task automatic ppg_preprocess(input int n);
    logic [31:0] v;
    ppg_bus.write(8'h04, 32'(n));
    ppg_bus.write(8'h00, 32'(PPG_OP_PREPROCESS));
    for (int i = 0; i < n; i++) begin
      ppg_s_axis_tdata = {16'(ir[i]), 16'(red[i])};
      ppg_s_axis_tvalid = 1; ppg_s_axis_tlast = (i == n - 1);
      #1;
      while (!ppg_s_axis_tready) @(negedge clk);
      @(negedge clk);
      ppg_s_axis_tvalid = 0; ppg_s_axis_tlast = 0;
    end
    while (rx_q.size() < 8) @(posedge clk);
    reference(n);
    for (int w = 0; w < 7; w++) check($sformatf("PPG result word %0d", w), rx_q[w], ref_res[w]);
    check("PPG quality bit", rx_q[7] & 1, ref_quality);
    check("PPG tlast", rx_last_q[7], 1);
    rx_q.delete(); rx_last_q.delete();
    do ppg_bus.read(8'h00, v); while (v[0]);
    check("PPG done output", ppg_done, 1);
    if (v[2]) n_quality_pass++; else n_quality_fail++;
  endtask

  task automatic ppg_acorr(input int n, input int m, output longint r);
    longint s = 0;
    logic [31:0] v;
    ppg_bus.write(8'h08, 32'(m));                 // IR channel
    ppg_bus.write(8'h00, 32'(PPG_OP_AUTOCORR));
    while (rx_q.size() < 1) @(posedge clk);
    r = rx_q.pop_front();
    void'(rx_last_q.pop_front());
    for (int i = 0; i + m < n; i++) s += xi[i] * xi[i+m];
    check($sformatf("PPG R(%0d)", m), r, s);
    do ppg_bus.read(8'h00, v); while (v[0]);
    n_acorr++;
  endtask

  task automatic ppg_run();
    longint rp, rc, rn;
    int k = 0;
    real bpm = 72.0, hr;
    for (int i = 0; i < NMAX; i++) begin
      real ph = 2.0 * PI * bpm / 60.0 * real'(i) / FS;
      real wave = $sin(ph) + 0.35 * $sin(2.0 * ph + 0.8);
      red[i] = int'(30000.0 + 1800.0 * wave + 2.0 * real'(i) + real'($urandom_range(0, 400)));
      ir[i]  = int'(42000.0 + 2600.0 * wave - 3.0 * real'(i) + real'($urandom_range(0, 400)));
    end
    ppg_preprocess(NMAX);
    check("PPG quality of a clean pulse", ref_quality, 1);
    ppg_acorr(NMAX, 1, rp);
    ppg_acorr(NMAX, 2, rc);
    for (int m = 3; m < NMAX - 1 && k == 0; m++) begin
      ppg_acorr(NMAX, m, rn);
      if (rc > rp && rc >= rn) k = m - 1;
      rp = rc; rc = rn;
    end
    hr = (k > 0) ? FS * 60.0 / real'(k) : 0.0;
    $display("PPG heart rate: k=%0d, %0.1f bpm (signal %0.1f bpm)", k, hr, bpm);
    checks++;
    if (hr < bpm - 3.0 || hr > bpm + 3.0) failures++;
    for (int i = 0; i < NMAX; i++) begin
      red[i] = $urandom_range(20000, 40000); ir[i] = $urandom_range(20000, 40000);
    end
    ppg_preprocess(NMAX);
    check("PPG quality of noise", ref_quality, 0);
  endtask

  // =====================================================================
  // EEG
  // =====================================================================
  logic [7:0] centre [5][160];
  logic [7:0] train  [NTRAIN][160];
  int         label  [NTRAIN];

  function automatic logic [7:0] near(input logic [7:0] c);
    int v = int'(c) + $urandom_range(0, 40) - 20;
    return 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
  endfunction

  function automatic int canberra_ref(input logic [7:0] a [160], input logic [7:0] b [160]);
    int sum = 0;
    for (int f = 0; f < 160; f++) begin
      int u = a[f], v = b[f];
      int df = (u > v) ? u - v : v - u;
      if (u + v != 0) sum += (255 * df) / (u + v);
    end
    return sum;
  endfunction

  task automatic eeg_send(input logic [7:0] vec [160], input bit last);
    for (int w = 0; w < NW; w++) begin
      for (int l = 0; l < 8; l++) eeg_s_axis_tdata[8*l +: 8] = vec[8*w + l];
      eeg_s_axis_tvalid = 1; eeg_s_axis_tlast = last && (w == NW - 1);
      #1;
      while (!eeg_s_axis_tready) @(negedge clk);
      @(negedge clk);
      eeg_s_axis_tvalid = 0; eeg_s_axis_tlast = 0;
    end
  endtask

  task automatic eeg_classify(input int cls);
    logic [7:0] test_v [160];
    logic [7:0] tr [160];
    int d [NTRAIN];
    int order [$];
    int votes [5];
    int best, kth;
    logic [31:0] v;
    bit seen [int];
    int t0, t1;
    for (int f = 0; f < 160; f++) test_v[f] = near(centre[cls][f]);
    for (int t = 0; t < NTRAIN; t++) begin
      tr = train[t];
      d[t] = canberra_ref(test_v, tr);
    end
    // mechanism count: a distance is taken if it beats the current K-th best
    begin
      int best_q [$];
      for (int t = 0; t < NTRAIN; t++) begin
        if (best_q.size() < K || d[t] < best_q[K-1]) begin
          n_taken++;
          best_q.push_back(d[t]); best_q.sort();
          if (best_q.size() > K) void'(best_q.pop_back());
        end else n_dropped++;
      end
    end
    t0 = $time;
    eeg_send(test_v, 1'b0);
    for (int t = 0; t < NTRAIN; t++) begin
      tr = train[t];
      eeg_send(tr, t == NTRAIN - 1);
    end
    while (!eeg_done) @(negedge clk);
    t1 = $time;
    $display("EEG: %0d training vectors streamed and sorted in %0d clocks", NTRAIN, (t1 - t0) / 10);
    // one word per clock: (NTRAIN+1)*NW words plus a few clocks of latency
    checks++;
    if ((t1 - t0) / 10 > (NTRAIN + 1) * NW + 8) failures++;
    // reference order
    for (int t = 0; t < NTRAIN; t++) order.push_back(t);
    order.sort() with (d[item] * NTRAIN + item);
    eeg_bus.read(8'h00, v);
    check("EEG count", v[26:16], NTRAIN);
    for (int c = 0; c < 5; c++) votes[c] = 0;
    kth = d[order[K-1]];
    for (int c = 0; c < K; c++) begin
      eeg_bus.read(8'(4 * (c + 1)), v);
      check("EEG cell distance", v[31:16], d[order[c]]);
      check("EEG cell index names that distance", d[v[9:0]], v[31:16]);
      check("EEG cell index unique", seen.exists(int'(v[9:0])), 0);
      seen[int'(v[9:0])] = 1;
      votes[label[v[9:0]]]++;
    end
    best = 0;
    for (int c = 1; c < 5; c++) if (votes[c] > votes[best]) best = c;
    $display("EEG: test vector of class %0d classified as %0d (%0d of %0d votes, K-th distance %0d)",
             cls + 1, best + 1, votes[best], K, kth);
    check("EEG predicted class", best, cls);
    eeg_bus.write(8'h00, 32'h1);
    n_restart++;
  endtask

  task automatic eeg_run();
    for (int c = 0; c < 5; c++)
      for (int f = 0; f < 160; f++) centre[c][f] = 8'($urandom_range(10, 245));
    for (int t = 0; t < NTRAIN; t++) begin
      label[t] = t % 5;
      for (int f = 0; f < 160; f++) train[t][f] = near(centre[label[t]][f]);
    end
    eeg_classify(2);
    eeg_classify(4);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      ppg_run();
      eeg_run();
    join
    $display("mechanisms: quality pass %0d, quality fail %0d, autocorrelations %0d, distances taken %0d, dropped %0d, restarts %0d",
             n_quality_pass, n_quality_fail, n_acorr, n_taken, n_dropped, n_restart);
    if (n_quality_pass == 0 || n_quality_fail == 0 || n_acorr == 0 || n_taken == 0 ||
        n_dropped == 0 || n_restart == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    check("bus responses", ppg_bus.bad_resp + eeg_bus.bad_resp, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
