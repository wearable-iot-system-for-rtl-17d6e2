// tb_eeg_calcdist: distance core against Canberra distances worked out in the
// testbench. Three packets are sent (test vector + training vectors, TLAST at the
// end): one with random input gaps and random output back-pressure, one with
// feature values drawn from a small set so that zeros and equal features occur, and
// one streamed without gaps or back-pressure, in which the core must take one word
// per clock and deliver the last distance two clocks after the last word.
module tb_eeg_calcdist;
  import wearable_pkg::*;
  localparam int NW = EEG_WORDS;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] s_axis_tdata = '0;
  logic        s_axis_tvalid = 0, s_axis_tlast = 0, s_axis_tready;
  logic [15:0] m_axis_tdata;
  logic        m_axis_tvalid, m_axis_tlast, m_axis_tready = 0;

  eeg_calcdist #(.WORDS(NW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference Canberra distance of two vectors
  function automatic int canberra_ref(input logic [63:0] a [NW], input logic [63:0] b [NW]);
    int sum = 0;
    for (int w = 0; w < NW; w++)
      for (int l = 0; l < 8; l++) begin
        int u = int'(a[w][8*l +: 8]), v = int'(b[w][8*l +: 8]);
        int df = (u > v) ? u - v : v - u;
        if (u + v != 0) sum += (255 * df) / (u + v);
      end
    return sum;
  endfunction

  int  exp_q[$];
  bit  exp_last_q[$];
  bit  gaps = 1, bp = 1;
  int  n_out = 0;

  // output side: random back-pressure, compare in order
  always @(posedge clk) begin
    if (m_axis_tvalid && m_axis_tready) begin
      n_out++;
      if (exp_q.size() == 0) begin checks++; failures++; $display("unexpected distance"); end
      else begin
        check("distance", m_axis_tdata, exp_q.pop_front());
        check("tlast", m_axis_tlast, exp_last_q.pop_front());
      end
    end
    m_axis_tready <= bp ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  // inputs change at the falling edge; a word is taken at the rising edge that
  // follows a falling edge at which TREADY was high
  task automatic send_word(input logic [63:0] d, input bit last);
    if (gaps) while ($urandom_range(0, 3) == 0) @(negedge clk);
    s_axis_tdata = d; s_axis_tlast = last; s_axis_tvalid = 1;
    while (!s_axis_tready) @(negedge clk);
    @(negedge clk);
    s_axis_tvalid = 0; s_axis_tlast = 0;
  endtask

  task automatic run_packet(input int ntrain, input bit small_set);
    logic [63:0] test_v [NW];
    logic [63:0] train_v [NW];
    for (int w = 0; w < NW; w++)
      for (int l = 0; l < 8; l++)
        test_v[w][8*l +: 8] = small_set ? 8'($urandom_range(0, 3) * 85) : 8'($urandom);
    for (int w = 0; w < NW; w++) send_word(test_v[w], 1'b0);
    for (int t = 0; t < ntrain; t++) begin
      for (int w = 0; w < NW; w++)
        for (int l = 0; l < 8; l++)
          train_v[w][8*l +: 8] = small_set ? 8'($urandom_range(0, 3) * 85) : 8'($urandom);
      exp_q.push_back(canberra_ref(test_v, train_v));
      exp_last_q.push_back(t == ntrain - 1);
      for (int w = 0; w < NW; w++) send_word(train_v[w], (t == ntrain - 1) && (w == NW - 1));
    end
  endtask

  initial begin
    int t_first, t_last, cyc, ntr;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_packet(25, 1'b0);
    run_packet(15, 1'b1);
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    // full-rate packet
    gaps = 0; bp = 0;
    repeat (2) @(negedge clk);
    ntr = 12;
    cyc = 0;
    fork
      run_packet(ntr, 1'b0);
      begin
        #1;
        while (!(s_axis_tvalid && s_axis_tready)) begin @(negedge clk); cyc++; end
        t_first = cyc;
        while (!(m_axis_tvalid && m_axis_tready && m_axis_tlast)) begin @(negedge clk); cyc++; end
        t_last = cyc;
      end
    join
    // (ntrain+1)*NW words at one per clock, then two clocks of latency
    check("cycles first word to last distance", t_last - t_first, (ntr + 1) * NW - 1 + 2);
    repeat (5) @(posedge clk);
    check("all distances delivered", exp_q.size(), 0);
    check("distances counted", n_out, 25 + 15 + ntr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
