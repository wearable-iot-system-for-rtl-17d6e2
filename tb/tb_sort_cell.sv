// tb_sort_cell: one insertion-sort cell against a model of its rule.
// Random distances (with repeats, to hit ties) are offered with random valid and
// occasional clears; the pass-on outputs and the stored pair are compared every clock
// with a model that keeps the smaller distance.
module tb_sort_cell;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        clear, in_valid;
  logic [15:0] dist_in, dist_out, distance;
  logic [9:0]  index_in, index_out, index;
  int checks = 0, failures = 0;
  int n_take = 0, n_pass = 0, n_tie = 0;
  always #5 clk = ~clk;

  sort_cell #(.DIST_W(16), .IDX_W(10)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int m_dist = 16'hFFFF, m_idx = 0;
  initial begin
    clear = 0; in_valid = 0; dist_in = 0; index_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      clear    = ($urandom_range(0, 99) == 0);
      in_valid = ($urandom_range(0, 3) != 0);
      dist_in  = 16'($urandom_range(0, 40));
      index_in = 10'($urandom);
      #1;
      if (!clear) begin
        if (in_valid && int'(dist_in) < m_dist) begin
          check("dist_out", dist_out, m_dist);
          check("index_out", index_out, m_idx);
          n_take++;
        end else begin
          check("dist_out", dist_out, dist_in);
          check("index_out", index_out, index_in);
          if (in_valid) n_pass++;
          if (in_valid && int'(dist_in) == m_dist) n_tie++;
        end
      end
      @(posedge clk);
      if (clear) begin m_dist = 16'hFFFF; m_idx = 0; end
      else if (in_valid && int'(dist_in) < m_dist) begin m_dist = dist_in; m_idx = index_in; end
      #1;
      check("distance", distance, m_dist);
      check("index", index, m_idx);
    end
    if (n_take == 0 || n_pass == 0 || n_tie == 0) begin
      failures++;
      $display("coverage: take=%0d pass=%0d tie=%0d", n_take, n_pass, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
