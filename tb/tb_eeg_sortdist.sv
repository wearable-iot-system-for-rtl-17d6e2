// tb_eeg_sortdist: sorting core against a stable sort done in the testbench.
// Three searches are run. Each streams random 16-bit distances (drawn from a narrow
// range in one search so that ties are frequent, with random gaps), ends with TLAST,
// then reads the status and all K cells over AXI4-Lite and compares them with the K
// smallest distances; every index must name an instance of its cell's distance,
// once, and a distance that occurs only once must carry its own arrival index. A search with
// fewer than K distances checks that the unused cells read as empty. The core must
// refuse data after TLAST until START is written.
module tb_eeg_sortdist;
  import wearable_pkg::*;
  localparam int K = EEG_K;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] s_axis_tdata = '0;
  logic        s_axis_tvalid = 0, s_axis_tlast = 0, s_axis_tready;
  logic [7:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready, done;

  eeg_sortdist #(.K(K), .ADDR_W(8)) dut (.*);

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
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_unique = 0;
  bit seen [int];

  task automatic search(input int n, input int maxd, input bit gaps);
    int d [$];
    int order [$];
    logic [31:0] v;
    int stall_cycles;
    for (int i = 0; i < n; i++) d.push_back($urandom_range(0, maxd));
    // stream
    for (int i = 0; i < n; i++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) @(negedge clk);
      s_axis_tdata = 16'(d[i]); s_axis_tvalid = 1; s_axis_tlast = (i == n - 1);
      while (!s_axis_tready) @(negedge clk);
      @(negedge clk);
      s_axis_tvalid = 0; s_axis_tlast = 0;
    end
    // refuses data after the last one
    s_axis_tvalid = 1; s_axis_tdata = 0;
    stall_cycles = 0;
    repeat (4) begin @(negedge clk); if (!s_axis_tready) stall_cycles++; end
    s_axis_tvalid = 0;
    check("held off after TLAST", stall_cycles, 4);
    check("done output", done, 1);
    bfm.read(8'h00, v);
    check("status DONE/RUNNING", v[1:0], 2'b10);
    check("status count", v[26:16], n);
    // reference: stable selection of the K smallest
    for (int i = 0; i < n; i++) order.push_back(i);
    for (int a = 1; a < n; a++)          // insertion sort, stable
      for (int b = a; b > 0 && d[order[b]] < d[order[b-1]]; b--) begin
        int t = order[b]; order[b] = order[b-1]; order[b-1] = t;
      end
    seen.delete();
    for (int c = 0; c < K; c++) begin
      bfm.read(8'(4 * (c + 1)), v);
      if (c < n) begin
        // sorted distances must match exactly; the index must name an instance with
        // that distance, each instance at most once (equal distances may be in any order)
        check("cell distance", v[31:16], d[order[c]]);
        check("cell index names that distance", d[v[9:0]], v[31:16]);
        check("cell index unique", seen.exists(int'(v[9:0])), 0);
        seen[int'(v[9:0])] = 1;
        if (c == 0 || d[order[c]] != d[order[c-1]]) begin
          if (c + 1 < n && d[order[c]] != d[order[c+1]]) begin
            check("cell index of a unique distance", v[9:0], order[c]);
            n_unique++;
          end
        end
      end else begin
        check("empty cell distance", v[31:16], 16'hFFFF);
      end
    end
    bfm.write(8'h00, 32'h1);   // START the next search
    bfm.read(8'h00, v);
    check("status after START", v[1:0], 2'b01);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    search(200, 40000, 1'b1);
    search(120, 12, 1'b0);
    search(9, 500, 1'b1);
    check("bus responses", bfm.bad_resp, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
