// tb_axil_regs: AXI4-Lite front end against a register file kept in the testbench.
// Writes put address and data on the bus at different random times and take the
// response after a random delay; reads likewise. Every write must reach the register
// port exactly once with the right word address, data and strobes, every read must
// return the value of the addressed register with an OKAY response.
module tb_axil_regs;
  localparam int AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic          s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 0;
  logic          s_axil_arvalid = 0, s_axil_rready = 0;
  logic [31:0]   s_axil_wdata = '0;
  logic [3:0]    s_axil_wstrb = '0;
  logic          s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [1:0]    s_axil_bresp, s_axil_rresp;
  logic [31:0]   s_axil_rdata;
  logic          reg_wr, reg_rd;
  logic [AW-3:0] reg_waddr, reg_raddr;
  logic [31:0]   reg_wdata, reg_rdata;
  logic [3:0]    reg_wstrb;

  axil_regs #(.ADDR_W(AW)) dut (.*);

  // register file behind the port
  logic [31:0] regs [64];
  int n_wr_pulses = 0;
  assign reg_rdata = regs[reg_raddr];
  always_ff @(posedge clk) if (reg_wr) begin
    n_wr_pulses <= n_wr_pulses + 1;
    for (int b = 0; b < 4; b++) if (reg_wstrb[b]) regs[reg_waddr][8*b +: 8] <= reg_wdata[8*b +: 8];
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axil_write(input logic [AW-1:0] addr, input logic [31:0] data, input logic [3:0] strb);
    int da = $urandom_range(0, 3), dw = $urandom_range(0, 3);
    bit aw_done = 0, w_done = 0;
    fork
      begin
        repeat (da) @(posedge clk);
        s_axil_awaddr <= addr; s_axil_awvalid <= 1;
        do @(posedge clk); while (!(s_axil_awvalid && s_axil_awready));
        s_axil_awvalid <= 0;
      end
      begin
        repeat (dw) @(posedge clk);
        s_axil_wdata <= data; s_axil_wstrb <= strb; s_axil_wvalid <= 1;
        do @(posedge clk); while (!(s_axil_wvalid && s_axil_wready));
        s_axil_wvalid <= 0;
      end
    join
    repeat ($urandom_range(0, 2)) @(posedge clk);
    s_axil_bready <= 1;
    do @(posedge clk); while (!s_axil_bvalid);
    check("bresp", s_axil_bresp, 0);
    s_axil_bready <= 0;
  endtask

  task automatic axil_read(input logic [AW-1:0] addr, output logic [31:0] data);
    s_axil_araddr <= addr; s_axil_arvalid <= 1;
    do @(posedge clk); while (!(s_axil_arvalid && s_axil_arready));
    s_axil_arvalid <= 0;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    s_axil_rready <= 1;
    do @(posedge clk); while (!s_axil_rvalid);
    data = s_axil_rdata;
    check("rresp", s_axil_rresp, 0);
    s_axil_rready <= 0;
  endtask

  logic [31:0] model [64];
  initial begin
    logic [31:0] d, v;
    logic [3:0]  s;
    int a;
    for (int i = 0; i < 64; i++) begin regs[i] = 32'(i) * 32'h01010101; model[i] = regs[i]; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int it = 0; it < 300; it++) begin
      a = $urandom_range(0, 63);
      if ($urandom_range(0, 1) == 1) begin
        d = $urandom; s = 4'($urandom_range(1, 15));
        axil_write(AW'(a * 4 + $urandom_range(0, 3)), d, s);
        for (int b = 0; b < 4; b++) if (s[b]) model[a][8*b +: 8] = d[8*b +: 8];
      end else begin
        axil_read(AW'(a * 4), v);
        check("rdata", v, model[a]);
      end
    end
    // every register once more, and the number of write pulses
    for (int i = 0; i < 64; i++) begin
      axil_read(AW'(i * 4), v);
      check("final rdata", v, model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
