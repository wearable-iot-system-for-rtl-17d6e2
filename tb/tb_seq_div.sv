// tb_seq_div: sequential signed divider against the simulator's own integer
// division (truncation toward zero). Random operands of random magnitude and sign,
// plus edge cases (zero numerator, division by zero, divisor 1 and -1, the largest
// magnitudes). Also checks that done is set W clocks after the edge that takes start.
module tb_seq_div;
  localparam int W = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                start = 0, busy, done;
  logic signed [W-1:0] num = '0, den = '0, quo;

  seq_div #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input longint a, input longint b);
    longint expq;
    int lat = 0;
    @(negedge clk);
    num = a; den = b; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    expq = (b == 0) ? 0 : a / b;
    checks += 2;
    if (quo != expq) begin
      failures++;
      if (failures < 10) $display("%0d / %0d: got %0d expected %0d", a, b, quo, expq);
    end
    if (lat != W + 1) begin   // start taken at one edge, done set W edges later
      failures++;
      if (failures < 10) $display("latency %0d, expected %0d", lat, W + 1);
    end
  endtask

  function automatic longint rnd(input int bits);
    longint v = {$urandom, $urandom};
    v = (bits >= 63) ? (v & 64'h7FFF_FFFF_FFFF_FFFF) : (v & ((64'sd1 <<< bits) - 1));
    return ($urandom_range(0, 1) == 1) ? -v : v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    divide(0, 7);
    divide(123, 0);
    divide(-5, 1);
    divide(5, -1);
    divide(64'sh7FFF_FFFF_FFFF_FFFF, 3);
    divide(-64'sh7FFF_FFFF_FFFF_FFFF, 64'sh7FFF_FFFF_FFFF_FFFF);
    divide(-7, 2);
    divide(7, -2);
    for (int i = 0; i < 400; i++) divide(rnd($urandom_range(1, 63)), rnd($urandom_range(1, 40)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
