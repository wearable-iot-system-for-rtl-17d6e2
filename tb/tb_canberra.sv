// tb_canberra: exhaustive check of the partial Canberra term.
// Every pair of 8-bit features is applied; the expected term is worked out in
// floating point as floor(255*|u-v|/(u+v)) (0 when both are 0) and compared.
module tb_canberra;
  logic [7:0] u, v, d;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  canberra #(.FEAT_W(8), .PART_W(8)) dut (.u, .v, .d);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    int  exp_d;
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        u = 8'(a); v = 8'(b);
        #1;
        if (a + b == 0) exp_d = 0;
        else begin
          r = 255.0 * ((a > b) ? real'(a - b) : real'(b - a)) / real'(a + b);
          exp_d = int'($floor(r + 1.0e-9));
        end
        checks++;
        if (int'(d) != exp_d) begin
          failures++;
          if (failures < 10) $display("mismatch u=%0d v=%0d d=%0d expected %0d", a, b, d, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
