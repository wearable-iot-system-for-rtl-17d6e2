// seq_div: sequential signed divider, one quotient bit per clock.
//
// A one-clock start pulse loads the numerator and denominator. The divider works on
// their magnitudes with the restoring shift-and-subtract method, W clocks for W bits,
// then fixes the sign, so the quotient is truncated toward zero (the rule of integer
// division in C and SystemVerilog). done pulses for one clock when quo is valid; quo
// then holds until the next start. Division by zero returns 0. busy is high from the
// clock after start until done.
//
// Helper of ppg_core, which divides by the buffer length (means, mean squares, the
// correlation dot product) and by the regression constant. The document states the
// divisions; how they are carried out is this design's choice.
module seq_div #(
  parameter int unsigned W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] num,
  input  logic signed [W-1:0] den,
  output logic signed [W-1:0] quo,
  output logic                busy,
  output logic                done
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  q;        // shifts out the dividend, shifts in quotient bits
  logic [W-1:0]  rem;      // partial remainder, always below the divisor
  logic [W-1:0]  divisor;
  logic          neg;
  logic          zero;
  logic [CW-1:0] steps;

  logic [W:0]   rem_sh;
  logic [W-1:0] rem_next;
  logic [W-1:0] q_next;
  always_comb begin
    rem_sh = {rem, q[W-1]};
    if (rem_sh >= {1'b0, divisor}) begin
      rem_next = W'(rem_sh - {1'b0, divisor});
      q_next   = {q[W-2:0], 1'b1};
    end else begin
      rem_next = W'(rem_sh);
      q_next   = {q[W-2:0], 1'b0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; divisor <= '0; neg <= 1'b0; zero <= 1'b0;
      steps <= '0; busy <= 1'b0; done <= 1'b0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q       <= num[W-1] ? -num : num;
        divisor <= den[W-1] ? -den : den;
        neg     <= num[W-1] ^ den[W-1];
        zero    <= (den == '0);
        rem     <= '0;
        steps   <= CW'(W);
        busy    <= 1'b1;
      end else if (busy) begin
        rem   <= rem_next;
        q     <= q_next;
        steps <= steps - 1'b1;
        if (steps == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= zero ? '0 : (neg ? -$signed(q_next) : $signed(q_next));
        end
      end
    end
  end
endmodule
