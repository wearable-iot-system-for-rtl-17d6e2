// canberra: one partial term of the Canberra distance between two feature values,
//   d = |u - v| / (|u| + |v|).
// Features are normalised to [0,1] before classification, so both inputs are
// unsigned fractions and |u| = u. The quotient also lies in [0,1]; it is returned as
// an 8-bit fraction scaled by 255, d_q = floor(255*|u-v| / (u+v)), so that the
// largest term (one feature zero, the other not) is exactly 255. The term for
// u = v = 0 is defined as 0. The formula is the document's; the 8-bit output width
// is the one its block diagram prints; the scaling by 255 and the 0/0 rule are this
// design's choices.
//
// Purely combinational: the result is valid in the same cycle as the inputs.
// Eight of these sit side by side in eeg_calcdist, one per byte lane.
module canberra #(
  parameter int unsigned FEAT_W = 8,   // width of one feature
  parameter int unsigned PART_W = 8    // width of the scaled partial term
) (
  input  logic [FEAT_W-1:0] u,
  input  logic [FEAT_W-1:0] v,
  output logic [PART_W-1:0] d
);
  localparam int unsigned NUM_W = FEAT_W + PART_W;
  localparam logic [PART_W-1:0] SCALE = {PART_W{1'b1}};

  logic [FEAT_W-1:0] diff;
  logic [FEAT_W:0]   den;
  logic [NUM_W-1:0]  num;

  always_comb begin
    diff = (u > v) ? (u - v) : (v - u);
    den  = {1'b0, u} + {1'b0, v};
    num  = NUM_W'(diff) * NUM_W'(SCALE);
    // the quotient never exceeds SCALE because diff <= den
    d    = (den == '0) ? '0 : PART_W'(num / NUM_W'(den));
  end
endmodule
