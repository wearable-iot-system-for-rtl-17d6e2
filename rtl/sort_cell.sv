// sort_cell: one element of the insertion-sort chain of eeg_sortdist.
//
// The cell holds a distance and the index of the training instance it belongs to.
// A comparator (COMP1) checks whether the incoming distance is smaller than the stored
// one. If it is, the cell takes the incoming distance and index and passes its old
// pair on to the next cell; otherwise it keeps its pair and passes the incoming one on.
// The pass-on path is combinational, so a whole chain of cells inserts one distance
// per clock. Ties keep the stored pair (the comparison is strict, as in the document);
// equal distances may therefore end up in any order relative to each other.
// clear empties the cell: the distance becomes all ones, larger than any distance the
// classifier produces, and the index zero.
//
// The cell's structure (comparator, distance and index registers, the multiplexers on
// their inputs and outputs) is the document's; the valid qualifier, the clear and the
// empty value are this design's choices.
module sort_cell #(
  parameter int unsigned DIST_W = 16,
  parameter int unsigned IDX_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,     // empty the cell
  input  logic              in_valid,  // a distance is travelling down the chain
  input  logic [DIST_W-1:0] dist_in,
  input  logic [IDX_W-1:0]  index_in,
  output logic [DIST_W-1:0] dist_out,
  output logic [IDX_W-1:0]  index_out,
  output logic [DIST_W-1:0] distance,  // stored pair, for read-out
  output logic [IDX_W-1:0]  index
);
  logic ctrl;
  assign ctrl      = in_valid && (dist_in < distance);
  assign dist_out  = ctrl ? distance : dist_in;
  assign index_out = ctrl ? index    : index_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      distance <= '1;
      index    <= '0;
    end else if (clear) begin
      distance <= '1;
      index    <= '0;
    end else if (ctrl) begin
      distance <= dist_in;
      index    <= index_in;
    end
  end
endmodule
