// Selector and commutator between the three derivator branches and the
// linear interpolator.
//
// The branches hold CIC output samples at three consecutive input instants,
// y0 < y1 < y2 in time. The interpolation pair always contains the centre sample y1;
// the selector picks the second sample, y0 or y2, and the commutator orders the two
// so that the earlier one reaches the interpolator's early input:
//   sel_early = 1: early = y0, late = y1
//   sel_early = 0: early = y1, late = y2
// Purely combinational. The selector-commutator pair is from the derivator-section
// diagram; the rule that the centre branch is always used is this design's.
module pair_select #(
  parameter int unsigned DW = cic_pkg::GSM_DER_W
) (
  input  logic [DW-1:0] y0,
  input  logic [DW-1:0] y1,
  input  logic [DW-1:0] y2,
  input  logic          sel_early,
  output logic [DW-1:0] early,
  output logic [DW-1:0] late
);
  logic [DW-1:0] centre, side;

  always_comb begin
    // selector: two of three
    centre = y1;
    side   = sel_early ? y0 : y2;
    // commutator: straight or crossed
    if (sel_early) begin
      early = side;
      late  = centre;
    end else begin
      early = centre;
      late  = side;
    end
  end
endmodule
