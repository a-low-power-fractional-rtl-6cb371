// Linear interpolator (LI) at the decimated rate.
//
// Computes y = early + (late - early) * mu / 2^MU_W, the straight line between two
// CIC output samples one input instant apart, evaluated at the fractional position
// mu / 2^MU_W (0 <= mu < 2^MU_W). The product is rounded toward minus infinity
// (arithmetic shift). Samples are two's complement of width DW; the result stays
// between the two inputs and so fits DW bits.
// Timing: one register; y is updated the clock after en and holds, valid pulses
// with it.
// Linear interpolation is part of the architecture; word widths and rounding are this
// design's choices.
module linear_interp #(
  parameter int unsigned DW   = cic_pkg::GSM_DER_W,
  parameter int unsigned MU_W = cic_pkg::MU_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] early,
  input  logic signed [DW-1:0] late,
  input  logic        [MU_W-1:0] mu,
  output logic signed [DW-1:0] y,
  output logic                 valid
);
  logic signed [DW:0]        diff;
  logic signed [DW+MU_W+1:0] prod;
  logic signed [DW+1:0]      step;

  always_comb begin
    diff = (DW+1)'(late) - (DW+1)'(early);
    prod = diff * $signed({1'b0, mu});
    step = (DW+2)'(prod >>> MU_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) y <= DW'((DW+2)'(early) + step);
    end
  end
endmodule
