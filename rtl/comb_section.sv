// CIC derivator (comb) section at the decimated rate.
//
// N cascaded first differences, y_k = x_k - x_k(previous), each with a differential
// delay of one decimated sample. On every clock with en high the section takes one
// sample and its registered output y is updated; y holds between strobes.
// Arithmetic wraps modulo 2^DW, which cancels the wrap-around of the integrators as
// long as the filter's output fits in DW bits. Delay registers reset to zero.
// Timing: y is valid the clock after en.
// The comb structure is the standard CIC derivator of the architecture; the
// differential delay of one and the output register are this design's choices.
module comb_section #(
  parameter int unsigned N  = cic_pkg::CIC_ORDER,
  parameter int unsigned DW = cic_pkg::GSM_DER_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] x,
  output logic [DW-1:0] y
);
  logic [DW-1:0] dly [N];   // previous input of each stage
  logic [DW-1:0] v   [N+1]; // v[0] = x, v[k+1] = v[k] - dly[k]

  always_comb begin
    v[0] = x;
    for (int k = 0; k < N; k++) v[k+1] = v[k] - dly[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) dly[k] <= '0;
      y <= '0;
    end else if (en) begin
      for (int k = 0; k < N; k++) dly[k] <= v[k];
      y <= v[N];
    end
  end
endmodule
