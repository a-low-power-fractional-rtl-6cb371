// fs/4 downconverter and I/Q splitter, working at half the ADC rate.
//
// With the IF at an odd multiple of fs/4, downconversion to baseband is a
// multiplication of the ADC samples by 1, 0, -1, 0, ... (I) and 0, 1, 0, -1, ... (Q).
// Every other product is zero, so each clock (fs/2) this block takes two ADC samples,
// x(2m) on adc_even and x(2m+1) on adc_odd, and emits only the non-zero products:
//   i_out = (-1)^m * x(2m),   q_out = (-1)^m * x(2m+1).
// The zero samples are implicit; the half-rate integrators downstream rely on them.
// Timing: outputs are registered, one clock after the inputs, when en is high. The
// sign phase m advances only on enabled clocks and restarts at +1 after reset.
// The multiplication sequences follow the receiver description; the half-rate
// two-sample input port, the register stage and the enable are this design's choices.
module iq_splitter #(
  parameter int unsigned X_W = cic_pkg::ADC_W    // ADC code width, two's complement
) (
  input  logic                clk,       // fs/2
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [X_W-1:0] adc_even, // x(2m)
  input  logic signed [X_W-1:0] adc_odd,  // x(2m+1)
  output logic signed [X_W:0]   i_out,    // I(2m)
  output logic signed [X_W:0]   q_out,    // Q(2m+1)
  output logic                valid
);
  logic neg;  // 1 on odd m: the sequences are at their -1 phase

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg   <= 1'b0;
      i_out <= '0;
      q_out <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        neg   <= ~neg;
        i_out <= neg ? -(X_W+1)'(adc_even) : (X_W+1)'(adc_even);
        q_out <= neg ? -(X_W+1)'(adc_odd)  : (X_W+1)'(adc_odd);
      end
    end
  end
endmodule
