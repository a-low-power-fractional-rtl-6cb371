// One decimated-sample tap of the half-rate integrator section.
//
// At the decimated rate the integrator output is needed at single input instants t,
// even or odd. Even instants are a register of the integrator (s_even); odd ones are
// one addition away (s_prev + s_even). Two down-sampling registers take both taps on
// the clock chosen by the controller (cap high, odd telling the instant's parity),
// and the odd-sample adder and the even/odd multiplexer work on the held values, so
// that they toggle only at the decimated rate. The selected sample is then reduced
// from the integrator wordlength W to the derivator wordlength DW by dropping the
// W-DW least significant bits (truncation).
// Timing: sample is valid from the clock after cap until the next cap.
// The register/adder/multiplexer arrangement follows the published integrator and
// derivator diagrams; truncation as the rounding rule is this design's choice.
module branch_sampler #(
  parameter int unsigned W  = cic_pkg::GSM_INT_W,  // integrator wordlength
  parameter int unsigned DW = cic_pkg::GSM_DER_W   // derivator wordlength, <= W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cap,      // take the taps this clock
  input  logic          odd,      // instant is 2m+1 (else 2m)
  input  logic [W-1:0]  s_even,   // s_N(2m)
  input  logic [W-1:0]  s_prev,   // s_{N-1}(2m)
  output logic [DW-1:0] sample    // s_N(t), top DW bits
);
  logic [W-1:0] even_r, prev_r, odd_sum, pick;
  logic         odd_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      even_r <= '0;
      prev_r <= '0;
      odd_r  <= 1'b0;
    end else if (cap) begin
      even_r <= s_even;
      prev_r <= s_prev;
      odd_r  <= odd;
    end
  end

  always_comb begin
    odd_sum = even_r + prev_r;           // s_N(2m+1) = s_{N-1}(2m) + s_N(2m)
    pick    = odd_r ? odd_sum : even_r;
    sample  = pick[W-1 -: DW];
  end

  initial assert (DW <= W) else $error("branch_sampler: DW must not exceed W");
endmodule
