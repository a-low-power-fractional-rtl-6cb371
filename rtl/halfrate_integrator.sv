// CIC integrator section clocked at half the input rate.
//
// The input x(n) of a CIC decimator behind an fs/4 downconverter is zero at every
// other instant. Writing the N cascaded integrators of the full-rate filter,
//   s_k(n) = s_{k-1}(n-1) + s_k(n-1),  s_0 = x,
// two steps at a time and using x(2m) = 0 gives a recursion over even instants only:
//   S_1[m+1] = S_1[m] + u[m]                      u[m] = x(2m+1), the non-zero input
//   S_2[m+1] = S_2[m] + 2 S_1[m]
//   S_k[m+1] = S_k[m] + 2 S_{k-1}[m] + S_{k-2}[m]  for k >= 3
// with S_k[m] = s_k(2m). The second stage is one adder with its input shifted left,
// every later stage one three-input adder. The odd-instant values follow as
//   s_k(2m+1) = S_{k-1}[m] + S_k[m]
// and are formed only when needed, by the branch samplers, from the two taps brought
// out here: s_even = S_N[m] and s_prev = S_{N-1}[m].
// All arithmetic wraps modulo 2^W, as a CIC integrator's must; the comb section
// removes the wrap. Registers reset to zero. Clock: fs/2; en freezes the state.
// The recursion and the taps follow the architecture's derivation for N = 4; other
// orders use the same rule, which is this design's generalisation.
module halfrate_integrator #(
  parameter int unsigned N    = cic_pkg::CIC_ORDER,  // CIC order, >= 2
  parameter int unsigned IN_W = cic_pkg::BB_W,       // input width, two's complement
  parameter int unsigned W    = cic_pkg::GSM_INT_W   // integrator wordlength
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,      // one non-zero input sample this clock
  input  logic signed [IN_W-1:0] u,     // x(2m+1)
  output logic        [W-1:0]  s_even,  // S_N[m]   = s_N(2m)
  output logic        [W-1:0]  s_prev   // S_{N-1}[m] = s_{N-1}(2m)
);
  logic [W-1:0] s [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) s[k] <= '0;
    end else if (en) begin
      s[0] <= s[0] + W'(u);
      s[1] <= s[1] + (s[0] << 1);
      for (int k = 2; k < N; k++) s[k] <= s[k] + (s[k-1] << 1) + s[k-2];
    end
  end

  assign s_even = s[N-1];
  assign s_prev = s[N-2];

  initial assert (N >= 2) else $error("halfrate_integrator: N must be at least 2");
endmodule
