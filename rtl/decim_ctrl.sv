// Sampling controller for the integer and the fractional CIC decimator.
//
// The decimator's k-th output lies at input instant tau_k = tau_0 + k*(R + F/L).
// The controller keeps tau_k as an integer part and a numerator f (tau frac = f/L)
// and, per output, tells NBR branch samplers on which fs/2 clock to take the
// integrator taps and whether the instant is even or odd.
//   NBR = 1 (integer decimation, F = 0): the one branch samples at tau_k.
//   NBR = 3 (fractional decimation): the branches sample three consecutive instants
//     m-1, m, m+1 around m = round(tau_k). If the fraction f/L is below one half the
//     interpolation pair is (m, m+1), branches 1 and 2 (sel_early = 0); otherwise it
//     is (m-1, m), branches 0 and 1 (sel_early = 1). Either way the pair brackets
//     tau_k and the interpolation weight of the later sample is mu = f/L.
// pos is the instant of branch 0 relative to the even instant of the current clock.
// Branch j fires when pos+j is 0 or 1; when the last branch fires (done) the next
// output is scheduled: f += F, a carry past L adds one instant, and pos advances by
// R + carry + (change of the rounding correction).
// The ratio inputs r_int, frac_num, frac_den are read at each done, so the ratio can
// be changed while running; frac_num < frac_den and r_int >= 4 are required.
// mu = floor(f * 2^MU_W / L), with the L that f was counted in, and sel_early are registered at done and hold until the
// next done. After reset tau_0 = 0 (NBR = 1) or 1 (NBR = 3), f = 0.
// The architecture needs these control signals for its parallel derivators; the scheme
// above (phase accumulator, centred triplet, exact rational fraction) is this
// design's own.
module decim_ctrl #(
  parameter int unsigned NBR    = 3,               // number of branches, 1 or 3
  parameter int unsigned R_W    = cic_pkg::R_W,
  parameter int unsigned FRAC_W = cic_pkg::FRAC_W,
  parameter int unsigned MU_W   = cic_pkg::MU_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,        // one fs/2 clock of input this cycle
  input  logic [R_W-1:0]    r_int,     // integer part R of the ratio
  input  logic [FRAC_W-1:0] frac_num,  // F
  input  logic [FRAC_W-1:0] frac_den,  // L
  output logic [NBR-1:0]    cap,       // branch j samples this clock
  output logic [NBR-1:0]    odd,       // ... at the odd instant 2m+1
  output logic              done,      // last branch of this output sampled
  output logic              sel_early, // pair is branches (0,1), else (1,2)
  output logic [MU_W-1:0]   mu         // weight of the later sample, 2^-MU_W units
);
  localparam int unsigned P_W = R_W + 3;

  logic signed [P_W-1:0]  pos;
  logic [FRAC_W-1:0]      f;
  logic [FRAC_W-1:0]      l_cur;       // denominator f is counted in
  logic                   c;           // rounding correction of the current output
  logic [FRAC_W:0]        f_sum;
  logic                   carry, c_nxt;
  logic [FRAC_W-1:0]      f_nxt;
  logic signed [P_W-1:0]  delta;

  always_comb begin
    for (int j = 0; j < NBR; j++) begin
      logic signed [P_W-1:0] pj;
      pj     = pos + P_W'(j);
      cap[j] = en && (pj == 0 || pj == 1);
      odd[j] = pj[0];
    end
    done  = cap[NBR-1];
    f_sum = {1'b0, f} + {1'b0, frac_num};
    carry = (frac_den != 0) && (f_sum >= {1'b0, frac_den});
    f_nxt = (frac_den == 0) ? '0 : (carry ? FRAC_W'(f_sum - {1'b0, frac_den}) : FRAC_W'(f_sum));
    c_nxt = (NBR == 3) && ({f_nxt, 1'b0} >= {1'b0, frac_den}) && (frac_den != 0);
    delta = P_W'(r_int) + P_W'(carry) + P_W'(c_nxt) - P_W'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      f         <= '0;
      l_cur     <= '0;
      c         <= 1'b0;
      sel_early <= 1'b0;
      mu        <= '0;
    end else if (en) begin
      if (done) begin
        pos       <= pos - 2 + delta;
        f         <= f_nxt;
        l_cur     <= frac_den;
        c         <= c_nxt;
        sel_early <= c;
        mu        <= (l_cur == 0) ? '0
                   : MU_W'(({f, {MU_W{1'b0}}}) / (FRAC_W+MU_W)'(l_cur));
      end else begin
        pos <= pos - 2;
      end
    end
  end

  initial assert (NBR == 1 || NBR == 3) else $error("decim_ctrl: NBR must be 1 or 3");
  assert property (@(posedge clk) disable iff (!rst_n) done |-> r_int >= 4)
    else $error("decim_ctrl: integer ratio below 4");
  assert property (@(posedge clk) disable iff (!rst_n) done && frac_den != 0 |-> frac_num < frac_den)
    else $error("decim_ctrl: fraction numerator must be below the denominator");
endmodule
