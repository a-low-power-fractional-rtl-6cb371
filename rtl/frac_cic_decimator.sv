// Fractional-ratio CIC decimator for an fs/4-downconverted branch (GSM mode).
//
// Decimation by R + F/L (46 2/25 by default) as a CIC filter followed by a linear
// interpolator, with the interpolator moved behind the decimation. The integrator
// section runs at fs/2 (halfrate_integrator). Three branch samplers take the
// integrator output at three consecutive input instants around each output instant
// tau_k = 1 + k*(R + F/L); each feeds its own comb section (D1..D3) at the output rate.
// A selector and commutator (pair_select) hand the two comb outputs that bracket
// tau_k, earlier one first, to the linear interpolator, which weights them with the
// fraction of tau_k. The decimation-rate samples of each branch are spaced between
// R-1 and R+2 instants apart, so each comb differences samples of unequal spacing.
// Input: one non-zero baseband sample per fs/2 clock with en. Ratio inputs may be
// changed while running (read once per output). Output: y, DER_W bits two's
// complement, with a one-clock y_valid.
// Timing: y_valid comes three clocks after the clock on which the last branch took
// its taps.
// Structure and wordlengths (18-bit integrators, 14-bit derivators) follow the
// receiver specification; the control scheme, the order N = 3 and the fraction
// width are this design's choices.
module frac_cic_decimator #(
  parameter int unsigned N        = cic_pkg::CIC_ORDER,
  parameter int unsigned IN_W     = cic_pkg::BB_W,
  parameter int unsigned INT_W    = cic_pkg::GSM_INT_W,
  parameter int unsigned DER_W    = cic_pkg::GSM_DER_W,
  parameter int unsigned R_W      = cic_pkg::R_W,
  parameter int unsigned FRAC_W   = cic_pkg::FRAC_W,
  parameter int unsigned MU_W     = cic_pkg::MU_W
) (
  input  logic                    clk,       // fs/2
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  u,         // x(2m+1)
  input  logic        [R_W-1:0]   r_int,     // R
  input  logic        [FRAC_W-1:0] frac_num, // F
  input  logic        [FRAC_W-1:0] frac_den, // L
  output logic signed [DER_W-1:0] y,
  output logic                    y_valid
);
  logic [INT_W-1:0] s_even, s_prev;
  logic [2:0]       cap, odd;
  logic             done, done_d, comb_v;
  logic             sel_early;
  logic [MU_W-1:0]  mu;
  logic [DER_W-1:0] sample [3];
  logic [DER_W-1:0] comb_y [3];
  logic signed [DER_W-1:0] early, late;

  halfrate_integrator #(.N(N), .IN_W(IN_W), .W(INT_W)) u_int (
    .clk, .rst_n, .en, .u, .s_even, .s_prev
  );

  decim_ctrl #(.NBR(3), .R_W(R_W), .FRAC_W(FRAC_W), .MU_W(MU_W)) u_ctrl (
    .clk, .rst_n, .en, .r_int, .frac_num, .frac_den,
    .cap, .odd, .done, .sel_early, .mu
  );

  for (genvar j = 0; j < 3; j++) begin : g_branch
    branch_sampler #(.W(INT_W), .DW(DER_W)) u_smp (
      .clk, .rst_n, .cap(cap[j]), .odd(odd[j]), .s_even, .s_prev, .sample(sample[j])
    );
    comb_section #(.N(N), .DW(DER_W)) u_comb (
      .clk, .rst_n, .en(done_d), .x(sample[j]), .y(comb_y[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_d <= 1'b0;
      comb_v <= 1'b0;
    end else begin
      done_d <= done;
      comb_v <= done_d;
    end
  end

  pair_select #(.DW(DER_W)) u_sel (
    .y0(comb_y[0]), .y1(comb_y[1]), .y2(comb_y[2]), .sel_early,
    .early(early), .late(late)
  );

  linear_interp #(.DW(DER_W), .MU_W(MU_W)) u_li (
    .clk, .rst_n, .en(comb_v), .early(early), .late(late), .mu, .y, .valid(y_valid)
  );
endmodule
