// Integer-ratio CIC decimator for an fs/4-downconverted branch (WCDMA mode).
//
// An N-th order CIC filter whose integrators all run at fs/2 (halfrate_integrator),
// followed by one branch sampler that picks the integrator output at every R-th
// input instant, even or odd, and a comb section at fs/R. Any ratio R >= 4 works,
// odd ones included, and r may be changed while running: the new value applies from
// the next output on. Input: one non-zero baseband sample per fs/2 clock with en.
// Output: y, two's complement DER_W bits, and a one-clock y_valid per output.
// Timing: y_valid comes two clocks after the clock on which the integrator taps are
// sampled; the first output is the filter's response at input instant 0.
// Structure, ratio and wordlengths (13-bit integrators, 8-bit derivators, R = 13)
// follow the receiver specification; the order N = 3 is read from its three listed
// wordlengths per section.
module int_cic_decimator #(
  parameter int unsigned N     = cic_pkg::CIC_ORDER,
  parameter int unsigned IN_W  = cic_pkg::BB_W,
  parameter int unsigned INT_W = cic_pkg::WCDMA_INT_W,
  parameter int unsigned DER_W = cic_pkg::WCDMA_DER_W,
  parameter int unsigned R_W   = cic_pkg::R_W
) (
  input  logic                   clk,      // fs/2
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] u,        // x(2m+1)
  input  logic        [R_W-1:0]  r,        // decimation ratio
  output logic signed [DER_W-1:0] y,
  output logic                   y_valid
);
  logic [INT_W-1:0] s_even, s_prev;
  logic [0:0]       cap, odd;
  logic             done, done_d, sel_unused;
  logic [cic_pkg::MU_W-1:0] mu_unused;
  logic [DER_W-1:0] sample, comb_y;

  halfrate_integrator #(.N(N), .IN_W(IN_W), .W(INT_W)) u_int (
    .clk, .rst_n, .en, .u, .s_even, .s_prev
  );

  decim_ctrl #(.NBR(1), .R_W(R_W)) u_ctrl (
    .clk, .rst_n, .en, .r_int(r),
    .frac_num('0), .frac_den(cic_pkg::FRAC_W'(1)),
    .cap, .odd, .done, .sel_early(sel_unused), .mu(mu_unused)
  );

  branch_sampler #(.W(INT_W), .DW(DER_W)) u_smp (
    .clk, .rst_n, .cap(cap[0]), .odd(odd[0]), .s_even, .s_prev, .sample
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_d  <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      done_d  <= done;
      y_valid <= done_d;
    end
  end

  comb_section #(.N(N), .DW(DER_W)) u_comb (
    .clk, .rst_n, .en(done_d), .x(sample), .y(comb_y)
  );

  assign y = comb_y;
endmodule
