// Digital front end of an IF-sampling GSM/WCDMA dual-mode receiver.
//
// The bandpass sigma-delta ADC samples an IF of 5/4 fs (fs = 99.84 MHz), so the
// wanted signal aliases to fs/4 and is brought to baseband by the shared I/Q
// splitter (iq_splitter). Its I and Q outputs feed two decimator pairs that are not
// shared between the modes:
//   WCDMA: int_cic_decimator on I and Q, decimation by 13 (7.68 MHz out),
//          13-bit integrators, 8-bit derivators;
//   GSM:   frac_cic_decimator on I and Q, decimation by 46 2/25 (about 2.167 MHz
//          out), 18-bit integrators, 14-bit derivators, linear interpolation.
// Everything runs on one clock at fs/2: the ADC delivers two samples per clock
// (adc_even = x(2m), adc_odd = x(2m+1)) with adc_valid. mode selects the pair that
// runs; the other pair is held (its clock enable is low) and keeps its state.
// The ratios are inputs and may be changed while running.
// Outputs: one DER_W-bit I/Q pair per mode, each with a one-clock valid.
// The mode enable and the two-sample ADC port are this design's choices; the rest
// follows the receiver specification. The analog front end, the later GSM filter and
// decimate-by-4 stage, the droop-correction filters and the baseband processor lie
// outside this block.
module dual_mode_decimator
  import cic_pkg::*;
(
  input  logic                        clk,          // fs/2 = 49.92 MHz
  input  logic                        rst_n,
  input  logic                        adc_valid,
  input  logic signed [ADC_W-1:0]     adc_even,     // x(2m)
  input  logic signed [ADC_W-1:0]     adc_odd,      // x(2m+1)
  input  rx_mode_e                    mode,
  input  logic        [R_W-1:0]       gsm_r_int,    // 46
  input  logic        [FRAC_W-1:0]    gsm_frac_num, // 2
  input  logic        [FRAC_W-1:0]    gsm_frac_den, // 25
  input  logic        [R_W-1:0]       wcdma_r,      // 13
  output logic signed [GSM_DER_W-1:0]   gsm_i,
  output logic signed [GSM_DER_W-1:0]   gsm_q,
  output logic                          gsm_valid,
  output logic signed [WCDMA_DER_W-1:0] wcdma_i,
  output logic signed [WCDMA_DER_W-1:0] wcdma_q,
  output logic                          wcdma_valid
);
  logic signed [BB_W-1:0] bb_i, bb_q;
  logic                   bb_valid, gsm_en, wcdma_en, gsm_q_valid, wcdma_q_valid;

  iq_splitter #(.X_W(ADC_W)) u_iq (
    .clk, .rst_n, .en(adc_valid), .adc_even, .adc_odd,
    .i_out(bb_i), .q_out(bb_q), .valid(bb_valid)
  );

  assign gsm_en   = bb_valid && (mode == MODE_GSM);
  assign wcdma_en = bb_valid && (mode == MODE_WCDMA);

  int_cic_decimator #(.N(CIC_ORDER), .IN_W(BB_W), .INT_W(WCDMA_INT_W),
                      .DER_W(WCDMA_DER_W), .R_W(R_W)) u_wcdma_i (
    .clk, .rst_n, .en(wcdma_en), .u(bb_i), .r(wcdma_r), .y(wcdma_i), .y_valid(wcdma_valid)
  );
  int_cic_decimator #(.N(CIC_ORDER), .IN_W(BB_W), .INT_W(WCDMA_INT_W),
                      .DER_W(WCDMA_DER_W), .R_W(R_W)) u_wcdma_q (
    .clk, .rst_n, .en(wcdma_en), .u(bb_q), .r(wcdma_r), .y(wcdma_q), .y_valid(wcdma_q_valid)
  );

  frac_cic_decimator #(.N(CIC_ORDER), .IN_W(BB_W), .INT_W(GSM_INT_W), .DER_W(GSM_DER_W),
                       .R_W(R_W), .FRAC_W(FRAC_W), .MU_W(MU_W)) u_gsm_i (
    .clk, .rst_n, .en(gsm_en), .u(bb_i), .r_int(gsm_r_int), .frac_num(gsm_frac_num),
    .frac_den(gsm_frac_den), .y(gsm_i), .y_valid(gsm_valid)
  );
  frac_cic_decimator #(.N(CIC_ORDER), .IN_W(BB_W), .INT_W(GSM_INT_W), .DER_W(GSM_DER_W),
                       .R_W(R_W), .FRAC_W(FRAC_W), .MU_W(MU_W)) u_gsm_q (
    .clk, .rst_n, .en(gsm_en), .u(bb_q), .r_int(gsm_r_int), .frac_num(gsm_frac_num),
    .frac_den(gsm_frac_den), .y(gsm_q), .y_valid(gsm_q_valid)
  );

  // I and Q decimators share enables and ratios, so their strobes coincide.
  assert property (@(posedge clk) disable iff (!rst_n) gsm_valid == gsm_q_valid);
  assert property (@(posedge clk) disable iff (!rst_n) wcdma_valid == wcdma_q_valid);
endmodule
