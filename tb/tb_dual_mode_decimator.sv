// End-to-end testbench of dual_mode_decimator at its default parameters.
//
// Random 2-bit ADC codes are fed for 7000 clocks (fs/2) with the receiver in GSM
// mode, then WCDMA mode, then GSM mode again, at the default ratios 46 2/25 and 13.
// A model of the fs/4 I/Q splitter routes each baseband sample to the decimator
// pair that is running when it arrives; the reference models of cic_model_pkg give
// the expected I and Q outputs of each pair, which must match bit for bit and in
// order. The test also counts that each mechanism happened: both mode switches,
// GSM outputs after resuming, both interpolation-pair selections, fractional carry
// steps, WCDMA samples taken at odd instants, and a change of the WCDMA ratio from
// 13 to 12 while running.
module tb_dual_mode_decimator;
  import cic_pkg::*;
  import cic_model_pkg::*;

  localparam int PA = 3000, PB = 2000, PC = 2000;
  localparam int NCYC = PA + PB + PC;
  localparam int W_CHG = 100, W_R2 = 12;   // WCDMA ratio change while running

  logic clk = 0, rst_n = 0, adc_valid = 0;
  logic signed [ADC_W-1:0] adc_even = '0, adc_odd = '0;
  rx_mode_e mode = MODE_GSM;
  logic signed [GSM_DER_W-1:0] gsm_i, gsm_q;
  logic signed [WCDMA_DER_W-1:0] wcdma_i, wcdma_q;
  logic gsm_valid, wcdma_valid;
  logic [R_W-1:0] wcdma_r = R_W'(WCDMA_R);
  int checks = 0, failures = 0;

  dual_mode_decimator dut (
    .clk, .rst_n, .adc_valid, .adc_even, .adc_odd, .mode,
    .gsm_r_int(R_W'(GSM_R_INT)), .gsm_frac_num(FRAC_W'(GSM_FRAC_NUM)),
    .gsm_frac_den(FRAC_W'(GSM_FRAC_DEN)), .wcdma_r,
    .gsm_i, .gsm_q, .gsm_valid, .wcdma_i, .wcdma_q, .wcdma_valid
  );

  always #5 clk = ~clk;

  int xe [NCYC], xo [NCYC];
  rx_mode_e md [NCYC+1];
  int gi[$], gq[$], wi[$], wq[$];         // decimator inputs
  int egi[$], egq[$], ewi[$], ewq[$];     // expected outputs
  int n_early, n_late, n_carry, n_odd, dummy_a, dummy_b, dummy_c;

  task automatic build_reference();
    for (int j = 0; j < NCYC; j++) begin
      int sgn, bi, bq;
      sgn = (j % 2 == 0) ? 1 : -1;
      bi = sgn * xe[j];
      bq = sgn * xo[j];
      // the splitter output of ADC clock j is routed by the mode of clock j+1
      if (md[j+1] == MODE_GSM) begin gi.push_back(bi); gq.push_back(bq); end
      else begin wi.push_back(bi); wq.push_back(bq); end
    end
    frac_decim(gi, CIC_ORDER, GSM_INT_W, GSM_DER_W, MU_W, GSM_R_INT, GSM_FRAC_NUM,
               GSM_FRAC_DEN, egi, n_early, n_late, n_carry);
    frac_decim(gq, CIC_ORDER, GSM_INT_W, GSM_DER_W, MU_W, GSM_R_INT, GSM_FRAC_NUM,
               GSM_FRAC_DEN, egq, dummy_a, dummy_b, dummy_c);
    // a new ratio set at output W_CHG is used from the step after output W_CHG+1
    int_decim(wi, CIC_ORDER, WCDMA_INT_W, WCDMA_DER_W, WCDMA_R, W_R2, W_CHG + 1, ewi, n_odd);
    int_decim(wq, CIC_ORDER, WCDMA_INT_W, WCDMA_DER_W, WCDMA_R, W_R2, W_CHG + 1, ewq, dummy_a);
  endtask

  int ng = 0, nw = 0, n_switch = 0, ng_resumed = 0, n_ratio = 0;
  int dut_early = 0, dut_late = 0, dut_odd = 0, dut_carry = 0;

  initial begin
    for (int j = 0; j < NCYC; j++) begin
      xe[j] = int'($urandom_range(0, 3)) - 2;
      xo[j] = int'($urandom_range(0, 3)) - 2;
      md[j] = (j >= PA && j < PA + PB) ? MODE_WCDMA : MODE_GSM;
    end
    md[NCYC] = MODE_GSM;
    build_reference();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NCYC; j++) begin
      @(negedge clk);
      adc_valid = 1;
      adc_even = ADC_W'(xe[j]);
      adc_odd  = ADC_W'(xo[j]);
      if (mode != md[j]) n_switch++;
      mode = md[j];
    end
    @(negedge clk);
    adc_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (ng < 200 || nw < 150) begin
      failures++; $display("too few outputs: gsm %0d wcdma %0d", ng, nw);
    end
    // every mechanism must have happened at least once
    checks++; if (n_switch < 2)   begin failures++; $display("mode switch count %0d", n_switch); end
    checks++; if (ng_resumed == 0) begin failures++; $display("no GSM output after resuming"); end
    checks++; if (dut_early == 0) begin failures++; $display("pair (m-1, m) never used"); end
    checks++; if (dut_late == 0)  begin failures++; $display("pair (m, m+1) never used"); end
    checks++; if (dut_carry == 0) begin failures++; $display("no fractional carry step"); end
    checks++; if (n_ratio == 0)   begin failures++; $display("no ratio change"); end
    checks++; if (dut_odd == 0)   begin failures++; $display("no odd-instant WCDMA sample"); end
    $display("gsm outputs %0d (after resume %0d), wcdma outputs %0d, mode switches %0d",
             ng, ng_resumed, nw, n_switch);
    $display("pair selections early %0d late %0d, carry steps %0d, odd WCDMA samples %0d, ratio changes %0d",
             dut_early, dut_late, dut_carry, dut_odd, n_ratio);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && gsm_valid) begin
      if (ng < egi.size()) begin
        checks += 2;
        if (gsm_i !== GSM_DER_W'(egi[ng]) || gsm_q !== GSM_DER_W'(egq[ng])) begin
          failures++;
          if (failures < 10) $display("gsm %0d: got %0d/%0d expected %0d/%0d",
                                      ng, gsm_i, gsm_q, egi[ng], egq[ng]);
        end
      end else begin
        failures++; $display("unexpected gsm output %0d", ng);
      end
      if (dut.u_gsm_i.sel_early) dut_early++; else dut_late++;
      if (mode == MODE_GSM && n_switch >= 2) ng_resumed++;
      ng++;
    end
    if (rst_n && wcdma_valid) begin
      if (nw < ewi.size()) begin
        checks += 2;
        if (wcdma_i !== WCDMA_DER_W'(ewi[nw]) || wcdma_q !== WCDMA_DER_W'(ewq[nw])) begin
          failures++;
          if (failures < 10) $display("wcdma %0d: got %0d/%0d expected %0d/%0d",
                                      nw, wcdma_i, wcdma_q, ewi[nw], ewq[nw]);
        end
      end else begin
        failures++; $display("unexpected wcdma output %0d", nw);
      end
      if (nw == W_CHG) begin wcdma_r <= R_W'(W_R2); n_ratio++; end
      nw++;
    end
    if (rst_n && dut.u_wcdma_i.cap[0] && dut.u_wcdma_i.odd[0]) dut_odd++;
    if (rst_n && dut.u_gsm_i.done && dut.u_gsm_i.u_ctrl.carry) dut_carry++;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
