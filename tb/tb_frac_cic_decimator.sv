// Self-checking testbench of frac_cic_decimator.
//
// A reference model runs the CIC integrators at the full input rate (x(2m) = 0,
// x(2m+1) = u[m], s_k(n) = s_{k-1}(n-1) + s_k(n-1) modulo 2^W), takes the samples at
// the three instants around each output instant tau_k, truncates, applies one comb
// per branch and interpolates linearly between the pair that brackets tau_k. Every
// DUT output is compared with it bit for bit, and the clock at which it appears is
// checked against the clock of its last input instant (fixed latency). The ratio
// 46 2/25 is switched to 20 3/7 and back during the run.
module tb_frac_cic_decimator;
  localparam int N = 3, IN_W = 3, W = 18, DW = 14, MU_W = 10;
  localparam int NCYC = 6000;
  localparam int LAT = 3;          // clocks from the last sampling clock to y_valid

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [IN_W-1:0] u = '0;
  logic [7:0] r_int = 46, frac_num = 2, frac_den = 25;
  logic signed [DW-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0;

  frac_cic_decimator #(.N(N), .IN_W(IN_W), .INT_W(W), .DER_W(DW), .MU_W(MU_W)) dut (
    .clk, .rst_n, .en, .u, .r_int, .frac_num, .frac_den, .y, .y_valid
  );

  always #5 clk = ~clk;

  // stimulus and full-rate reference
  int uin [NCYC];
  longint sN [2*NCYC+2];
  int exp_y [$];
  int exp_clk [$];
  int ratio_r [3]   = '{46, 20, 46};
  int ratio_f [3]   = '{2, 3, 2};
  int ratio_l [3]   = '{25, 7, 25};
  int chg_at  [2]   = '{40, 90};   // set at output k, used from the step after k+1

  function automatic longint wrapw(longint v, int w);
    return v & ((64'sd1 <<< w) - 1);
  endfunction
  function automatic int sx(longint v, int w);  // signed value of a w-bit word
    v = wrapw(v, w);
    return int'(v >= (64'sd1 <<< (w-1)) ? v - (64'sd1 <<< w) : v);
  endfunction

  task automatic build_reference();
    longint s [N+1];
    longint sn [N+1];
    longint cdl [3][N];
    int n, f, L, F, R, c, seg, k, mu;
    int yb [3];
    for (int i = 0; i <= N; i++) s[i] = 0;
    for (int t = 0; t < 2*NCYC+2; t++) begin
      sN[t] = s[N];
      // x(t) for the next step: nonzero only at odd t
      s[0] = (t % 2 == 1) ? longint'(uin[t/2]) : 0;
      sn[0] = 0;
      for (int i = 1; i <= N; i++) sn[i] = wrapw(s[i-1] + s[i], W);
      s = sn;
    end
    for (int b = 0; b < 3; b++) for (int i = 0; i < N; i++) cdl[b][i] = 0;
    n = 1; f = 0; seg = 0; k = 0;
    forever begin
      R = ratio_r[seg]; F = ratio_f[seg]; L = ratio_l[seg];
      c = (2*f >= L) ? 1 : 0;
      if (n + c + 1 >= 2*NCYC - 4) break;
      for (int b = 0; b < 3; b++) begin
        longint v, d;
        v = wrapw(sN[n + c - 1 + b] >>> (W - DW), DW);
        for (int i = 0; i < N; i++) begin
          d = wrapw(v - cdl[b][i], DW);
          cdl[b][i] = v;
          v = d;
        end
        yb[b] = sx(v, DW);
      end
      mu = (f * (1 << MU_W)) / L;
      begin
        int e, l;
        longint p;
        e = c ? yb[0] : yb[1];
        l = c ? yb[1] : yb[2];
        p = longint'(l - e) * mu;
        exp_y.push_back(sx(longint'(e) + (p >>> MU_W), DW));
      end
      exp_clk.push_back((n + c + 1) / 2);
      // advance to the next output
      if (seg < 2 && k == chg_at[seg] + 1) seg++;
      R = ratio_r[seg]; F = ratio_f[seg]; L = ratio_l[seg];
      f += F;
      n += R;
      if (f >= L) begin f -= L; n++; end
      k++;
    end
  endtask

  // drive the DUT; ratio inputs follow the outputs seen
  int ncyc = 0, nout = 0, lat0 = -1;
  initial begin
    for (int i = 0; i < NCYC; i++) uin[i] = int'($urandom_range(0, 4)) - 2;
    build_reference();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < NCYC; m++) begin
      @(negedge clk);
      en = 1; u = IN_W'(uin[m]);
    end
    @(negedge clk); en = 0;
    repeat (10) @(negedge clk);
    if (nout < 100) begin failures++; $display("too few outputs: %0d", nout); end
    checks++;
    $display("outputs compared: %0d", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count enabled clocks: at the posedge where ncyc becomes m+1 the DUT consumed u[m]
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      if (nout < exp_y.size()) begin
        checks++;
        if (y !== DW'(exp_y[nout])) begin
          failures++;
          if (failures < 10) $display("output %0d: got %0d expected %0d", nout, y, exp_y[nout]);
        end
        checks++;
        if (ncyc - exp_clk[nout] != LAT) begin
          failures++;
          if (failures < 10) $display("output %0d: latency %0d expected %0d", nout, ncyc - exp_clk[nout], LAT);
        end
        if (nout == chg_at[0]) begin r_int <= 8'(ratio_r[1]); frac_num <= 8'(ratio_f[1]); frac_den <= 8'(ratio_l[1]); end
        if (nout == chg_at[1]) begin r_int <= 8'(ratio_r[2]); frac_num <= 8'(ratio_f[2]); frac_den <= 8'(ratio_l[2]); end
      end
      nout++;
    end
    if (rst_n && en) ncyc++;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
