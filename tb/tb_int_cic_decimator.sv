// Self-checking testbench of int_cic_decimator.
//
// A reference model runs the CIC integrators at the full input rate (x(2m) = 0,
// x(2m+1) = u[m], s_k(n) = s_{k-1}(n-1) + s_k(n-1) modulo 2^W), takes s_N at every
// R-th instant, truncates to the derivator width and applies the comb section. Each
// DUT output is compared bit for bit and its clock checked against the clock of its
// sampling instant. The ratio switches 13 -> 8 -> 13, so both odd and even instants
// and a change while running are exercised.
module tb_int_cic_decimator;
  localparam int N = 3, IN_W = 3, W = 13, DW = 8;
  localparam int NCYC = 3000;
  localparam int LAT = 2;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [IN_W-1:0] u = '0;
  logic [7:0] r = 13;
  logic signed [DW-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0;

  int_cic_decimator #(.N(N), .IN_W(IN_W), .INT_W(W), .DER_W(DW)) dut (
    .clk, .rst_n, .en, .u, .r, .y, .y_valid
  );

  always #5 clk = ~clk;

  int uin [NCYC];
  longint sN [2*NCYC+2];
  int exp_y [$];
  int exp_clk [$];
  int ratio [3] = '{13, 8, 13};
  int chg_at [2] = '{60, 150};
  int n_odd = 0;

  function automatic longint wrapw(longint v, int w);
    return v & ((64'sd1 <<< w) - 1);
  endfunction
  function automatic int sx(longint v, int w);
    v = wrapw(v, w);
    return int'(v >= (64'sd1 <<< (w-1)) ? v - (64'sd1 <<< w) : v);
  endfunction

  task automatic build_reference();
    longint s [N+1];
    longint sn [N+1];
    longint cdl [N];
    int n, seg, k;
    for (int i = 0; i <= N; i++) s[i] = 0;
    for (int t = 0; t < 2*NCYC+2; t++) begin
      sN[t] = s[N];
      s[0] = (t % 2 == 1) ? longint'(uin[t/2]) : 0;
      sn[0] = 0;
      for (int i = 1; i <= N; i++) sn[i] = wrapw(s[i-1] + s[i], W);
      s = sn;
    end
    for (int i = 0; i < N; i++) cdl[i] = 0;
    n = 0; seg = 0; k = 0;
    while (n < 2*NCYC - 4) begin
      longint v, d;
      v = wrapw(sN[n] >>> (W - DW), DW);
      for (int i = 0; i < N; i++) begin
        d = wrapw(v - cdl[i], DW);
        cdl[i] = v;
        v = d;
      end
      exp_y.push_back(sx(v, DW));
      exp_clk.push_back(n / 2);
      if (n % 2 == 1) n_odd++;
      if (seg < 2 && k == chg_at[seg] + 1) seg++;
      n += ratio[seg];
      k++;
    end
  endtask

  int ncyc = 0, nout = 0;
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
    checks++;
    if (nout < 200 || n_odd == 0) begin failures++; $display("too few outputs: %0d", nout); end
    $display("outputs compared: %0d (odd instants %0d)", nout, n_odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
          if (failures < 10) $display("output %0d: latency %0d", nout, ncyc - exp_clk[nout]);
        end
        if (nout == chg_at[0]) r <= 8'(ratio[1]);
        if (nout == chg_at[1]) r <= 8'(ratio[2]);
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
