// Self-checking testbench of decim_ctrl.
//
// Two instances: three branches at ratio 46 2/25 and one branch at ratio 13. From
// the closed form tau_k = tau_0 + k*(R*L + F)/L the test computes, for every output
// k, the instants the branches must sample (round(tau_k) - 1 + j for three branches,
// tau_k for one), hence the clock floor(t/2) and parity of each strobe, and the
// interpolation weight floor(frac(tau_k) * 2^10) and pair selection. Every strobe
// the DUT raises must be the next expected one, on the expected clock. The clock
// enable is dropped at random; clocks are counted only while enabled.
module tb_decim_ctrl;
  localparam int NCLK = 12000;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] cap3, odd3;
  logic [0:0] cap1, odd1;
  logic done3, done1, sel3, sel1;
  logic [9:0] mu3, mu1;
  int checks = 0, failures = 0;

  decim_ctrl #(.NBR(3)) dut3 (.clk, .rst_n, .en, .r_int(8'd46), .frac_num(8'd2), .frac_den(8'd25),
                              .cap(cap3), .odd(odd3), .done(done3), .sel_early(sel3), .mu(mu3));
  decim_ctrl #(.NBR(1)) dut1 (.clk, .rst_n, .en, .r_int(8'd13), .frac_num(8'd0), .frac_den(8'd1),
                              .cap(cap1), .odd(odd1), .done(done1), .sel_early(sel1), .mu(mu1));

  always #5 clk = ~clk;

  // instant of branch j of output k (three-branch instance), and its fraction
  function automatic longint inst3(int k, int j);
    longint t, n, f;
    t = 25 + longint'(k) * (46*25 + 2);
    n = t / 25; f = t % 25;
    return n + ((2*f >= 25) ? 1 : 0) - 1 + j;
  endfunction
  function automatic int frac3(int k);
    return int'((25 + longint'(k) * (46*25 + 2)) % 25);
  endfunction

  int clkn = 0;                 // enabled clocks so far
  int k3 [3] = '{0, 0, 0};
  int k1 = 0, nd3 = 0, pend_k = -1, n_sel = 0, n_gap = 0;

  always @(posedge clk) if (rst_n) begin
    if (en) begin
      for (int j = 0; j < 3; j++) if (cap3[j]) begin
        longint t;
        t = inst3(k3[j], j);
        checks++;
        if (longint'(clkn) != t / 2 || odd3[j] != t[0]) begin
          failures++;
          if (failures < 10) $display("branch %0d output %0d at clock %0d, expected %0d odd %0d", j, k3[j], clkn, t/2, t[0]);
        end
        k3[j]++;
      end
      if (done3) pend_k = k3[2] - 1;
      if (cap1[0]) begin
        longint t;
        t = longint'(k1) * 13;
        checks++;
        if (longint'(clkn) != t / 2 || odd1[0] != t[0]) begin
          failures++;
          if (failures < 10) $display("one-branch output %0d at clock %0d", k1, clkn);
        end
        k1++;
      end
      clkn++;
    end else n_gap++;
  end

  // mu and sel_early of output k are valid from the clock after its done
  always @(negedge clk) if (rst_n && pend_k >= 0) begin
    int f;
    f = frac3(pend_k);
    checks++;
    if (int'(mu3) != (f * 1024) / 25 || sel3 != (2*f >= 25)) begin
      failures++;
      if (failures < 10) $display("output %0d: mu %0d sel %b expected f=%0d", pend_k, mu3, sel3, f);
    end
    if (sel3) n_sel++;
    pend_k = -1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (NCLK) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
    end
    @(negedge clk); en = 0;
    // outputs k3 expected: tau_k < 2*clkn; rate check against the closed form
    checks++;
    if (k3[2] < 400 || k1 < 1500 || n_sel == 0 || n_gap == 0) begin
      failures++;
      $display("counts k3=%0d k1=%0d sel=%0d gaps=%0d", k3[2], k1, n_sel, n_gap);
    end
    // every output whose last instant lies before 2*clkn - 2 must have been produced
    checks++;
    if (inst3(k3[2], 2) / 2 < clkn - 1) begin failures++; $display("missing fractional output"); end
    checks++;
    if ((longint'(k1) * 13) / 2 < clkn - 1) begin failures++; $display("missing integer output"); end
    $display("outputs: fractional %0d, integer %0d over %0d clocks", k3[2], k1, clkn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCLK + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
