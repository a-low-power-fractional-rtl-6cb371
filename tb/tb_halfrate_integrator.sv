// Self-checking testbench of halfrate_integrator.
//
// Runs a full-rate integrator cascade (one step per input instant, x(2m) = 0,
// x(2m+1) = u[m]) next to the DUT, which takes one step per two instants, and checks
// every clock that s_even equals s_N(2m) and s_prev + s_even equals s_N(2m+1).
// Two instances: the default third-order, 18-bit filter and a fourth-order, 10-bit
// one so that wrap-around is frequent. Clock enable gaps are inserted at random.
module tb_halfrate_integrator;
  localparam int IN_W = 3;
  localparam int N3 = 3, W3 = 18;
  localparam int N4 = 4, W4 = 10;
  localparam int NCYC = 4000;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [IN_W-1:0] u = '0;
  logic [W3-1:0] e3, p3;
  logic [W4-1:0] e4, p4;
  int checks = 0, failures = 0;

  halfrate_integrator #(.N(N3), .IN_W(IN_W), .W(W3)) dut3 (.clk, .rst_n, .en, .u, .s_even(e3), .s_prev(p3));
  halfrate_integrator #(.N(N4), .IN_W(IN_W), .W(W4)) dut4 (.clk, .rst_n, .en, .u, .s_even(e4), .s_prev(p4));

  always #5 clk = ~clk;

  longint s3 [N3+1], s4 [N4+1], sv3 [N3+1], sv4 [N4+1];

  function automatic longint wrapw(longint v, int w);
    return v & ((64'sd1 <<< w) - 1);
  endfunction

  // one full-rate step of an order-n cascade with input xin
  task automatic step3(input longint xin);
    longint t [N3+1];
    t = s3; t[0] = xin;
    for (int i = 1; i <= N3; i++) s3[i] = wrapw(t[i-1] + t[i], W3);
  endtask
  task automatic step4(input longint xin);
    longint t [N4+1];
    t = s4; t[0] = xin;
    for (int i = 1; i <= N4; i++) s4[i] = wrapw(t[i-1] + t[i], W4);
  endtask

  int n_en = 0, n_wrap = 0;
  initial begin
    for (int i = 0; i <= N3; i++) s3[i] = 0;
    for (int i = 0; i <= N4; i++) s4[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < NCYC; m++) begin
      longint odd3, odd4;
      @(negedge clk);
      // compare the state s_N(2m) and the odd value s_N(2m+1)
      checks += 4;
      if (e3 !== W3'(s3[N3])) begin failures++; if (failures < 10) $display("N3 even m=%0d", m); end
      if (e4 !== W4'(s4[N4])) begin failures++; if (failures < 10) $display("N4 even m=%0d", m); end
      sv3 = s3; sv4 = s4;
      step3(0); step4(0);                          // instant 2m, x = 0
      odd3 = s3[N3]; odd4 = s4[N4];
      if (W3'(p3 + e3) !== W3'(odd3)) begin failures++; if (failures < 10) $display("N3 odd m=%0d", m); end
      if (W4'(p4 + e4) !== W4'(odd4)) begin failures++; if (failures < 10) $display("N4 odd m=%0d", m); end
      en = ($urandom_range(0, 9) != 0);
      u = IN_W'(int'($urandom_range(0, 4)) - 2);
      if (en) begin
        step3(longint'(u)); step4(longint'(u));  // instant 2m+1
        n_en++;
        if (s4[N4] < odd4) n_wrap++;
      end else begin
        s3 = sv3; s4 = sv4;                        // clock disabled: state held
      end
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("no wrap-around seen"); end
    $display("enabled clocks %0d, wraps %0d", n_en, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
