// Self-checking testbench of iq_splitter.
//
// Feeds random 2-bit ADC codes, with random gaps in adc valid, and checks that each
// enabled clock m yields I = (-1)^m x(2m) and Q = (-1)^m x(2m+1) one clock later,
// where m counts enabled clocks since reset.
module tb_iq_splitter;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [1:0] xe = '0, xo = '0;
  logic signed [2:0] i_out, q_out;
  logic valid;
  int checks = 0, failures = 0;

  iq_splitter #(.X_W(2)) dut (.clk, .rst_n, .en, .adc_even(xe), .adc_odd(xo), .i_out, .q_out, .valid);

  always #5 clk = ~clk;

  int m = 0, ei, eq, n_neg = 0;
  logic exp_v;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      xe = 2'($urandom_range(0, 3));
      xo = 2'($urandom_range(0, 3));
      ei = (m % 2 == 0) ? int'(xe) : -int'(xe);
      eq = (m % 2 == 0) ? int'(xo) : -int'(xo);
      exp_v = en;
      if (en) m++;
      @(negedge clk);
      checks++;
      if (valid !== exp_v || (exp_v && (int'(i_out) != ei || int'(q_out) != eq))) begin
        failures++;
        if (failures < 10) $display("m=%0d got %0d/%0d/%b expected %0d/%0d/%b", m, i_out, q_out, valid, ei, eq, exp_v);
      end
      if (exp_v && (m % 2 == 0) && xe == -2) n_neg++;   // -(-2) = +2 needs the extra bit
      en = 0;
    end
    checks++;
    if (n_neg == 0) begin failures++; $display("code -2 never negated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
