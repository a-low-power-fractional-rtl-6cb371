// Self-checking testbench of branch_sampler.
//
// Drives random integrator taps every clock, strobes cap at random with a random
// parity, and checks that the output holds the top DW bits of s_even (even instant)
// or of s_prev + s_even modulo 2^W (odd instant) taken on the strobe clock, and that
// it does not change between strobes.
module tb_branch_sampler;
  localparam int W = 18, DW = 14;
  logic clk = 0, rst_n = 0, cap = 0, odd = 0;
  logic [W-1:0] s_even = '0, s_prev = '0;
  logic [DW-1:0] sample;
  int checks = 0, failures = 0;

  branch_sampler #(.W(W), .DW(DW)) dut (.clk, .rst_n, .cap, .odd, .s_even, .s_prev, .sample);

  always #5 clk = ~clk;

  logic [W-1:0] full;
  logic [DW-1:0] expv = '0;
  int n_odd = 0, n_even = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      s_even = W'($urandom); s_prev = W'($urandom);
      cap = ($urandom_range(0, 4) == 0);
      odd = 1'($urandom);
      if (cap) begin
        full = odd ? W'(s_even + s_prev) : s_even;
        expv = full[W-1 -: DW];
        if (odd) n_odd++; else n_even++;
      end
      @(posedge clk); #1;
      checks++;
      if (sample !== expv) begin
        failures++;
        if (failures < 10) $display("got %h expected %h", sample, expv);
      end
    end
    checks++;
    if (n_odd == 0 || n_even == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
