// Self-checking testbench of comb_section.
//
// A third-order comb on 8-bit words equals the FIR 1 - 3z^-1 + 3z^-2 - z^-3 over the
// strobed samples, modulo 2^8. Random samples are strobed at random clocks and each
// output is compared with that sum of the last four inputs; between strobes the
// output must hold.
module tb_comb_section;
  localparam int N = 3, DW = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic [DW-1:0] x = '0, y;
  int checks = 0, failures = 0;

  comb_section #(.N(N), .DW(DW)) dut (.clk, .rst_n, .en, .x, .y);

  always #5 clk = ~clk;

  int h [4] = '{0, 0, 0, 0};   // h[0] newest
  logic [DW-1:0] expv = '0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) == 0);
      x = DW'($urandom);
      if (en) begin
        h[3] = h[2]; h[2] = h[1]; h[1] = h[0]; h[0] = int'(x);
        expv = DW'(h[0] - 3*h[1] + 3*h[2] - h[3]);
      end
      @(posedge clk); #1;
      checks++;
      if (y !== expv) begin
        failures++;
        if (failures < 10) $display("got %0d expected %0d", y, expv);
      end
    end
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
