// Self-checking testbench of linear_interp.
//
// Random sample pairs and fractions, including the end points mu = 0 and the
// largest mu, are compared with early + floor((late - early) * mu / 2^10),
// computed in integers; the result must appear one clock after en, and must lie
// between the two inputs.
module tb_linear_interp;
  localparam int DW = 14, MU_W = 10;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [DW-1:0] early = '0, late = '0, y;
  logic [MU_W-1:0] mu = '0;
  logic valid;
  int checks = 0, failures = 0;

  linear_interp #(.DW(DW), .MU_W(MU_W)) dut (.clk, .rst_n, .en, .early, .late, .mu, .y, .valid);

  always #5 clk = ~clk;

  int e, l, m, expv;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      e = int'($urandom_range(0, 16383)) - 8192;
      l = int'($urandom_range(0, 16383)) - 8192;
      m = (i % 10 == 0) ? 0 : (i % 10 == 1) ? 1023 : int'($urandom_range(0, 1023));
      early = DW'(e); late = DW'(l); mu = MU_W'(m);
      en = 1;
      expv = e + int'($floor(real'((l - e) * m) / 1024.0));
      @(negedge clk);
      en = 0;
      checks++;
      if (!valid || int'(y) != expv) begin
        failures++;
        if (failures < 10) $display("e=%0d l=%0d mu=%0d got %0d expected %0d", e, l, m, y, expv);
      end
      checks++;
      if (int'(y) < ((e < l) ? e : l) || int'(y) > ((e < l) ? l : e)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
