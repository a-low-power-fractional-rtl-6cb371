// Self-checking testbench of pair_select: for random branch outputs and both
// selections, the earlier sample of the bracketing pair must reach early and the
// later one late.
module tb_pair_select;
  logic [13:0] y0, y1, y2, early, late;
  logic sel_early;
  int checks = 0, failures = 0, n_sel = 0;

  pair_select #(.DW(14)) dut (.y0, .y1, .y2, .sel_early, .early, .late);

  initial begin
    repeat (1000) begin
      y0 = 14'($urandom); y1 = 14'($urandom); y2 = 14'($urandom);
      sel_early = 1'($urandom);
      #1;
      checks++;
      if (sel_early) begin
        n_sel++;
        if (early !== y0 || late !== y1) failures++;
      end else if (early !== y1 || late !== y2) failures++;
    end
    checks++;
    if (n_sel == 0 || n_sel == 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
