// tb_clk_div: checks that the divider gives one smp_en every 8 master clocks,
// in the cycle where smpclk is about to fall, and a 50 % smpclk.
module tb_clk_div;
  logic clk = 1'b0, rst_n = 1'b0;
  logic smpclk, smp_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_div u_dut (.clk, .rst_n, .smpclk, .smp_en);

  initial begin
    int last, highs, ens;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    last = -1; highs = 0; ens = 0;
    for (int c = 0; c < 800; c++) begin
      @(negedge clk);
      highs += int'(smpclk);
      if (smp_en) begin
        ens++;
        checks++;
        if (smpclk !== 1'b1) failures++;      // smpclk falls after smp_en
        if (last >= 0) begin
          checks++;
          if (c - last != 8) begin failures++; $display("FAIL: spacing %0d", c - last); end
        end
        last = c;
      end
    end
    checks++; if (ens != 100) begin failures++; $display("FAIL: %0d enables", ens); end
    checks++; if (highs != 400) begin failures++; $display("FAIL: duty %0d", highs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
