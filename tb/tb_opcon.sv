// tb_opcon: checks the reset and load sequence: sysclr_n lifts at the first
// sample tick after reset, ldvar at the second, ldvar_pulse is one cycle long
// and comes once; a new master reset restarts the sequence.
module tb_opcon;
  logic clk = 1'b0, mrst_n = 1'b0, smp_en = 1'b0;
  logic sysclr_n, ldvar, ldvar_pulse;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  opcon u_dut (.clk, .mrst_n, .smp_en, .sysclr_n, .ldvar, .ldvar_pulse);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick();
    smp_en = 1'b1; @(posedge clk); #1 smp_en = 1'b0;
    repeat (3) @(posedge clk); #1;
  endtask

  initial begin
    int pulses;
    for (int run = 0; run < 2; run++) begin
      mrst_n = 1'b0;
      repeat (3) @(posedge clk); #1;
      check(!sysclr_n && !ldvar && !ldvar_pulse, "all low in reset");
      mrst_n = 1'b1;
      repeat (5) @(posedge clk); #1;
      check(!sysclr_n, "sysclr_n waits for a sample tick");
      tick();
      check(sysclr_n && !ldvar, "sysclr_n after first tick");
      pulses = 0;
      smp_en = 1'b1; @(posedge clk); #1 smp_en = 1'b0;
      check(ldvar, "ldvar after second tick");
      for (int i = 0; i < 20; i++) begin
        pulses += int'(ldvar_pulse);
        @(posedge clk); #1;
        if (i % 4 == 0) smp_en = 1'b1; else smp_en = 1'b0;
      end
      check(pulses == 1, $sformatf("one load pulse, got %0d", pulses));
      check(ldvar && sysclr_n, "levels stay high");
    end
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
