// tb_poldec: drives the polarity decoder with random chips of 5 samples and
// checks that, once locked, the decoded chip stream SPDA equals the sent chip
// stream exactly (one decision per chip, none lost or repeated), first with
// the nominal chip rate, then with a slow and a fast transmitter (one extra or
// one missing sample every 20 chips).  It checks that the slow transmitter
// makes the decoder choose the long period and the fast one the short period,
// and that every decision interval is 4, 5 or 6 samples.  A last stretch
// inverts one inner sample of every third chip; the majority vote of the
// window must still give every chip right.  Every chip compared counts as one
// check.
module tb_poldec;
  import dsss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, smp_en = 1'b0, demod = 1'b0;
  logic spda, dpn_tick, dpnclk;
  dith_e dith;
  logic [2:0] amag, bmag, cmag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // sample enable every 4 clocks
  int sc = 0;
  always @(posedge clk) begin
    sc <= (sc == 3) ? 0 : sc + 1;
    smp_en <= (sc == 3);
  end

  poldec u_dut (.clk, .rst_n, .smp_en, .demod, .spda, .dpn_tick, .dpnclk,
                .dith, .amag, .bmag, .cmag);

  bit sent[$];
  bit got[$];
  int n_long = 0, n_short = 0, n_badgap = 0, nsmp = 0, last_tick_smp = -1;

  always @(posedge clk) begin
    if (smp_en) nsmp++;
    if (dpn_tick) begin
      got.push_back(spda);
      if (dith == DITH_LONG)  n_long++;
      if (dith == DITH_SHORT) n_short++;
      if (last_tick_smp >= 0 && !(nsmp - last_tick_smp inside {4, 5, 6})) n_badgap++;
      last_tick_smp = nsmp;
    end
  end

  // send n chips; every 20th chip is 'adj' samples longer; with glitch set,
  // one of the three middle samples of every third chip is inverted
  task automatic send(int n, int adj, bit glitch = 0);
    bit c;
    int len, g;
    for (int i = 0; i < n; i++) begin
      c = 1'($urandom);
      sent.push_back(c);
      len = 5 + ((i % 20 == 10) ? adj : 0);
      g = (glitch && i % 3 == 0) ? $urandom_range(1, 3) : -1;
      for (int k = 0; k < len; k++) begin
        demod = (k == g) ? ~c : c;
        repeat (4) @(posedge clk);
      end
    end
  endtask

  // find the offset between decoded and sent chips in a stretch, then
  // compare the whole stretch
  task automatic compare(string what);
    int best_off, best, m, n;
    best_off = 0; best = -1;
    n = (got.size() < sent.size() ? got.size() : sent.size()) - 30;
    for (int off = -3; off <= 3; off++) begin
      m = 0;
      for (int i = 20; i < n; i++) if (i + off >= 0 && got[i] == sent[i + off]) m++;
      if (m > best) begin best = m; best_off = off; end
    end
    // one check per chip of the stretch
    checks += n - 20;
    failures += n - 20 - best;
    if (best != n - 20) $display("FAIL: %s: %0d of %0d chips right", what, best, n - 20);
  endtask

  initial begin
    int l0, s0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    send(600, 0);
    compare("nominal rate");
    checks++; if (n_badgap != 0) begin failures++; $display("FAIL: decision interval"); end

    sent.delete(); got.delete(); l0 = n_long; s0 = n_short;
    send(600, 1);
    compare("slow transmitter");
    checks++; if (n_long - l0 < 20) begin failures++; $display("FAIL: long dither %0d", n_long - l0); end

    sent.delete(); got.delete(); l0 = n_long; s0 = n_short;
    send(600, -1);
    compare("fast transmitter");
    checks++; if (n_short - s0 < 20) begin failures++; $display("FAIL: short dither %0d", n_short - s0); end
    checks++; if (n_badgap != 0) begin failures++; $display("FAIL: decision interval"); end

    sent.delete(); got.delete();
    send(600, 0, 1);
    compare("single-sample glitches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
