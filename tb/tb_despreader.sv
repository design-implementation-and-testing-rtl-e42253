// tb_despreader: drives the correlator chip by chip with bits spread by the
// Gold code, with the receiver's working thresholds (bit 50, detect 62,
// track 2, no-track 15).  Checks: pretrack and track are entered within a few
// bits of the first spread bit; every despread bit in track equals the sent
// bit; the bit period is 63 chips except where a chip was inserted (one 64
// period, long dither) or removed (one 62 period, short dither); a bit with
// 3 corrupted chips gives a missed detect only, one with 20 corrupted chips a
// missed bit as well, and so on for random corruption of later bits: the
// value and both flags of every bit are checked; after the spread bits stop, track is lost after 16 to
// 20 bit periods of noise.
module tb_despreader;
  import dsss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ldvar_pulse = 1'b0, dpn_tick = 1'b0, spda = 1'b0;
  logic dpack, dsp_tick, dspclk, pretrk, trk, mbit, mdet;
  dith_e dith;
  logic [MAG_W-1:0] maxmag;
  int checks = 0, failures = 0;
  localparam int NBITS = 150;

  always #5 clk = ~clk;

  despreader u_dut (
    .clk, .rst_n, .ldvar_pulse, .pn_code(DEFAULT_PN), .dsmbth(6'd50), .dsmdth(6'd62),
    .dstkth(2'd2), .dsntth(4'd15), .dpn_tick, .spda, .dpack, .dsp_tick, .dspclk,
    .pretrk, .trk, .mbit, .mdet, .dith, .maxmag
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nchip = 0, last_roll = -1;
  int periods[$];
  bit got[$], got_md[$], got_mb[$];
  int n_mdet = 0, n_mbit = 0, n_long = 0, n_short = 0, trk_bits = 0;

  always @(posedge clk) begin
    if (dpn_tick) nchip++;
    if (dsp_tick) begin
      if (trk) begin
        got.push_back(dpack);
        got_md.push_back(mdet);
        got_mb.push_back(mbit);
        n_mdet += int'(mdet);
        n_mbit += int'(mbit);
        if (dith == DITH_LONG) n_long++;
        if (dith == DITH_SHORT) n_short++;
        if (last_roll >= 0) periods.push_back(nchip - last_roll);
      end
      last_roll = nchip;
    end
  end

  task automatic chip(bit c);
    spda = c;
    dpn_tick = 1'b1; @(posedge clk); #1 dpn_tick = 1'b0;
    @(posedge clk); #1;
  endtask

  bit sent[$];
  int sent_nf[$];

  task automatic send_bit(bit b, int nflip = 0, bit dup = 0, bit drop = 0);
    sent.push_back(b);
    sent_nf.push_back(nflip);
    for (int i = 0; i < 63; i++) begin
      if (drop && i == 62) break;
      chip(DEFAULT_PN[i] ^ b ^ (i < nflip));
      if (dup && i == 62) chip(DEFAULT_PN[i] ^ b);
    end
  endtask

  initial begin
    int first_trk_chip, start_chip, lost_at, m, best, best_off, n, n62, n63, n64, other, nf;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1 ldvar_pulse = 1'b1; @(posedge clk); #1 ldvar_pulse = 1'b0;

    for (int i = 0; i < 300; i++) chip(1'($urandom));
    check(!pretrk && !trk, "no lock on noise");

    start_chip = nchip;
    first_trk_chip = -1;
    for (int k = 0; k < NBITS; k++) begin
      nf = (k == 40) ? 3 : (k == 45) ? 20 : 0;
      if (k > 50 && $urandom_range(0, 9) == 0) nf = $urandom_range(1, 17);
      send_bit(1'($urandom), nf, k == 20, k == 30);
      if (trk && first_trk_chip < 0) first_trk_chip = nchip;
    end
    check(first_trk_chip > 0 && first_trk_chip - start_chip <= 8 * 63,
          $sformatf("track within 8 bits (after %0d chips)", first_trk_chip - start_chip));

    lost_at = -1;
    for (int i = 0; i < 30 * 63; i++) begin
      chip(1'($urandom));
      if (!trk && lost_at < 0) lost_at = i;
    end
    check(lost_at >= 16 * 63 && lost_at <= 20 * 63, $sformatf("track lost after %0d noise chips", lost_at));

    // despread bits in track against sent bits: find the alignment, then
    // check every bit and its missed-detect / missed-bit flags (a bit with
    // n corrupted chips has magnitude 63-n: detect needs > 61, bit > 49)
    best = 0; best_off = 0;
    for (int off = 0; off < 12; off++) begin
      m = 0;
      for (int i = 0; i < 40; i++) if (got[i] == sent[i + off]) m++;
      if (m > best) begin best = m; best_off = off; end
    end
    n = NBITS - best_off;
    for (int i = 0; i < n; i++) begin
      check(got[i] == sent[i + best_off], $sformatf("bit %0d value", i + best_off));
      check(got_md[i] == (sent_nf[i + best_off] >= 2),
            $sformatf("bit %0d missed detect (%0d chips corrupted)", i + best_off, sent_nf[i + best_off]));
      check(got_mb[i] == (sent_nf[i + best_off] >= 14),
            $sformatf("bit %0d missed bit (%0d chips corrupted)", i + best_off, sent_nf[i + best_off]));
    end

    n62 = 0; n63 = 0; n64 = 0; other = 0;
    for (int i = 0; i < n - 1; i++)
      case (periods[i]) 62: n62++; 63: n63++; 64: n64++; default: other++; endcase
    check(n64 == 1 && n62 == 1 && other == 0, $sformatf("periods 62/63/64: %0d/%0d/%0d other %0d", n62, n63, n64, other));
    check(n_long >= 1 && n_short >= 1, "long and short dither decisions");
    check(n_mbit >= 1 && n_mdet >= 2, $sformatf("missed bit %0d, missed detects %0d", n_mbit, n_mdet));
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
