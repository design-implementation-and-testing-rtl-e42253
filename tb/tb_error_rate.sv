// tb_error_rate: long-run packet error test of the whole receiver at its
// default parameters, in the form of a data-dropout measurement over a
// 1024-packet window.
//
// One transmitter sends 1024 packets (Table-style format: RF sync, frame sync,
// sequence counter 1..3FFh, ID 005h, temperature and three data words, all
// but the sync words and ID random), each followed by a gap of radio noise
// long enough for the receiver to lose track.  Each packet gets a random
// chip-rate offset (slow, fast or none).  Chip errors are injected into the
// bits of the temperature and data words: with a small probability a bit has
// 2..13 inverted chips (correlation 50..61: a missed detect) or 14..17
// (correlation 46..49: a missed bit as well).  Neither changes the bit's
// polarity, so from the injected errors the packet's verdict is known in
// advance: bad when more than 3 missed bits or more than 3 missed detects.
//
// A host process reads the 96 words of the data FIFO each time DRDY rises
// and compares every word with the packet that sent it, in order.  Checked:
// the verdict of every packet, every word read, the number of read-outs, and
// that DRDY falls after each read-out.  At the end the test prints the
// per-channel rate of incorrect words (temperature, data 1, data 2, counter)
// and the rate of dropped packets.
module tb_error_rate;
  import dsss_pkg::*;

  localparam int BIT_CLKS = PN_LEN * OVS * 8;
  localparam int NPKT     = 1024;
  localparam int LEAD     = 24;
  localparam int GAP      = 24;        // noise bits between packets

  logic clk = 1'b0;
  logic mrst_n = 1'b0;
  logic demod, host_rd = 1'b0;
  logic drdy, ovr, smpclk, dpnclk, dspclk, pretrk, trk, acq, pkt_good, pkt_bad;
  logic [WORD_W-1:0] dout;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dsss_rx u_dut (
    .clk, .mrst_n, .demod, .host_rd, .drdy, .dout, .ovr, .smpclk, .dpnclk,
    .dspclk, .pretrk, .trk, .acq, .pkt_good, .pkt_bad
  );

  tx_model #(.PN(DEFAULT_PN), .CHIP_CLKS(40)) u_tx (.clk, .demod);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // verdict strobes
  int n_good = 0, n_bad = 0, n_ovr = 0;
  always @(posedge clk) if (mrst_n) begin
    if (pkt_good) n_good++;
    if (pkt_bad)  n_bad++;
    if (ovr)      n_ovr++;
  end

  // ------------------------------------------------------------------ host
  logic [WORD_W-1:0] expq[$];
  int n_readouts = 0, n_words = 0;
  int wrong[6] = '{default: 0};

  initial begin
    logic [WORD_W-1:0] e;
    forever begin
      @(posedge clk iff (mrst_n && drdy));
      repeat (100) @(posedge clk);
      for (int i = 0; i < 16 * PKLEN; i++) begin
        host_rd = 1'b1;
        repeat (8) @(posedge clk);
        host_rd = 1'b0;
        repeat (8) @(posedge clk);
        n_words++;
        if (expq.size() > 0) begin
          e = expq.pop_front();
          if (dout != e) wrong[i % PKLEN]++;
          check(dout == e, $sformatf("word %0d of read-out %0d: got %03h expected %03h",
                                     i, n_readouts, dout, e));
        end else check(1'b0, "word read that no accepted packet sent");
      end
      repeat (4) @(posedge clk);
      check(!drdy, "DRDY falls after the read-out");
      n_readouts++;
    end
  end

  // -------------------------------------------------------------- stimulus
  int exp_good = 0, exp_bad = 0, n_mdet_inj = 0, n_mbit_inj = 0;

  // number of inverted chips for one data bit: mostly none
  function automatic int draw_errors();
    int r;
    r = $urandom_range(0, 999);
    if (r < 40)      return $urandom_range(2, 13);    // missed detect
    else if (r < 60) return $urandom_range(14, 17);   // missed bit
    else if (r < 80) return 1;                        // absorbed by the thresholds
    return 0;
  endfunction

  task automatic send_packet(input int n);
    logic [9:0] all[8];
    int nf, md, mb, g0, b0;
    bit good;
    all[0] = RF_SYNC; all[1] = FRAME_SYNC;
    all[2] = 10'((n % 1023) + 1);
    all[3] = 10'h005;
    for (int k = 4; k < 8; k++) all[k] = 10'($urandom);
    u_tx.drift = $urandom_range(0, 2) - 1;
    md = 0; mb = 0;
    u_tx.start_burst();
    for (int i = 0; i < LEAD; i++) u_tx.put_bit(1'b0);
    for (int k = 0; k < 8; k++)
      for (int b = 0; b < 10; b++) begin
        nf = (k >= 4 && !(k == 7 && b == 9)) ? draw_errors() : 0;
        if (nf >= 2)  md++;
        if (nf >= 14) mb++;
        u_tx.put_bit(all[k][b], nf);
      end
    for (int i = 0; i < 4; i++) u_tx.put_bit(1'b0);
    good = (md <= 3) && (mb <= 3);
    n_mdet_inj += md; n_mbit_inj += mb;
    // the host may read this packet as soon as it is stored
    if (good) begin
      exp_good++;
      for (int k = 2; k < 8; k++) expq.push_back(all[k]);
    end else exp_bad++;
    g0 = n_good; b0 = n_bad;
    while (u_tx.pending() != 0) @(posedge clk);
    u_tx.drift = 0;
    repeat (GAP * BIT_CLKS) @(posedge clk);
    check(n_good == g0 + int'(good) && n_bad == b0 + int'(!good),
          $sformatf("packet %0d (%0d missed detects, %0d missed bits) judged %s",
                    n, md, mb, good ? "good" : "bad"));
  endtask

  initial begin
    repeat (20) @(posedge clk);
    mrst_n = 1'b1;
    repeat (30 * BIT_CLKS) @(posedge clk);
    for (int n = 0; n < NPKT; n++) send_packet(n);
    repeat (4 * BIT_CLKS) @(posedge clk);

    check(n_readouts == exp_good / 16, $sformatf("%0d read-outs for %0d good packets",
                                                  n_readouts, exp_good));
    check(expq.size() == PKLEN * (exp_good % 16), "words left in the FIFO match");
    check(n_ovr == 0, "no overflow with a host that reads at once");
    check(exp_bad > 0 && exp_good > 0, "both verdicts exercised");
    $display("packets sent %0d: good %0d, dropped %0d (rate %0.3e); injected missed detects %0d, missed bits %0d",
             NPKT, n_good, n_bad, real'(n_bad) / NPKT, n_mdet_inj, n_mbit_inj);
    $display("incorrect words read: counter %0d, temp %0d, data1 %0d, data2 %0d, data3 %0d of %0d packets",
             wrong[0], wrong[2], wrong[3], wrong[4], wrong[5], n_words / PKLEN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
