// tb_dsss_rx: end-to-end test of the receiver at its default parameters.
//
// A behavioural transmitter sends packets (24 lead bits, RF sync, frame sync,
// sequence counter, ID, temperature and three data words, differentially
// encoded and spread with the receiver's PN code) separated by gaps of radio
// noise.  The packets exercise: chip-rate drift in both directions (polarity
// decoder dither), an inserted and a dropped chip (despreader dither),
// acquisition and loss of track, a packet with tolerable missed detects, bad
// packets from missed detects and from missed bits, a packet cut short by loss
// of track, a wrong transmitter ID, a full data FIFO raising DRDY, a packet
// arriving while DRDY is high (dropped, overflow flag), and the host reading
// out all 96 words.  The words read are compared with the words of the
// packets that should have been accepted, in order.  The bit period in track
// is checked against 63 chips of 5 samples of 8 master clocks.  Each of these
// mechanisms is counted and a failure is counted for any that never happened.
module tb_dsss_rx;
  import dsss_pkg::*;

  localparam int BIT_CLKS = PN_LEN * OVS * 8;

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
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- monitors
  int n_pd_long = 0, n_pd_short = 0, n_ds_long = 0, n_ds_short = 0;
  int n_trk_on = 0, n_trk_off = 0, n_pretrk = 0, n_mdet = 0, n_mbit = 0;
  int n_good = 0, n_bad = 0, n_short = 0, n_idrej = 0, n_drdy = 0, n_ovr = 0;
  int n_rate_ok = 0, n_rate_bad = 0;
  logic trk_d = 1'b0, pretrk_d = 1'b0, drdy_d = 1'b0, ovr_d = 1'b0;
  longint last_tick = -1, cyc = 0;

  always @(posedge clk) if (mrst_n) begin
    cyc++;
    if (u_dut.u_poldec.dpn_tick) begin
      if (u_dut.u_poldec.dith == DITH_LONG)  n_pd_long++;
      if (u_dut.u_poldec.dith == DITH_SHORT) n_pd_short++;
    end
    if (u_dut.u_desp.dsp_tick) begin
      if (trk && u_dut.u_desp.dith == DITH_LONG)  n_ds_long++;
      if (trk && u_dut.u_desp.dith == DITH_SHORT) n_ds_short++;
      // bit period in track: 63 chips of 40 clocks, +-1 chip of dither and
      // +-1 sample of chip dither
      if (trk && trk_d && last_tick >= 0) begin
        if ((cyc - last_tick) >= BIT_CLKS - 40 - 16 && (cyc - last_tick) <= BIT_CLKS + 40 + 16)
          n_rate_ok++;
        else begin
          n_rate_bad++;
          $display("bit period %0d clocks", cyc - last_tick);
        end
      end
      last_tick = cyc;
    end
    if (u_dut.bit_vld && acq && u_dut.smdet) n_mdet++;
    if (u_dut.bit_vld && acq && u_dut.smbit) n_mbit++;
    if (trk && !trk_d) n_trk_on++;
    if (!trk && trk_d) n_trk_off++;
    if (pretrk && !pretrk_d) n_pretrk++;
    if (drdy && !drdy_d) n_drdy++;
    if (ovr && !ovr_d) n_ovr++;
    if (pkt_good) n_good++;
    if (pkt_bad) n_bad++;
    if (u_dut.pkwwr && u_dut.pkwc < 6'd6) n_short++;
    if (u_dut.id_reject) n_idrej++;
    trk_d <= trk; pretrk_d <= pretrk; drdy_d <= drdy; ovr_d <= ovr;
  end

  // ---------------------------------------------------------------- stimulus
  logic [WORD_W-1:0] expq[$];
  int seqno = 1;

  // Send one packet and wait until the transmitter has finished and the
  // receiver had time to lose track in the noise gap.
  task automatic send_packet(input logic [9:0] id, input int flip_bits, input int nflip,
                             input int words, input bit slip, input bit expect_good,
                             output logic [9:0] w[6]);
    logic [9:0] all[8];
    int         fb;
    w[0] = 10'(seqno); w[1] = id; w[2] = 10'h1FD;
    w[3] = 10'($urandom); w[4] = 10'($urandom); w[5] = 10'($urandom);
    seqno++;
    all[0] = RF_SYNC; all[1] = FRAME_SYNC;
    for (int i = 0; i < 6; i++) all[i+2] = w[i];
    u_tx.start_burst();
    for (int i = 0; i < 24; i++)
      u_tx.put_bit(1'b0, 0, slip && i == 10, slip && i == 16);
    fb = flip_bits;
    for (int k = 0; k < words; k++)
      for (int b = 0; b < 10; b++) begin
        // corrupt bits from the temperature word on (after acquire is set)
        if (k >= 4 && fb > 0 && b % 2 == 0) begin
          u_tx.put_bit(all[k][b], nflip);
          fb--;
        end else
          u_tx.put_bit(all[k][b]);
      end
    for (int i = 0; i < 4; i++) u_tx.put_bit(1'b0);
    while (u_tx.pending() != 0) @(posedge clk);
    repeat (40 * BIT_CLKS) @(posedge clk);
    if (expect_good) for (int i = 0; i < 6; i++) expq.push_back(w[i]);
  endtask

  logic [9:0] w[6];
  int g0, b0;

  initial begin
    repeat (20) @(posedge clk);
    mrst_n = 1'b1;
    repeat (30 * BIT_CLKS) @(posedge clk);     // noise before the first packet

    // 1: clean packet
    g0 = n_good; b0 = n_bad;
    send_packet(10'h005, 0, 0, 8, 0, 1, w);
    check(n_good == g0 + 1 && n_bad == b0, "clean packet accepted");

    // 2: transmitter chip rate slow, then fast
    u_tx.drift = 1;
    g0 = n_good;
    send_packet(10'h005, 0, 0, 8, 0, 1, w);
    check(n_good == g0 + 1, "packet with slow chip rate accepted");
    u_tx.drift = -1;
    g0 = n_good;
    send_packet(10'h005, 0, 0, 8, 0, 1, w);
    check(n_good == g0 + 1, "packet with fast chip rate accepted");
    u_tx.drift = 0;

    // 3: inserted and dropped chip in the lead bits
    g0 = n_good;
    send_packet(10'h005, 0, 0, 8, 1, 1, w);
    check(n_good == g0 + 1, "packet with chip slips accepted");

    // 4: two missed detects are tolerated (threshold 3)
    g0 = n_good;
    send_packet(10'h005, 2, 3, 8, 0, 1, w);
    check(n_good == g0 + 1, "packet with 2 missed detects accepted");

    // 5: five missed detects make the packet bad
    b0 = n_bad;
    send_packet(10'h005, 5, 3, 8, 0, 0, w);
    check(n_bad == b0 + 1, "packet with 5 missed detects rejected");

    // 6: four missed bits make the packet bad
    b0 = n_bad;
    send_packet(10'h005, 4, 20, 8, 0, 0, w);
    check(n_bad == b0 + 1, "packet with 4 missed bits rejected");

    // 7: packet cut after the temperature word: short word count
    b0 = n_bad;
    send_packet(10'h005, 0, 0, 5, 0, 0, w);
    check(n_bad == b0 + 1, "truncated packet rejected");

    // 8: wrong transmitter ID
    g0 = n_good; b0 = n_bad;
    send_packet(10'h006, 0, 0, 8, 0, 0, w);
    check(n_good == g0 && n_bad == b0, "packet with wrong ID ignored");

    // 9: fill the data FIFO (16 packets in total)
    while (n_good < 16) send_packet(10'h005, 0, 0, 8, 0, 1, w);
    check(drdy == 1'b1, "DRDY raised when the data FIFO is full");

    // 10: a packet while DRDY is high is dropped; overflow flag
    g0 = n_good; b0 = n_bad;
    send_packet(10'h005, 0, 0, 8, 0, 0, w);
    check(n_good == g0 && n_bad == b0, "packet dropped while DRDY");
    check(ovr == 1'b1, "overflow flag after the FIFO stayed full");

    // 11: host reads all words
    for (int i = 0; i < 96; i++) begin
      host_rd = 1'b1;
      repeat (8) @(posedge clk);
      host_rd = 1'b0;
      repeat (8) @(posedge clk);
      if (expq.size() > 0) begin
        logic [9:0] e;
        e = expq.pop_front();
        check(dout == e, $sformatf("read word %0d: got %03h expected %03h", i, dout, e));
      end else check(1'b0, "more words read than expected");
    end
    repeat (4) @(posedge clk);
    check(drdy == 1'b0, "DRDY cleared when FIFO empty");
    check(ovr == 1'b0, "overflow cleared when FIFO empty");
    check(expq.size() == 0, "all expected words read");

    // 12: receiver accepts packets again
    g0 = n_good;
    send_packet(10'h005, 0, 0, 8, 0, 1, w);
    check(n_good == g0 + 1, "packet accepted after read-out");

    // mechanisms
    check(n_pd_long > 0,  $sformatf("polarity decoder long dither seen %0d", n_pd_long));
    check(n_pd_short > 0, $sformatf("polarity decoder short dither seen %0d", n_pd_short));
    check(n_ds_long > 0,  $sformatf("despreader long dither seen %0d", n_ds_long));
    check(n_ds_short > 0, $sformatf("despreader short dither seen %0d", n_ds_short));
    check(n_pretrk > 0 && n_trk_on > 0 && n_trk_off > 0, "pretrack, track entry and track loss seen");
    check(n_mdet > 0 && n_mbit > 0, "missed detects and missed bits seen");
    check(n_short > 0, "short packet seen");
    check(n_idrej > 0, "ID rejection seen");
    check(n_drdy > 0 && n_ovr > 0, "DRDY and overflow seen");
    check(n_rate_ok > 100 && n_rate_bad == 0, $sformatf("bit period in track: %0d ok, %0d off", n_rate_ok, n_rate_bad));
    $display("mechanisms: pd_long=%0d pd_short=%0d ds_long=%0d ds_short=%0d pretrk=%0d trk_on=%0d trk_off=%0d mdet=%0d mbit=%0d good=%0d bad=%0d short=%0d idrej=%0d drdy=%0d ovr=%0d",
             n_pd_long, n_pd_short, n_ds_long, n_ds_short, n_pretrk, n_trk_on, n_trk_off,
             n_mdet, n_mbit, n_good, n_bad, n_short, n_idrej, n_drdy, n_ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
