// dsss_rx: digital baseband receiver for a direct-sequence spread-spectrum
// telesensing link.
//
// The FSK receiver in front of this logic delivers DEMOD, the demodulated chip
// stream, with no clock.  Five modules in a chain turn it into validated
// packets of 10-bit words for a host computer:
//   poldec           - 5x oversampling, chip polarity and a dithered chip clock
//   despreader       - 63-chip sliding correlator, bit clock, track modes
//   protocol_remover - differential decoding
//   packet_detector  - preamble and transmitter-ID check, serial-to-parallel
//   acq_proc         - packet error check, packet buffers, host port
// clk_div derives the sample timing from the x8 master clock and opcon
// sequences reset and the loading of the settings.
//
// The original ran three clock domains (sample clock, derived chip clock,
// derived bit clock); here everything runs on the master clock clk with
// clock enables (smp_en, dpn_tick, dsp_tick, bit_vld), so the derived clocks
// are only timing strobes.  dpnclk and dspclk are brought out as levels for
// observation.  The thresholds and the PN reference are parameters; their
// defaults are the values the original fixed as constants (PN: a 63-chip Gold
// code, since the link's own code is not given).
//
// Interface: clk master clock (8 x sample clock), mrst_n asynchronous master
// reset, demod chip stream, host_rd host read clock; drdy, dout and ovr to
// the host; status outputs for monitoring.  Throughput: one chip per 5 sample
// clocks (40 master clocks), one data bit per 63 chips.
module dsss_rx
  import dsss_pkg::*;
#(
  parameter logic [PN_LEN-1:0] PN_CODE   = DEFAULT_PN,
  parameter int unsigned       DSMBTH    = 50,    // despreader bit threshold
  parameter int unsigned       DSMDTH    = 62,    // despreader detect threshold
  parameter int unsigned       DSTKTH    = 2,     // detections before track
  parameter int unsigned       DSNTTH    = 15,    // misses before track is lost
  parameter logic [2:0]        UID       = 3'b101,
  parameter int unsigned       PKMBTH    = 3,
  parameter int unsigned       PKMDTH    = 3,
  parameter int unsigned       PKWCTH    = 6,
  parameter int unsigned       DATA_PKTS = 16,
  parameter int unsigned       OVR_LIMIT = 100
) (
  input  logic              clk,
  input  logic              mrst_n,
  input  logic              demod,
  input  logic              host_rd,
  output logic              drdy,
  output logic [WORD_W-1:0] dout,
  output logic              ovr,
  output logic              smpclk,
  output logic              dpnclk,
  output logic              dspclk,
  output logic              pretrk,
  output logic              trk,
  output logic              acq,
  output logic              pkt_good,
  output logic              pkt_bad
);
  logic              smp_en, sysclr_n, ldvar, ldvar_pulse;
  logic              spda, dpn_tick;
  dith_e             pd_dith, ds_dith;
  logic [2:0]        pd_amag, pd_bmag, pd_cmag;
  logic              dpack, dsp_tick, mbit, mdet;
  logic [MAG_W-1:0]  maxmag;
  logic              sdata, strk, smbit, smdet, bit_vld;
  logic [WORD_W-1:0] pkda;
  logic              pkdwr, pkwwr, clacq, sync_found, id_reject;
  logic [5:0]        pkwc;

  clk_div #(.DIV(8)) u_clkdiv (
    .clk, .rst_n(mrst_n), .smpclk, .smp_en
  );

  opcon u_opcon (
    .clk, .mrst_n, .smp_en, .sysclr_n, .ldvar, .ldvar_pulse
  );

  poldec u_poldec (
    .clk, .rst_n(sysclr_n), .smp_en, .demod, .spda, .dpn_tick, .dpnclk,
    .dith(pd_dith), .amag(pd_amag), .bmag(pd_bmag), .cmag(pd_cmag)
  );

  despreader u_desp (
    .clk, .rst_n(sysclr_n), .ldvar_pulse, .pn_code(PN_CODE),
    .dsmbth(MAG_W'(DSMBTH)), .dsmdth(MAG_W'(DSMDTH)),
    .dstkth(2'(DSTKTH)), .dsntth(4'(DSNTTH)),
    .dpn_tick, .spda, .dpack, .dsp_tick, .dspclk, .pretrk, .trk,
    .mbit, .mdet, .dith(ds_dith), .maxmag
  );

  protocol_remover u_prot (
    .clk, .rst_n(sysclr_n), .dsp_tick, .dpack, .trk, .mbit, .mdet,
    .sdata, .strk, .smbit, .smdet, .bit_vld
  );

  packet_detector u_pkdet (
    .clk, .rst_n(sysclr_n), .bit_vld, .sdata, .strk, .uid(UID), .clacq,
    .acq, .pkda, .pkdwr, .pkwc, .pkwwr, .sync_found, .id_reject
  );

  acq_proc #(
    .DATA_PKTS(DATA_PKTS), .PKMBTH(PKMBTH), .PKMDTH(PKMDTH),
    .PKWCTH(PKWCTH), .OVR_LIMIT(OVR_LIMIT)
  ) u_acq (
    .clk, .rst_n(sysclr_n), .acq, .pkda, .pkdwr, .pkwc, .pkwwr,
    .bit_vld, .smbit, .smdet, .dsp_tick, .host_rd,
    .clacq, .drdy, .ovr, .dout, .pkt_good, .pkt_bad
  );

  initial begin
    assert (DSMBTH < 64 && DSMDTH < 64) else $error("dsss_rx: correlation thresholds are 6 bits");
    assert (DSTKTH < 4 && DSNTTH < 16)  else $error("dsss_rx: track thresholds are 2 and 4 bits");
  end
endmodule
