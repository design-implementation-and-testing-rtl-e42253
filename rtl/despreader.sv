// despreader: 63-chip sliding correlator with clock dither and track control.
//
// Each chip from the polarity decoder is shifted into a 63-bit register (new
// chip at the top, so after 63 chips chip i of a code word sits in bit i).
// The register is XORed with the stored PN reference and the ones counted;
// the count c is the number of chips that disagree.  The window magnitude is
// max(c, 63-c) and its polarity 1 when c is the larger (inverted code: data
// bit 1), else 0.  The last three magnitudes/polarities are kept as windows
// A (oldest), B and C (newest), one chip apart.
//
// A segment counter of derived-chip ticks marks the despread bit period.  At
// its roll point the best window gives the despread bit DPACK and the dither
// of the next period: A largest -> 62 chips, C largest -> 64 chips, otherwise
// (B largest, or a tie) 63.  Track control (all at the roll point):
//   - search: whenever the best magnitude exceeds the bit threshold DSMBTH and
//     pretrack is off, pretrack is set and the segment counter restarts, which
//     aligns the bit period to the correlation peak;
//   - pretrack: each period whose magnitude exceeds the detect threshold
//     DSMDTH counts towards track; track is set once the count exceeds DSTKTH;
//     a period that does not exceed DSMDTH drops pretrack again;
//   - track: periods below DSMDTH count as misses; once the miss count exceeds
//     DSNTTH, track and pretrack are dropped; a good period clears the count.
//     In track, a period below DSMBTH raises MBIT, below DSMDTH raises MDET.
// DPACK is forced to 0 outside pretrack.  "Largest" follows the prose of the
// original; its code asked for A > B >= C (or C > B >= A), which misses most
// one-chip slips because the sidelobes of a Gold code are not monotonic.
// These rules, the roll points
// (61/62/63, 64 always rolls) and DSPCLK (high for the first 32 chips of the
// period) follow the original design.  This design's own choices: the
// receiver runs on one master clock with dpn_tick as chip enable; dsp_tick is
// a one-cycle strobe after each new DPACK in place of the DSPCLK edge; the miss
// counter is one bit wider than DSNTTH so that "exceeds DSNTTH" can happen at
// the maximum threshold; the PN reference and thresholds are captured on
// ldvar_pulse as the original captured them on the rising edge of LDVAR.
//
// Timing: one despread bit per 62..64 dpn_tick; mbit/mdet are valid from the
// dsp_tick of the bit they belong to until the next chip.
module despreader
  import dsss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ldvar_pulse,
  input  logic [PN_LEN-1:0] pn_code,
  input  logic [MAG_W-1:0]  dsmbth,      // bit threshold
  input  logic [MAG_W-1:0]  dsmdth,      // detect threshold
  input  logic [1:0]        dstkth,      // detections needed for track
  input  logic [3:0]        dsntth,      // misses tolerated in track
  input  logic              dpn_tick,
  input  logic              spda,
  output logic              dpack,
  output logic              dsp_tick,
  output logic              dspclk,
  output logic              pretrk,
  output logic              trk,
  output logic              mbit,
  output logic              mdet,
  output dith_e             dith,
  output logic [MAG_W-1:0]  maxmag
);
  localparam logic [6:0] SEG_NOM   = 7'd62;
  localparam logic [6:0] SEG_SHORT = 7'd61;
  localparam logic [6:0] SEG_LONG  = 7'd63;
  localparam logic [6:0] SEG_MAX   = 7'd64;

  // settings captured at load time
  logic [PN_LEN-1:0] pn_q;
  logic [MAG_W-1:0]  mbth_q, mdth_q;
  logic [1:0]        tkth_q;
  logic [3:0]        ntth_q;

  logic [PN_LEN-1:0] shf_q;
  logic [MAG_W-1:0]  amag_q, bmag_q, cmag_q;
  logic              apol_q, bpol_q, cpol_q;
  logic [6:0]        seg_q;
  dith_e             dith_q;
  logic [1:0]        tkacc_q;
  logic [4:0]        ntacc_q;
  logic              dpack_q, pretrk_q, trk_q, mbit_q, mdet_q, tick_q;

  logic [MAG_W-1:0]  compmag, newmag;
  logic              newpol, maxpol, roll;
  dith_e             decision;

  // correlation of the current register contents with the reference
  always_comb begin
    compmag = '0;
    for (int i = 0; i < PN_LEN; i++) compmag += MAG_W'(shf_q[i] ^ pn_q[i]);
    if ((MAG_W'(PN_LEN) - compmag) > compmag) begin
      newmag = MAG_W'(PN_LEN) - compmag;
      newpol = 1'b0;
    end else begin
      newmag = compmag;
      newpol = 1'b1;
    end
  end

  // window comparison
  always_comb begin
    if ((amag_q > bmag_q) && (amag_q > cmag_q)) begin
      maxmag = amag_q; maxpol = apol_q; decision = DITH_SHORT;
    end else if ((cmag_q > bmag_q) && (cmag_q > amag_q)) begin
      maxmag = cmag_q; maxpol = cpol_q; decision = DITH_LONG;
    end else begin
      maxmag = bmag_q; maxpol = bpol_q; decision = DITH_NOMINAL;
    end
  end

  always_comb begin
    unique case (dith_q)
      DITH_SHORT: roll = (seg_q == SEG_SHORT);
      DITH_LONG:  roll = (seg_q == SEG_LONG);
      default:    roll = (seg_q == SEG_NOM);
    endcase
    if (seg_q >= SEG_MAX) roll = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pn_q   <= '0;
      mbth_q <= '0;
      mdth_q <= '0;
      tkth_q <= '0;
      ntth_q <= '0;
    end else if (ldvar_pulse) begin
      pn_q   <= pn_code;
      mbth_q <= dsmbth;
      mdth_q <= dsmdth;
      tkth_q <= dstkth;
      ntth_q <= dsntth;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shf_q    <= '0;
      amag_q   <= '0; bmag_q <= '0; cmag_q <= '0;
      apol_q   <= 1'b0; bpol_q <= 1'b0; cpol_q <= 1'b0;
      seg_q    <= '0;
      dith_q   <= DITH_NOMINAL;
      tkacc_q  <= '0;
      ntacc_q  <= '0;
      dpack_q  <= 1'b0;
      pretrk_q <= 1'b0;
      trk_q    <= 1'b0;
      mbit_q   <= 1'b0;
      mdet_q   <= 1'b0;
      dspclk   <= 1'b0;
      tick_q   <= 1'b0;
    end else begin
      tick_q <= 1'b0;
      if (dpn_tick) begin
        shf_q  <= {spda, shf_q[PN_LEN-1:1]};
        amag_q <= bmag_q; apol_q <= bpol_q;
        bmag_q <= cmag_q; bpol_q <= cpol_q;
        cmag_q <= newmag; cpol_q <= newpol;
        seg_q  <= seg_q + 7'd1;
        mbit_q <= 1'b0;
        mdet_q <= 1'b0;
        dspclk <= (seg_q < 7'd32);

        if (roll) begin
          dith_q  <= decision;
          seg_q   <= '0;
          dspclk  <= 1'b1;
          tick_q  <= 1'b1;
          dpack_q <= maxpol;
          if (!trk_q) begin
            if (maxmag > mdth_q) begin
              tkacc_q <= tkacc_q + 2'd1;
              if (tkacc_q > tkth_q) trk_q <= 1'b1;
            end else begin
              pretrk_q <= 1'b0;
            end
          end else begin
            if (maxmag < mdth_q) begin
              if (ntacc_q != '1) ntacc_q <= ntacc_q + 5'd1;
              if (ntacc_q > {1'b0, ntth_q}) begin
                trk_q    <= 1'b0;
                pretrk_q <= 1'b0;
                dpack_q  <= 1'b0;
              end
            end else begin
              ntacc_q <= '0;
            end
            mbit_q <= (maxmag < mbth_q);
            mdet_q <= (maxmag < mdth_q);
          end
        end

        // search: lock the bit period onto the first strong correlation
        if ((maxmag > mbth_q) && !pretrk_q) begin
          pretrk_q <= 1'b1;
          seg_q    <= '0;
          tkacc_q  <= '0;
          ntacc_q  <= '0;
        end
        if (!pretrk_q) dpack_q <= 1'b0;
      end
    end
  end

  assign dpack    = dpack_q;
  assign dsp_tick = tick_q;
  assign pretrk   = pretrk_q;
  assign trk      = trk_q;
  assign mbit     = mbit_q;
  assign mdet     = mdet_q;
  assign dith     = dith_q;
endmodule
