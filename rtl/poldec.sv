// poldec: polarity decoder - chip clock recovery and chip polarity.
//
// The demodulated stream DEMOD is sampled five times per chip.  A 7-bit shift
// register holds the last seven samples; it forms three overlapping 5-sample
// windows, A = samples 0..4 (newest), B = 1..5 and C = 2..6 (oldest).  For each
// window the number of ones and of zeros is counted; the larger count is the
// window's magnitude and its majority value the window's polarity.
//
// A segment counter runs once per derived chip.  At its roll point the chip
// polarity SPDA is taken from the best window and the next period is dithered:
//   A largest: the chip lies later than expected, the next period is six
//              samples long and SPDA = A's polarity;
//   C largest: the next period is four samples, SPDA = C's polarity;
//   otherwise: (B largest or a tie) five samples, SPDA = B's polarity.
// "Largest" follows the prose of the original; its code asked for A > B >= C
// (or C > B >= A), which is the same for clean 5-sample windows.
// The derived PN clock DPNCLK is high on the roll tick and the tick after it,
// so its rising edge is fixed and only its period varies.  These rules and
// roll points (4 nominal, 3 short, 5 long, 5 always rolls) are the original
// design's.  This version runs on the master clock with a sample enable
// instead of clocking on the sample clock itself, and gives dpn_tick, a
// one-cycle strobe in the master-clock cycle after SPDA is updated, in place of
// the falling edge of DPNCLK - this design's choice.
//
// Interface: clk master clock, rst_n (system clear), smp_en sample enable,
// demod the demodulated data.  Outputs spda, dpn_tick, dpnclk (level, for
// observation), dith (the decision in force) and the three window magnitudes.
// Timing: one chip decision per 4, 5 or 6 smp_en ticks.
module poldec
  import dsss_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  smp_en,
  input  logic  demod,
  output logic  spda,
  output logic  dpn_tick,
  output logic  dpnclk,
  output dith_e dith,
  output logic [2:0] amag,
  output logic [2:0] bmag,
  output logic [2:0] cmag
);
  logic [6:0] bitsmp_q;
  logic [2:0] bitseg_q;
  dith_e      dith_q;
  logic       spda_q, dpnclk_q, tick_q;

  logic [2:0] a_ones, b_ones, c_ones;
  logic       apol, bpol, cpol;
  logic       roll;

  // Count the ones of each window; the zeros are 5 minus that.
  always_comb begin
    a_ones = '0;
    b_ones = '0;
    c_ones = '0;
    for (int i = 0; i < 5; i++) begin
      a_ones += 3'(bitsmp_q[i]);
      b_ones += 3'(bitsmp_q[i+1]);
      c_ones += 3'(bitsmp_q[i+2]);
    end
    apol = (a_ones >= 3'd3);
    bpol = (b_ones >= 3'd3);
    cpol = (c_ones >= 3'd3);
    amag = apol ? a_ones : 3'd5 - a_ones;
    bmag = bpol ? b_ones : 3'd5 - b_ones;
    cmag = cpol ? c_ones : 3'd5 - c_ones;
  end

  always_comb begin
    unique case (dith_q)
      DITH_SHORT: roll = (bitseg_q == 3'd3);
      DITH_LONG:  roll = (bitseg_q == 3'd5);
      default:    roll = (bitseg_q == 3'd4);
    endcase
    if (bitseg_q >= 3'd5) roll = 1'b1;   // never run past the longest period
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitsmp_q <= '0;
      bitseg_q <= '0;
      dith_q   <= DITH_NOMINAL;
      spda_q   <= 1'b0;
      dpnclk_q <= 1'b0;
      tick_q   <= 1'b0;
    end else begin
      tick_q <= 1'b0;
      if (smp_en) begin
        bitsmp_q <= {bitsmp_q[5:0], demod};
        if (roll) begin
          bitseg_q <= '0;
          dpnclk_q <= 1'b1;
          tick_q   <= 1'b1;
          if ((amag > bmag) && (amag > cmag)) begin
            spda_q <= apol;
            dith_q <= DITH_LONG;
          end else if ((cmag > bmag) && (cmag > amag)) begin
            spda_q <= cpol;
            dith_q <= DITH_SHORT;
          end else begin
            spda_q <= bpol;
            dith_q <= DITH_NOMINAL;
          end
        end else begin
          bitseg_q <= bitseg_q + 3'd1;
          dpnclk_q <= (bitseg_q == 3'd0);
        end
      end
    end
  end

  assign spda     = spda_q;
  assign dpn_tick = tick_q;
  assign dpnclk   = dpnclk_q;
  assign dith     = dith_q;
endmodule
