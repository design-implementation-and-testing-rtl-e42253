// opcon: operation controller of the receiver.
//
// After the master reset MRSTB is released it lifts the system clear
// (sysclr_n) on the first sample-clock tick and raises the load level LDVAR on
// the second.  The rising edge of LDVAR is where the programmable settings
// (thresholds and the PN reference) are captured; ldvar_pulse marks it with a
// single master-clock cycle so that the rest of the receiver can stay on one
// clock.  The two-tick sequence follows the original controller; the pulse
// form of the load strobe is this design's own.
//
// Interface: clk master clock, smp_en sample-clock enable, mrst_n asynchronous
// active-low master reset.  Timing: sysclr_n rises at the first smp_en after
// reset, ldvar one smp_en later, ldvar_pulse in the cycle after that.
module opcon (
  input  logic clk,
  input  logic mrst_n,
  input  logic smp_en,
  output logic sysclr_n,
  output logic ldvar,
  output logic ldvar_pulse
);
  logic ld2_q, ld1_q, ld1_d_q;

  always_ff @(posedge clk or negedge mrst_n) begin
    if (!mrst_n) begin
      sysclr_n <= 1'b0;
      ld2_q    <= 1'b0;
      ld1_q    <= 1'b0;
    end else if (smp_en) begin
      sysclr_n <= 1'b1;
      ld2_q    <= 1'b1;
      ld1_q    <= ld2_q;
    end
  end

  always_ff @(posedge clk or negedge mrst_n) begin
    if (!mrst_n) ld1_d_q <= 1'b0;
    else         ld1_d_q <= ld1_q;
  end

  assign ldvar       = ld1_q;
  assign ldvar_pulse = ld1_q & ~ld1_d_q;
endmodule
