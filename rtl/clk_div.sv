// clk_div: derives the sample-clock timing from the x8 master clock.
//
// The receiver's sample clock SMPCLK is the master clock divided by eight.
// The original divider is a chain of three toggle flip-flops; here a 3-bit
// counter does the same division, and, because the whole receiver runs on the
// master clock, the divider also gives a one-cycle enable, smp_en, in the
// master-clock cycle at whose end SMPCLK falls (the edge the polarity decoder
// acts on).  smpclk itself is a 50 % square wave kept for observation.
//
// Interface: clk is the master clock (SMPCLKx8), rst_n an asynchronous
// active-low reset.  Timing: smp_en is high one cycle in every DIV.
module clk_div #(
  parameter int unsigned DIV = 8    // master clocks per sample clock (power of two)
) (
  input  logic clk,
  input  logic rst_n,
  output logic smpclk,
  output logic smp_en
);
  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= cnt_q + 1'b1;
  end

  assign smpclk = cnt_q[CW-1];
  assign smp_en = (cnt_q == CW'(DIV - 1));

  initial assert (DIV >= 2 && (DIV & (DIV - 1)) == 0)
    else $error("clk_div: DIV must be a power of two");
endmodule
