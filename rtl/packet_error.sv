// packet_error: packet error logic of the acquisition processor.
//
// While acquire mode is on it counts the missed bits and missed detects the
// despreader reported for the bits of the packet (saturating 6-bit counters,
// cleared whenever acq is low).  When the packet detector strobes the word
// count (pkwwr) the packet is judged bad if the missed-bit count exceeds
// PKMBTH, the missed-detect count exceeds PKMDTH, or fewer than PKWCTH words
// arrived.  pkst (1 = bad) is then valid and pkst_vld strobes for one cycle.
// The three comparisons and the threshold values 3, 3 and 6 are the original
// design's (it fixed them as constants); here they are parameters.  The
// counters count a flag once per decoded bit (on bit_vld) where the original
// counted falling edges of the flag - this design's choice.
//
// Timing: pkst/pkst_vld one cycle after pkwwr.
module packet_error #(
  parameter int unsigned PKMBTH = 3,
  parameter int unsigned PKMDTH = 3,
  parameter int unsigned PKWCTH = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       acq,
  input  logic       bit_vld,
  input  logic       smbit,
  input  logic       smdet,
  input  logic       pkwwr,
  input  logic [5:0] pkwc,
  output logic [5:0] ambit,
  output logic [5:0] amdet,
  output logic       pkst,
  output logic       pkst_vld
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ambit    <= '0;
      amdet    <= '0;
      pkst     <= 1'b0;
      pkst_vld <= 1'b0;
    end else begin
      pkst_vld <= 1'b0;
      if (!acq) begin
        ambit <= '0;
        amdet <= '0;
        pkst  <= 1'b0;
      end else begin
        if (bit_vld && smbit && ambit != '1) ambit <= ambit + 6'd1;
        if (bit_vld && smdet && amdet != '1) amdet <= amdet + 6'd1;
        if (pkwwr) begin
          pkst     <= (ambit > 6'(PKMBTH)) || (amdet > 6'(PKMDTH)) || (pkwc < 6'(PKWCTH));
          pkst_vld <= 1'b1;
        end
      end
    end
  end
endmodule
