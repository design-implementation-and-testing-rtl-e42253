// protocol_remover: removes the differential encoding of the despread bits.
//
// The transmitter sends enc[k] = in[k] XOR enc[k-1] with enc[0] = 1.  The
// decoder keeps the last two received bits and outputs their XOR, so a bit
// error corrupts at most two decoded bits instead of propagating.  The track
// flag and the missed bit/detect flags of the despreader are registered on the
// same bit strobe so that they stay aligned with the data.  This is the
// original design's decoder; this version uses the despread-bit strobe
// dsp_tick as a clock enable and adds bit_vld, a one-cycle strobe in the cycle
// after each new decoded bit, for the downstream logic (this design's choice).
//
// Interface: clk, rst_n, dsp_tick, dpack (despread bit), trk, mbit, mdet in;
// sdata, strk, smbit, smdet and bit_vld out.  Latency: sdata for the bit taken
// at a dsp_tick is valid when bit_vld is high, one cycle later.
module protocol_remover (
  input  logic clk,
  input  logic rst_n,
  input  logic dsp_tick,
  input  logic dpack,
  input  logic trk,
  input  logic mbit,
  input  logic mdet,
  output logic sdata,
  output logic strk,
  output logic smbit,
  output logic smdet,
  output logic bit_vld
);
  logic in1_q, in2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in1_q   <= 1'b1;      // enc[0] = 1
      in2_q   <= 1'b0;
      strk    <= 1'b0;
      smbit   <= 1'b0;
      smdet   <= 1'b0;
      bit_vld <= 1'b0;
    end else begin
      bit_vld <= dsp_tick;
      if (dsp_tick) begin
        in1_q <= dpack;
        in2_q <= in1_q;
        strk  <= trk;
        smbit <= mbit;
        smdet <= mdet;
      end
    end
  end

  assign sdata = in1_q ^ in2_q;
endmodule
