// fifo_ctrl: FIFO controller of the acquisition processor.
//
// Sequence for each packet:
//   IDLE  - wait for the packet verdict (pkst_vld).  A bad packet is cleared
//           from the temporary FIFO (temp_clr); a good one is transferred.
//   XFER  - one word per cycle moves from the temporary FIFO to the data FIFO
//           (xfer reads one and writes the other) until the temporary FIFO is
//           empty.  If the data FIFO fills first, the rest is discarded.
//   DONE  - clacq clears acquire mode in the packet detector so it can look
//           for the next packet.
// While a packet is being judged or transferred the detector cannot accept
// another one; the original accepted this because packets are seconds apart.
//
// Host side: when the data FIFO becomes full, DRDY is raised and clacq is held
// so that no packet is accepted until the host has emptied it; DRDY falls when
// the FIFO is empty.  Each rising edge of the host's read clock host_rd
// (asynchronous, passed through a two-flop synchronizer) pops one word into the
// output register dout.  If the FIFO stays full for OVR_LIMIT despread bit
// times, ovr is raised (packets are being lost) until the FIFO is emptied.
//
// From the original: transfer of good packets only, clear of bad ones, clacq
// after each verdict and while DRDY is high, DRDY on full until empty, a host
// clock that reads the FIFO out, and an overflow flag counting despread clocks
// while full to 100.  This design's own: the state machine form, the
// synchronizer on host_rd (the original clocked the FIFO with the host clock
// directly) and a 7-bit overflow counter.
//
// Timing: transfer of n words takes n cycles; dout changes 3 clk cycles after
// a rising edge of host_rd.
module fifo_ctrl #(
  parameter int unsigned WIDTH     = 10,
  parameter int unsigned OVR_LIMIT = 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pkst_vld,
  input  logic             pkst,
  input  logic             temp_empty,
  input  logic             data_full,
  input  logic             data_empty,
  input  logic [WIDTH-1:0] data_rdata,
  input  logic             dsp_tick,
  input  logic             host_rd,
  output logic             temp_clr,
  output logic             xfer,
  output logic             data_rd,
  output logic             clacq,
  output logic             drdy,
  output logic             ovr,
  output logic [WIDTH-1:0] dout,
  output logic             pkt_good,    // strobe: packet accepted
  output logic             pkt_bad      // strobe: packet discarded
);
  typedef enum logic [1:0] {C_IDLE, C_XFER, C_DONE} cstate_e;

  cstate_e    state_q;
  logic [2:0] rd_sync_q;
  logic [6:0] ovr_cnt_q;
  logic       rd_edge;

  assign rd_edge = rd_sync_q[1] & ~rd_sync_q[2];
  assign xfer    = (state_q == C_XFER) && !temp_empty && !data_full;
  assign data_rd = rd_edge && drdy && !data_empty;
  assign clacq   = (state_q == C_DONE) || drdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= C_IDLE;
      temp_clr <= 1'b0;
      pkt_good <= 1'b0;
      pkt_bad  <= 1'b0;
    end else begin
      temp_clr <= 1'b0;
      pkt_good <= 1'b0;
      pkt_bad  <= 1'b0;
      unique case (state_q)
        C_IDLE: if (pkst_vld) begin
          if (pkst || drdy) begin
            temp_clr <= 1'b1;
            pkt_bad  <= 1'b1;
            state_q  <= C_DONE;
          end else begin
            pkt_good <= 1'b1;
            state_q  <= C_XFER;
          end
        end
        C_XFER: if (temp_empty || data_full) begin
          temp_clr <= 1'b1;
          state_q  <= C_DONE;
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

  // data ready to the host, host read clock, output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_sync_q <= '0;
      drdy      <= 1'b0;
      dout      <= '0;
    end else begin
      rd_sync_q <= {rd_sync_q[1:0], host_rd};
      if (data_full)       drdy <= 1'b1;
      else if (data_empty) drdy <= 1'b0;
      if (data_rd) dout <= data_rdata;
    end
  end

  // overflow: full for too long
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovr_cnt_q <= '0;
      ovr       <= 1'b0;
    end else if (data_empty) begin
      ovr_cnt_q <= '0;
      ovr       <= 1'b0;
    end else if (data_full && dsp_tick) begin
      if (ovr_cnt_q != 7'(OVR_LIMIT)) ovr_cnt_q <= ovr_cnt_q + 7'd1;
      else                            ovr       <= 1'b1;
    end
  end

  initial assert (OVR_LIMIT < 128) else $error("fifo_ctrl: OVR_LIMIT must fit in 7 bits");
endmodule
