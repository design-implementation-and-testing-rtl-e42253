// acq_proc: acquisition processor - packet validation, storage and host port.
//
// Words from the packet detector are written into a temporary FIFO (one packet
// deep) while the packet error logic counts the missed bits and detects of the
// packet.  On the word-count strobe the packet is judged; the FIFO controller
// then moves a good packet into the data FIFO (DATA_PKTS packets of PKLEN
// words) or clears a bad one, and clears acquire mode.  When the data FIFO is
// full, DRDY tells the host, which clocks the words out through host_rd/dout.
// The structure, the FIFO sizes (a 96 x 10 data FIFO: 16 packets of six
// 10-bit words) and the thresholds are the original design's.
//
// Interface: the packet detector side (acq, pkda, pkdwr, pkwc, pkwwr, clacq),
// the per-bit flags from the protocol remover (bit_vld, smbit, smdet), the
// despread bit strobe dsp_tick and the host side (host_rd, drdy, dout, ovr).
module acq_proc
  import dsss_pkg::*;
#(
  parameter int unsigned DATA_PKTS = 16,
  parameter int unsigned PKMBTH    = 3,
  parameter int unsigned PKMDTH    = 3,
  parameter int unsigned PKWCTH    = 6,
  parameter int unsigned OVR_LIMIT = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acq,
  input  logic [WORD_W-1:0] pkda,
  input  logic              pkdwr,
  input  logic [5:0]        pkwc,
  input  logic              pkwwr,
  input  logic              bit_vld,
  input  logic              smbit,
  input  logic              smdet,
  input  logic              dsp_tick,
  input  logic              host_rd,
  output logic              clacq,
  output logic              drdy,
  output logic              ovr,
  output logic [WORD_W-1:0] dout,
  output logic              pkt_good,
  output logic              pkt_bad
);
  localparam int unsigned DATA_DEPTH = DATA_PKTS * PKLEN;

  logic              pkst, pkst_vld;
  logic [5:0]        ambit, amdet;
  logic              temp_clr, xfer, data_rd;
  logic              temp_full, temp_empty, data_full, data_empty;
  logic [WORD_W-1:0] temp_rdata, data_rdata;
  logic [$clog2(PKLEN+1)-1:0]      temp_count;
  logic [$clog2(DATA_DEPTH+1)-1:0] data_count;

  packet_error #(.PKMBTH(PKMBTH), .PKMDTH(PKMDTH), .PKWCTH(PKWCTH)) u_err (
    .clk, .rst_n, .acq, .bit_vld, .smbit, .smdet, .pkwwr, .pkwc,
    .ambit, .amdet, .pkst, .pkst_vld
  );

  packet_fifo #(.WIDTH(WORD_W), .DEPTH(PKLEN)) u_temp (
    .clk, .rst_n, .clr(temp_clr), .wr(pkdwr && !temp_full), .wdata(pkda),
    .rd(xfer), .rdata(temp_rdata), .full(temp_full), .empty(temp_empty),
    .count(temp_count)
  );

  packet_fifo #(.WIDTH(WORD_W), .DEPTH(DATA_DEPTH)) u_data (
    .clk, .rst_n, .clr(1'b0), .wr(xfer), .wdata(temp_rdata),
    .rd(data_rd), .rdata(data_rdata), .full(data_full), .empty(data_empty),
    .count(data_count)
  );

  fifo_ctrl #(.WIDTH(WORD_W), .OVR_LIMIT(OVR_LIMIT)) u_ctrl (
    .clk, .rst_n, .pkst_vld, .pkst, .temp_empty, .data_full, .data_empty,
    .data_rdata, .dsp_tick, .host_rd, .temp_clr, .xfer, .data_rd, .clacq,
    .drdy, .ovr, .dout, .pkt_good, .pkt_bad
  );
endmodule
