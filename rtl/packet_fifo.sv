// packet_fifo: single-clock show-ahead FIFO used for both packet buffers.
//
// The acquisition processor holds a packet in a temporary FIFO while it is
// judged, and good packets in the data (cache) FIFO until the host reads
// them.  The original used vendor FIFO macros; this is a plain array with
// read and write pointers that wrap at DEPTH (any depth, not only powers of
// two) and a word count.  rdata always shows the oldest word (show-ahead);
// rd removes it.  clr empties the FIFO in one cycle.  A write when full or a
// read when empty is ignored and flagged by an assertion.
//
// Timing: a written word can be read the next cycle; full/empty/count are
// registered state.
module packet_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 96
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     wr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rd,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr_q, rptr_q;
  logic [CW-1:0]    cnt_q;
  logic             do_wr, do_rd;

  assign full  = (cnt_q == CW'(DEPTH));
  assign empty = (cnt_q == '0);
  assign count = cnt_q;
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rptr_q];

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr_q] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q <= '0;
      rptr_q <= '0;
      cnt_q  <= '0;
    end else if (clr) begin
      wptr_q <= '0;
      rptr_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (do_wr) wptr_q <= bump(wptr_q);
      if (do_rd) rptr_q <= bump(rptr_q);
      cnt_q <= cnt_q + CW'(do_wr) - CW'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr && full && !clr));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd && empty && !clr));
endmodule
