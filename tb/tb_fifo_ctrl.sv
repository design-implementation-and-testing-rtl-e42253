// tb_fifo_ctrl: the two FIFOs are modelled by queues in the testbench.
// Checks: a good verdict moves the six words of the temporary FIFO into the
// data FIFO, one per cycle, then gives one clacq; a bad verdict clears the
// temporary FIFO; after 16 good packets the data FIFO is full, DRDY rises and
// clacq stays high; a verdict while DRDY is high drops the packet; ovr rises
// after 100 despread-bit ticks of a full FIFO, not before; host read clocks
// pop the 96 words in order into dout; DRDY and ovr fall when it is empty.
module tb_fifo_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pkst_vld = 1'b0, pkst = 1'b0, dsp_tick = 1'b0, host_rd = 1'b0;
  logic temp_clr, xfer, data_rd, clacq, drdy, ovr, pkt_good, pkt_bad;
  logic [9:0] dout;
  logic [9:0] tq[$], dq[$];
  logic temp_empty, data_full, data_empty;
  logic [9:0] data_rdata;
  int checks = 0, failures = 0;
  int n_clacq = 0, n_good = 0, n_bad = 0;

  always #5 clk = ~clk;

  assign temp_empty = (tq.size() == 0);
  assign data_full  = (dq.size() == 96);
  assign data_empty = (dq.size() == 0);
  assign data_rdata = (dq.size() > 0) ? dq[0] : 10'h0;

  fifo_ctrl u_dut (.clk, .rst_n, .pkst_vld, .pkst, .temp_empty, .data_full, .data_empty,
                   .data_rdata, .dsp_tick, .host_rd, .temp_clr, .xfer, .data_rd, .clacq,
                   .drdy, .ovr, .dout, .pkt_good, .pkt_bad);

  // FIFO models, updated at the clock edge from the values before it
  always @(posedge clk) begin
    automatic bit x = xfer, c = temp_clr, r = data_rd;
    automatic logic [9:0] w = (tq.size() > 0) ? tq[0] : 10'h0;
    if (rst_n) begin
      if (clacq) n_clacq++;
      if (pkt_good) n_good++;
      if (pkt_bad) n_bad++;
    end
    if (r) void'(dq.pop_front());
    if (x) begin void'(tq.pop_front()); dq.push_back(w); end
    if (c) tq.delete();
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [9:0] expq[$];

  task automatic packet(bit bad);
    int c0;
    for (int i = 0; i < 6; i++) tq.push_back(10'($urandom));
    if (!bad && !drdy) foreach (tq[i]) expq.push_back(tq[i]);
    @(posedge clk); #1;
    pkst = bad; pkst_vld = 1'b1;
    @(posedge clk); #1 pkst_vld = 1'b0;
    c0 = n_clacq;
    repeat (12) @(posedge clk); #1;
    check(tq.size() == 0, "temporary FIFO emptied");
    if (!drdy) check(n_clacq == c0 + 1, $sformatf("one clacq pulse, got %0d", n_clacq - c0));
  endtask

  initial begin
    int good0, bad0, sz;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(!clacq && !drdy && !ovr, "idle after reset");

    packet(1'b0);
    check(dq.size() == 6 && n_good == 1, $sformatf("good packet transferred %0d %0d", dq.size(), n_good));
    packet(1'b1);
    check(dq.size() == 6 && n_bad == 1, "bad packet cleared");
    while (dq.size() < 96) packet(1'b0);
    @(posedge clk); #1;
    check(drdy && clacq, "DRDY and clacq when full");
    good0 = n_good; bad0 = n_bad;
    packet(1'b0);
    check(dq.size() == 96 && n_good == good0 && n_bad == bad0 + 1, "packet dropped while DRDY");

    for (int i = 0; i < 100; i++) begin
      dsp_tick = 1'b1; @(posedge clk); #1 dsp_tick = 1'b0; @(posedge clk); #1;
    end
    check(!ovr, "no overflow before 100 ticks");
    repeat (2) begin dsp_tick = 1'b1; @(posedge clk); #1 dsp_tick = 1'b0; @(posedge clk); #1; end
    check(ovr, "overflow after 100 ticks");

    sz = 0;
    while (dq.size() > 0 && sz < 200) begin
      host_rd = 1'b1; repeat (5) @(posedge clk); #1;
      host_rd = 1'b0; repeat (5) @(posedge clk); #1;
      check(expq.size() > 0 && dout == expq[0], $sformatf("read word %0d", sz));
      if (expq.size() > 0) void'(expq.pop_front());
      sz++;
    end
    check(sz == 96, $sformatf("96 reads, got %0d", sz));
    @(posedge clk); #1;
    check(!drdy && !ovr && !clacq, "DRDY, overflow and clacq cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
