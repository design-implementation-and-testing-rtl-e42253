// tb_acq_proc: drives the acquisition processor the way the packet detector
// and protocol remover do: six words with pkdwr while acq is high, per-bit
// missed bit/detect flags, then pkwwr with the word count.  Packets are made
// good or bad (too many missed detects, too many missed bits, too few words);
// the testbench keeps the words of the good ones.  Checks the verdict strobes,
// that clacq follows each packet, that DRDY rises when 16 good packets are
// stored, and that the host reads back exactly the good packets' words.
module tb_acq_proc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic acq = 1'b0, pkdwr = 1'b0, pkwwr = 1'b0, bit_vld = 1'b0, smbit = 1'b0, smdet = 1'b0;
  logic dsp_tick = 1'b0, host_rd = 1'b0;
  logic [9:0] pkda = '0, dout;
  logic [5:0] pkwc = '0;
  logic clacq, drdy, ovr, pkt_good, pkt_bad;
  int checks = 0, failures = 0, n_good = 0, n_bad = 0, n_clacq = 0;

  always #5 clk = ~clk;

  acq_proc u_dut (.clk, .rst_n, .acq, .pkda, .pkdwr, .pkwc, .pkwwr, .bit_vld, .smbit, .smdet,
                  .dsp_tick, .host_rd, .clacq, .drdy, .ovr, .dout, .pkt_good, .pkt_bad);

  always @(posedge clk) if (rst_n) begin
    if (pkt_good) n_good++;
    if (pkt_bad) n_bad++;
    if (clacq) n_clacq++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [9:0] expq[$];

  // kind: 0 good, 1 missed detects, 2 missed bits, 3 short
  task automatic packet(int kind);
    logic [9:0] w[6];
    int nw, g0, b0, c0;
    nw = (kind == 3) ? 4 : 6;
    g0 = n_good; b0 = n_bad; c0 = n_clacq;
    acq = 1'b1;
    for (int i = 0; i < nw; i++) begin
      w[i] = 10'($urandom);
      for (int b = 0; b < 10; b++) begin
        bit_vld = 1'b1;
        smdet = (kind == 1 && i >= 2 && b == 0) || (kind == 2 && i >= 2 && b == 0);
        smbit = (kind == 2 && i >= 2 && b == 0);
        @(posedge clk); #1 bit_vld = 1'b0; smdet = 1'b0; smbit = 1'b0;
        repeat (2) @(posedge clk); #1;
      end
      pkda = w[i]; pkwc = 6'(i + 1); pkdwr = 1'b1;
      @(posedge clk); #1 pkdwr = 1'b0;
    end
    pkwwr = 1'b1; @(posedge clk); #1 pkwwr = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(kind == 0 ? (n_good == g0 + 1 && n_bad == b0) : (n_bad == b0 + 1 && n_good == g0),
          $sformatf("verdict for kind %0d", kind));
    while (n_clacq == c0) @(posedge clk);
    #1 acq = 1'b0;
    if (kind == 0) for (int i = 0; i < 6; i++) expq.push_back(w[i]);
    repeat (12) @(posedge clk); #1;
  endtask

  initial begin
    int k;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk); #1;
    packet(1); packet(2); packet(3);
    k = 0;
    while (n_good < 16) begin
      packet((k % 5 == 4) ? (k % 3) + 1 : 0);
      k++;
    end
    check(drdy && clacq, "DRDY with 16 good packets");
    for (int i = 0; i < 96; i++) begin
      host_rd = 1'b1; repeat (4) @(posedge clk); #1;
      host_rd = 1'b0; repeat (4) @(posedge clk); #1;
      check(expq.size() > 0 && dout == expq[0], $sformatf("read word %0d", i));
      if (expq.size() > 0) void'(expq.pop_front());
    end
    repeat (2) @(posedge clk); #1;
    check(!drdy && !clacq, "DRDY falls after read-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
