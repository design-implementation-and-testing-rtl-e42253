// tb_packet_detector: feeds decoded bit streams straight into the detector.
// Checks, against packets built in the testbench: a good packet gives acq and
// the six words seq, ID, temp, data1..3 in order with pkwc counting 1..6 and
// one pkwwr with pkwc = 6; acq stays until clacq; a packet with a wrong ID
// gives id_reject and no words; a frame sync without the RF sync before it is
// not taken; a packet during which track drops gives pkwwr with a short count;
// bits are ignored while track is off.
module tb_packet_detector;
  import dsss_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, bit_vld = 1'b0, sdata = 1'b0, strk = 1'b0, clacq = 1'b0;
  logic acq, pkdwr, pkwwr, sync_found, id_reject;
  logic [WORD_W-1:0] pkda;
  logic [5:0] pkwc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  packet_detector u_dut (.clk, .rst_n, .bit_vld, .sdata, .strk, .uid(3'b101), .clacq,
                         .acq, .pkda, .pkdwr, .pkwc, .pkwwr, .sync_found, .id_reject);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [9:0] words[$];
  int wcs[$];
  int n_wwr = 0, last_wwr_wc = -1, n_rej = 0;
  always @(posedge clk) begin
    if (pkdwr) begin words.push_back(pkda); wcs.push_back(int'(pkwc)); end
    if (pkwwr) begin n_wwr++; last_wwr_wc = int'(pkwc); end
    if (id_reject) n_rej++;
  end

  task automatic send_bit(bit b);
    sdata = b; bit_vld = 1'b1; @(posedge clk); #1 bit_vld = 1'b0;
    repeat (2) @(posedge clk); #1;
  endtask

  task automatic send_word(logic [9:0] w);
    for (int i = 0; i < 10; i++) send_bit(w[i]);
  endtask

  task automatic do_clacq();
    repeat (3) @(posedge clk); #1;
    clacq = 1'b1; @(posedge clk); #1 clacq = 1'b0;
  endtask

  initial begin
    logic [9:0] pk[6];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    strk = 1'b1;

    // good packets
    for (int p = 0; p < 3; p++) begin
      words.delete(); wcs.delete(); n_wwr = 0;
      pk[0] = 10'(p + 1); pk[1] = 10'h005;
      for (int i = 2; i < 6; i++) pk[i] = 10'($urandom);
      for (int i = 0; i < 13; i++) send_bit(1'($urandom));
      send_word(RF_SYNC); send_word(FRAME_SYNC);
      check(!acq, "no acq before ID");
      for (int i = 0; i < 6; i++) begin
        send_word(pk[i]);
        if (i == 1) begin repeat (2) @(posedge clk); #1 check(acq, "acq after ID"); end
      end
      repeat (3) @(posedge clk); #1;
      check(words.size() == 6, $sformatf("six words, got %0d", words.size()));
      for (int i = 0; i < 6 && i < words.size(); i++) begin
        check(words[i] == pk[i], $sformatf("word %0d %03h vs %03h", i, words[i], pk[i]));
        check(wcs[i] == i + 1, $sformatf("word count %0d", wcs[i]));
      end
      check(n_wwr == 1 && last_wwr_wc == 6, "one word-count strobe with 6");
      for (int i = 0; i < 25; i++) send_bit(1'($urandom));
      check(acq && words.size() == 6, "acq held, nothing more written until clacq");
      do_clacq();
      @(posedge clk); #1;
      check(!acq, "clacq clears acq");
    end

    // wrong ID
    words.delete(); n_rej = 0;
    send_word(RF_SYNC); send_word(FRAME_SYNC); send_word(10'h007); send_word(10'h006);
    send_word(10'h1FD);
    repeat (2) @(posedge clk); #1;
    check(n_rej == 1 && !acq && words.size() == 0, "wrong ID rejected");

    // frame sync alone
    words.delete();
    send_word(10'h000); send_word(FRAME_SYNC); send_word(10'h001); send_word(10'h005);
    repeat (2) @(posedge clk); #1;
    check(!acq && words.size() == 0, "frame sync without RF sync ignored");

    // no track: the whole packet is ignored
    strk = 1'b0;
    send_word(RF_SYNC); send_word(FRAME_SYNC); send_word(10'h001); send_word(10'h005);
    check(!acq, "ignored without track");
    strk = 1'b1;

    // track lost inside the packet
    words.delete(); n_wwr = 0;
    send_word(RF_SYNC); send_word(FRAME_SYNC); send_word(10'h009); send_word(10'h005);
    send_word(10'h1FD);
    strk = 1'b0;
    send_bit(1'b0);
    repeat (3) @(posedge clk); #1;
    check(words.size() == 3 && n_wwr == 1 && last_wwr_wc == 3, $sformatf("short packet count %0d", last_wwr_wc));
    do_clacq();
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
