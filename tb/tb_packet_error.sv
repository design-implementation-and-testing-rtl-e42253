// tb_packet_error: random packets with random numbers of missed bits and
// detects and a random word count; the expected verdict is worked out from
// the thresholds (bad if missed bits > 3, missed detects > 3 or words < 6) and
// compared with pkst one cycle after pkwwr.  Flags raised while acq is low
// must not count.
module tb_packet_error;
  logic clk = 1'b0, rst_n = 1'b0, acq = 1'b0, bit_vld = 1'b0, smbit = 1'b0, smdet = 1'b0, pkwwr = 1'b0;
  logic [5:0] pkwc = '0, ambit, amdet;
  logic pkst, pkst_vld;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  packet_error u_dut (.clk, .rst_n, .acq, .bit_vld, .smbit, .smdet, .pkwwr, .pkwc,
                      .ambit, .amdet, .pkst, .pkst_vld);

  initial begin
    int nb, nd, wc;
    bit exp_bad;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      // flags outside acq are ignored
      repeat (3) begin
        #1 bit_vld = 1'b1; smbit = 1'b1; smdet = 1'b1; @(posedge clk);
      end
      #1 bit_vld = 1'b0; smbit = 1'b0; smdet = 1'b0;
      nb = $urandom_range(0, 6); nd = $urandom_range(0, 6); wc = $urandom_range(2, 6);
      if (nd < nb) nd = nb;            // a missed bit is also a missed detect
      acq = 1'b1;
      for (int i = 0; i < 60; i++) begin
        @(posedge clk); #1;
        bit_vld = 1'b1;
        smbit = (i < nb);
        smdet = (i < nd);
        @(posedge clk); #1;
        bit_vld = 1'b0; smbit = 1'b1; smdet = 1'b1;   // flag held between strobes
      end
      smbit = 1'b0; smdet = 1'b0;
      pkwc = 6'(wc);
      pkwwr = 1'b1; @(posedge clk); #1 pkwwr = 1'b0;
      exp_bad = (nb > 3) || (nd > 3) || (wc < 6);
      checks++;
      if (!(pkst_vld && pkst == exp_bad && ambit == 6'(nb) && amdet == 6'(nd))) begin
        failures++;
        $display("FAIL: packet %0d nb=%0d nd=%0d wc=%0d pkst=%b vld=%b", p, nb, nd, wc, pkst, pkst_vld);
      end
      @(posedge clk); #1;
      checks++; if (pkst_vld) failures++;
      acq = 1'b0;
      @(posedge clk); #1;
      checks++; if (ambit != 0 || amdet != 0 || pkst) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
