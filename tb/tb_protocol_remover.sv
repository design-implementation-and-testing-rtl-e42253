// tb_protocol_remover: random despread bits with random flags; checks that
// each decoded bit is the XOR of the last two despread bits (the first against
// the reset value 1), that the flags follow on the same strobe, and that
// bit_vld comes one cycle after dsp_tick.  Also checks that a differentially
// encoded random message is recovered exactly.
module tb_protocol_remover;
  logic clk = 1'b0, rst_n = 1'b0;
  logic dsp_tick = 1'b0, dpack = 1'b0, trk = 1'b0, mbit = 1'b0, mdet = 1'b0;
  logic sdata, strk, smbit, smdet, bit_vld;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  protocol_remover u_dut (.clk, .rst_n, .dsp_tick, .dpack, .trk, .mbit, .mdet,
                          .sdata, .strk, .smbit, .smdet, .bit_vld);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit prev, enc, msg;
    bit f_trk, f_mb, f_md;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    prev = 1'b1;
    enc  = 1'b1;
    for (int i = 0; i < 400; i++) begin
      repeat ($urandom_range(1, 5)) @(posedge clk);
      #1;
      if (i < 200) dpack = 1'($urandom);
      else begin
        msg = 1'($urandom);
        enc = msg ^ enc;
        dpack = enc;
      end
      f_trk = 1'($urandom); f_mb = 1'($urandom); f_md = 1'($urandom);
      trk = f_trk; mbit = f_mb; mdet = f_md;
      dsp_tick = 1'b1;
      @(posedge clk); #1;
      dsp_tick = 1'b0;
      check(bit_vld, "bit_vld one cycle after dsp_tick");
      check(sdata == (dpack ^ prev), $sformatf("decoded bit %0d", i));
      if (i > 200) check(sdata == msg, $sformatf("message bit %0d", i));
      check(strk == f_trk && smbit == f_mb && smdet == f_md, "flags registered");
      prev = dpack;
      trk = 1'b0; mbit = 1'b0; mdet = 1'b0;
      @(posedge clk); #1;
      check(!bit_vld && strk == f_trk, "strobe is one cycle, flags held");
    end
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
