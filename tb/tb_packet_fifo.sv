// tb_packet_fifo: random writes and reads against a queue model at the data
// FIFO size (96 x 10) and at the temporary FIFO size (6 x 10): show-ahead
// data, full/empty/count, writes when full and reads when empty ignored,
// and clr.
module tb_packet_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic clr = 1'b0, wr = 1'b0, rd = 1'b0;
  logic [9:0] wdata = '0, rdata_a, rdata_b;
  logic full_a, empty_a, full_b, empty_b;
  logic [6:0] count_a;
  logic [2:0] count_b;

  packet_fifo #(.WIDTH(10), .DEPTH(96)) u_a (.clk, .rst_n, .clr, .wr(wr && !full_a), .wdata,
    .rd(rd && !empty_a), .rdata(rdata_a), .full(full_a), .empty(empty_a), .count(count_a));
  packet_fifo #(.WIDTH(10), .DEPTH(6)) u_b (.clk, .rst_n, .clr, .wr(wr && !full_b), .wdata,
    .rd(rd && !empty_b), .rdata(rdata_b), .full(full_b), .empty(empty_b), .count(count_b));

  logic [9:0] qa[$], qb[$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int bias;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      bias = ((i / 500) % 2 == 0) ? 70 : 30;     // phases that fill and drain
      #1;
      check(count_a == 7'(qa.size()) && count_b == 3'(qb.size()), "count");
      check(full_a == (qa.size() == 96) && empty_a == (qa.size() == 0), "flags a");
      check(full_b == (qb.size() == 6) && empty_b == (qb.size() == 0), "flags b");
      if (qa.size() > 0) check(rdata_a == qa[0], "show-ahead data a");
      if (qb.size() > 0) check(rdata_b == qb[0], "show-ahead data b");
      wr = ($urandom_range(0, 99) < bias);
      rd = ($urandom_range(0, 99) < 50);
      clr = (i % 997 == 996);
      wdata = 10'($urandom);
      begin
        bit wa, wb, ra, rb;
        ra = rd && qa.size() > 0;  wa = wr && qa.size() < 96;
        rb = rd && qb.size() > 0;  wb = wr && qb.size() < 6;
        @(posedge clk);
        if (clr) begin qa.delete(); qb.delete(); end
        else begin
          if (ra) void'(qa.pop_front());
          if (rb) void'(qb.pop_front());
          if (wa) qa.push_back(wdata);
          if (wb) qb.push_back(wdata);
        end
      end
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
