// tx_model: behavioural model of the transmit side of the link, for simulation
// only (not synthesizable).  It stands for the data acquisition chip (packet
// builder, differential encoder, PN spreading) together with the FSK radio
// pair, and produces the demodulated chip stream the receiver sees.
//
// Bits are queued with put_bit/put_word (words LSB first).  Each queued bit is
// differentially encoded (enc[k] = in[k] ^ enc[k-1], enc = 1 at the start of a
// burst) and spread by the 63-chip code: chip i = pn[i] ^ enc.  Each chip lasts
// CHIP_CLKS master clocks; with drift != 0 every DRIFT_EVERY-th chip is drift
// clocks longer, which models a transmitter chip rate a little off the
// receiver's.  A bit may carry nflip corrupted chips (the first nflip chips
// are inverted), an extra copy of its last chip (dup) or lose its last chip
// (drop).  When the queue is empty the transmitter is off and the radio
// delivers random chips.
module tx_model #(
  parameter logic [62:0] PN          = '0,
  parameter int          CHIP_CLKS   = 40,
  parameter int          DRIFT_EVERY = 8
) (
  input  logic clk,
  output logic demod
);
  typedef struct {
    bit val;
    int nflip;
    bit dup;
    bit drop;
  } txbit_t;

  txbit_t q[$];
  bit     enc_q = 1'b1;
  int     drift = 0;
  int     chips_sent = 0;
  bit     busy = 1'b0;

  function automatic void start_burst();
    enc_q = 1'b1;
  endfunction

  function automatic void put_bit(bit b, int nflip = 0, bit dup = 0, bit drop = 0);
    txbit_t t;
    enc_q   = b ^ enc_q;
    t.val   = enc_q;
    t.nflip = nflip;
    t.dup   = dup;
    t.drop  = drop;
    q.push_back(t);
  endfunction

  function automatic void put_word(logic [9:0] w);
    for (int i = 0; i < 10; i++) put_bit(w[i]);
  endfunction

  function automatic int pending();
    return q.size() + int'(busy);
  endfunction

  task automatic send_chip(bit c);
    int len;
    len = CHIP_CLKS;
    if (drift != 0 && (chips_sent % DRIFT_EVERY) == 0) len += drift;
    demod <= c;
    repeat (len) @(posedge clk);
    chips_sent++;
  endtask

  initial begin
    txbit_t t;
    bit c;
    demod = 1'b0;
    forever begin
      if (q.size() == 0) begin
        busy = 1'b0;
        send_chip(1'($urandom_range(0, 1)));
      end else begin
        busy = 1'b1;
        t = q.pop_front();
        for (int i = 0; i < 63; i++) begin
          if (t.drop && i == 62) break;
          c = PN[i] ^ t.val ^ (i < t.nflip);
          send_chip(c);
          if (t.dup && i == 62) send_chip(c);
        end
      end
    end
  end
endmodule
