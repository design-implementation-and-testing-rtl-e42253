// dsss_pkg: constants and types shared by the spread-spectrum baseband receiver.
//
// The receiver despreads a 63-chip direct-sequence code, removes a differential
// encoding and unpacks 10-bit words sent LSB first.  The packet layout (two
// preamble words, then sequence counter, transmitter ID and four data words)
// follows the packet format of the telesensing link; the sync word values are
// the link's own.  The 63-chip reference code itself is not specified by the
// link description: DEFAULT_PN below is a Gold code built from the preferred
// pair of degree-6 m-sequences (x^6+x+1 and x^6+x^5+x^2+x+1), which is this
// design's choice.  Chip i of the code (i = 0 is sent first) is bit i.
package dsss_pkg;

  localparam int unsigned PN_LEN  = 63;   // chips per data bit
  localparam int unsigned MAG_W   = 6;    // width of a 0..63 correlation value
  localparam int unsigned WORD_W  = 10;   // ADC word width
  localparam int unsigned PKLEN   = 6;    // words handed on per packet
  localparam int unsigned OVS     = 5;    // samples per chip

  localparam logic [WORD_W-1:0] RF_SYNC    = 10'h333;
  localparam logic [WORD_W-1:0] FRAME_SYNC = 10'h01F;

  // Clock-dither decision shared by the polarity decoder and the despreader.
  // NOMINAL keeps the period, SHORT removes one input clock from the next
  // period (the edge comes earlier), LONG adds one.
  typedef enum logic [1:0] {
    DITH_NOMINAL = 2'b00,
    DITH_SHORT   = 2'b01,
    DITH_LONG    = 2'b10
  } dith_e;

  // One step of a Fibonacci LFSR, output taken from stage 0.
  function automatic logic [5:0] lfsr6_step(input logic [5:0] s, input logic [5:0] taps);
    return {^(s & taps), s[5:1]};
  endfunction

  // 63-chip Gold code: XOR of two m-sequences seeded with 000001.
  function automatic logic [PN_LEN-1:0] gold63();
    logic [5:0] a, b;
    logic [PN_LEN-1:0] code;
    a = 6'b000001;
    b = 6'b000001;
    for (int i = 0; i < PN_LEN; i++) begin
      code[i] = a[0] ^ b[0];
      a = lfsr6_step(a, 6'b000011);   // x^6 + x + 1
      b = lfsr6_step(b, 6'b110011);   // x^6 + x^5 + x^2 + x + 1
    end
    return code;
  endfunction

  localparam logic [PN_LEN-1:0] DEFAULT_PN = gold63();

endpackage
