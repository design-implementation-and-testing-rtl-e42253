// packet_detector: finds packets in the decoded bit stream and unpacks them.
//
// A packet is eight 10-bit words sent LSB first: RF sync (333h), frame sync
// (01Fh), sequence counter, transmitter ID and four data words.  Bits enter a
// 20-bit shift register at the top, so once both preamble words have arrived
// the register holds {frame sync, RF sync}.  When that pattern appears while
// the despreader is in track, the detector skips the next word (the sequence
// counter, kept aside) and compares the following one with the expected
// transmitter ID ({7'b0, uid}).  If it matches, acquire mode (acq) is entered
// and the six words from the sequence counter on are written out one by one
// with the strobe pkdwr, the preamble being stripped; pkwc counts the words.
// When six words have been sent, or if track is lost first, pkwwr strobes the
// word count to the acquisition processor.  acq then stays high until the
// acquisition processor clears it with clacq; clacq also holds the detector in
// search.  A wrong ID returns to search.
//
// Following the original design: LSB-first words, the packet layout, the
// skipped sequence counter, the 3-bit ID, acq/clacq and the early word-count
// strobe on loss of track.  This design's own choices: the whole preamble (both
// sync words) must match, as the prose of the design describes (the original
// code compared the frame sync only); the sequence counter and ID words are
// written back to back right after the ID check instead of through a two-word
// output pipeline; the detector works on the bit strobe bit_vld of the master
// clock instead of the falling edge of the despread clock.
//
// Timing: pkdwr/pkda one cycle after the bit_vld that completes a word (the ID
// word one cycle after the sequence word); pkwwr one cycle after the last
// pkdwr, or one cycle after the bit on which track was seen lost.
module packet_detector
  import dsss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_vld,
  input  logic              sdata,
  input  logic              strk,
  input  logic [2:0]        uid,
  input  logic              clacq,
  output logic              acq,
  output logic [WORD_W-1:0] pkda,
  output logic              pkdwr,
  output logic [5:0]        pkwc,
  output logic              pkwwr,
  output logic              sync_found,  // strobe: preamble seen
  output logic              id_reject    // strobe: ID did not match
);
  typedef enum logic [2:0] {S_SEARCH, S_SEQ, S_ID, S_DATA, S_DONE} state_e;

  state_e            state_q;
  logic [19:0]       sh_q;
  logic [19:0]       sh_n;
  logic [3:0]        bcnt_q;
  logic [WORD_W-1:0] seq_q, id_q;
  logic              id_pend_q, wwr_pend_q;
  logic [WORD_W-1:0] ref_id;
  logic [WORD_W-1:0] word_n;

  assign sh_n   = {sdata, sh_q[19:1]};
  assign word_n = sh_n[19:10];
  assign ref_id = {7'b0, uid};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_SEARCH;
      sh_q       <= '0;
      bcnt_q     <= '0;
      seq_q      <= '0;
      id_q       <= '0;
      id_pend_q  <= 1'b0;
      wwr_pend_q <= 1'b0;
      acq        <= 1'b0;
      pkda       <= '0;
      pkdwr      <= 1'b0;
      pkwc       <= '0;
      pkwwr      <= 1'b0;
      sync_found <= 1'b0;
      id_reject  <= 1'b0;
    end else begin
      pkdwr      <= 1'b0;
      pkwwr      <= 1'b0;
      sync_found <= 1'b0;
      id_reject  <= 1'b0;

      // second word of the back-to-back pair, and the deferred count strobe
      if (id_pend_q) begin
        id_pend_q <= 1'b0;
        pkda      <= id_q;
        pkdwr     <= 1'b1;
        pkwc      <= 6'd2;
      end
      if (wwr_pend_q) begin
        wwr_pend_q <= 1'b0;
        pkwwr      <= 1'b1;
      end

      if (clacq) begin
        state_q    <= S_SEARCH;
        acq        <= 1'b0;
        pkwc       <= '0;
        id_pend_q  <= 1'b0;
        wwr_pend_q <= 1'b0;
      end else if (bit_vld) begin
        sh_q   <= sh_n;
        bcnt_q <= (bcnt_q == 4'd9) ? 4'd0 : bcnt_q + 4'd1;
        unique case (state_q)
          S_SEARCH: begin
            if (strk && sh_n == {FRAME_SYNC, RF_SYNC}) begin
              state_q    <= S_SEQ;
              bcnt_q     <= '0;
              sync_found <= 1'b1;
            end
          end
          S_SEQ: begin
            if (!strk) state_q <= S_SEARCH;
            else if (bcnt_q == 4'd9) begin
              seq_q   <= word_n;
              state_q <= S_ID;
            end
          end
          S_ID: begin
            if (!strk) state_q <= S_SEARCH;
            else if (bcnt_q == 4'd9) begin
              if (word_n == ref_id) begin
                acq       <= 1'b1;
                pkda      <= seq_q;
                pkdwr     <= 1'b1;
                id_q      <= word_n;
                id_pend_q <= 1'b1;
                pkwc      <= 6'd1;
                state_q   <= S_DATA;
              end else begin
                id_reject <= 1'b1;
                state_q   <= S_SEARCH;
              end
            end
          end
          S_DATA: begin
            if (!strk) begin
              wwr_pend_q <= 1'b1;
              state_q    <= S_DONE;
            end else if (bcnt_q == 4'd9) begin
              pkda  <= word_n;
              pkdwr <= 1'b1;
              pkwc  <= pkwc + 6'd1;
              if (pkwc + 6'd1 == 6'(PKLEN)) begin
                wwr_pend_q <= 1'b1;
                state_q    <= S_DONE;
              end
            end
          end
          default: ;  // S_DONE: wait for clacq
        endcase
      end
    end
  end
endmodule
