// Transition encoder: picks L1/L2 and an encoded word with few transitions
// that the decoder (lp_decoder) turns back into the data word.
//
// The published work gives only the decoder; this encoder is the design's
// own inverse of it. For each window (L1/L2 = 10, 01, 11) the window is
// scanned like the decoder does, but the pattern looked for is a,~a,a, which
// is turned into a,a,~a by inverting the two later bits (the decoder's step
// backwards); the scan then jumps three places. Because the decoder's scan
// can also fire on patterns the encoder left alone, every candidate is run
// through a decoder here and kept only if it restores the data word. Among
// the kept candidates and the plain word (L1/L2 = 00) the one with the fewest
// transitions is sent; ties go to 00, then 10, then 01, then 11. So the
// link is lossless and never sends more transitions than the plain word.
//
// Interface: data in; enc, l1, l2 out. Timing: combinational, no clock.
module lp_encoder
  import lp_pkg::*;
(
  input  word_t data,
  output word_t enc,
  output logic  l1,
  output logic  l2
);

  // Inverse scan of one window.
  function automatic word_t squeeze(word_t x, int unsigned start, int unsigned limit);
    word_t       o    = x;
    int unsigned skip = 0;
    for (int unsigned j = 0; j < W - 2; j++) begin
      if (j >= start && j < limit) begin
        if (skip != 0) begin
          skip = skip - 1;
        end else if (o[j] != o[j+1] && o[j+1] != o[j+2]) begin
          o[j+1] = ~o[j+1];
          o[j+2] = ~o[j+2];
          skip   = 2;
        end
      end
    end
    return o;
  endfunction

  word_t cand_lo, cand_hi, cand_full;
  word_t back_lo, back_hi, back_full;

  assign cand_lo   = squeeze(data, LO_START,   LO_LIMIT);
  assign cand_hi   = squeeze(data, HI_START,   HI_LIMIT);
  assign cand_full = squeeze(data, FULL_START, FULL_LIMIT);

  lp_decoder u_chk_lo   (.enc(cand_lo),   .l1(1'b1), .l2(1'b0), .dec(back_lo));
  lp_decoder u_chk_hi   (.enc(cand_hi),   .l1(1'b0), .l2(1'b1), .dec(back_hi));
  lp_decoder u_chk_full (.enc(cand_full), .l1(1'b1), .l2(1'b1), .dec(back_full));

  always_comb begin
    mode_t       best;
    word_t       best_word;
    int unsigned best_t;
    best      = MODE_NONE;
    best_word = data;
    best_t    = transitions(data);
    if (back_lo == data && transitions(cand_lo) < best_t) begin
      best = MODE_LO;   best_word = cand_lo;   best_t = transitions(cand_lo);
    end
    if (back_hi == data && transitions(cand_hi) < best_t) begin
      best = MODE_HI;   best_word = cand_hi;   best_t = transitions(cand_hi);
    end
    if (back_full == data && transitions(cand_full) < best_t) begin
      best = MODE_FULL; best_word = cand_full; best_t = transitions(cand_full);
    end
    enc = best_word;
    {l1, l2} = best;
  end

endmodule
