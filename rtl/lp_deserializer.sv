// Deserializer: collects W bits from the serial data line into a word,
// together with the L1/L2 code on the two additional lines.
//
// The first bit after reset, and after each completed word, is a_0. Word
// boundaries come from counting bits; no framing line is used. The L1/L2
// value is taken from the word's last bit time. A completed word is held
// on the output (word_valid) until word_ready; while it is held the next
// word's first bit is accepted only in the cycle the held word is taken, so
// words can flow at one bit per cycle. The deserializer is only named in the
// published architecture; all of this is this design's own choice.
//
// Interface: flit_valid/flit_ready/flit in, word_valid/word_ready/word/word_l
// out. Reset: rst_n, active low, synchronous.
module lp_deserializer
  import lp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flit_valid,
  output logic  flit_ready,
  input  flit_t flit,
  output logic  word_valid,
  input  logic  word_ready,
  output word_t word,
  output mode_t word_l
);

  localparam int unsigned CW = $clog2(W);

  word_t         acc;
  logic [CW-1:0] cnt;
  logic          full;
  logic          take;

  assign flit_ready = !full || word_ready;
  assign take       = flit_valid && flit_ready;
  assign word_valid = full;
  assign word       = acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc    <= '0;
      cnt    <= '0;
      full   <= 1'b0;
      word_l <= MODE_NONE;
    end else begin
      if (full && word_ready) full <= 1'b0;
      if (take) begin
        acc[cnt] <= flit.d;
        if (cnt == CW'(W - 1)) begin
          cnt    <= '0;
          full   <= 1'b1;
          word_l <= mode_t'({flit.l1, flit.l2});
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
