// Serializer: sends an encoded word one bit per cycle on the serial data
// line, with its L1/L2 code held on the two additional lines for all W bit
// times of the word.
//
// A word is loaded into a shift register and a_0 goes out first. The output
// is a valid/ready flit stream: a flit stays on the output until it is taken.
// A new word is accepted while idle, or in the cycle the last bit of the
// current word is taken, so back-to-back words leave without a gap (W cycles
// per word). Bit order, the handshake and the gapless reload are this
// design's choices; the serializer itself is only named in the published
// architecture.
//
// Interface: word_valid/word_ready/word/word_l in, flit_valid/flit_ready/flit
// out. Reset: rst_n, active low, synchronous.
module lp_serializer
  import lp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  word_valid,
  output logic  word_ready,
  input  word_t word,
  input  mode_t word_l,
  output logic  flit_valid,
  input  logic  flit_ready,
  output flit_t flit
);

  localparam int unsigned CW = $clog2(W);

  word_t         sreg;
  mode_t         lreg;
  logic [CW-1:0] cnt;
  logic          busy;
  logic          last_taken;

  assign last_taken = busy && flit_ready && (cnt == CW'(W - 1));
  assign word_ready = !busy || last_taken;

  assign flit_valid = busy;
  assign flit.d     = sreg[0];
  assign flit.l1    = lreg[1];
  assign flit.l2    = lreg[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      sreg <= '0;
      lreg <= MODE_NONE;
    end else if (word_valid && word_ready) begin
      busy <= 1'b1;
      cnt  <= '0;
      sreg <= word;
      lreg <= word_l;
    end else if (busy && flit_ready) begin
      if (cnt == CW'(W - 1)) begin
        busy <= 1'b0;
        cnt  <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
      sreg <= {sreg[1:W-1], 1'b0};
    end
  end

endmodule
