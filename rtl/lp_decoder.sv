// Transition decoder: restores a data word from the encoded word and the
// L1/L2 lines.
//
// The rule follows the published decoding technique. L1/L2 select a window
// (L1: a_0..a_4, L2: a_3..a_7, both: a_0..a_7, neither: the word passes
// unchanged). The window is scanned from its low end. At position j, if bits
// j and j+1 are equal and bit j+2 differs, bits j+1 and j+2 are inverted
// (a,a,~a becomes a,~a,a) and the scan continues at j+3; otherwise it
// continues at j+1. The scan is unrolled into a fixed loop with a skip
// counter, so the block is pure combinational logic.
//
// Interface: enc, l1, l2 in; dec out. Timing: combinational, no clock.
module lp_decoder
  import lp_pkg::*;
(
  input  word_t enc,
  input  logic  l1,
  input  logic  l2,
  output word_t dec
);

  int unsigned start, limit;

  always_comb begin
    unique case ({l1, l2})
      2'b10:   begin start = LO_START;   limit = LO_LIMIT;   end
      2'b01:   begin start = HI_START;   limit = HI_LIMIT;   end
      2'b11:   begin start = FULL_START; limit = FULL_LIMIT; end
      default: begin start = 0;          limit = 0;          end
    endcase
  end

  always_comb begin
    word_t       o;
    int unsigned skip;
    o    = enc;
    skip = 0;
    for (int unsigned j = 0; j < W - 2; j++) begin
      if (j >= start && j < limit) begin
        if (skip != 0) begin
          skip = skip - 1;
        end else if (o[j] == o[j+1] && o[j+1] != o[j+2]) begin
          o[j+1] = ~o[j+1];
          o[j+2] = ~o[j+2];
          skip   = 2;
        end
      end
    end
    dec = o;
  end

endmodule
