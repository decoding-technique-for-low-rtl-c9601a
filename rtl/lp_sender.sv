// Sender: the encoder followed by the serializer.
//
// A data word from the producing core is encoded (lp_encoder picks the L1/L2
// window and the low-transition word) in the cycle it is accepted, and the
// serializer then sends it a_0 first, one bit per cycle, with L1/L2 on the
// two additional lines. Encoding ahead of serializing is this design's
// reading of the published sender, which draws both units without saying
// how they connect.
//
// Interface: in_valid/in_ready/in_data from the core, flit_valid/flit_ready/
// flit to the first switch. Timing: the first bit of a word is on the line
// one cycle after the word is accepted; a word takes W cycles to send.
module lp_sender
  import lp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  output logic  flit_valid,
  input  logic  flit_ready,
  output flit_t flit
);

  word_t enc;
  logic  l1, l2;

  lp_encoder u_enc (
    .data (in_data),
    .enc  (enc),
    .l1   (l1),
    .l2   (l2)
  );

  lp_serializer u_ser (
    .clk        (clk),
    .rst_n      (rst_n),
    .word_valid (in_valid),
    .word_ready (in_ready),
    .word       (enc),
    .word_l     (mode_t'({l1, l2})),
    .flit_valid (flit_valid),
    .flit_ready (flit_ready),
    .flit       (flit)
  );

endmodule
