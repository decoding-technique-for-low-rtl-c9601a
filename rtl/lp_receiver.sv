// Receiver: the deserializer followed by the decoder.
//
// Bits from the last switch are collected into a word with its L1/L2 code;
// the completed word passes through the combinational decoder (lp_decoder)
// to the consuming core, which takes it with out_ready. out_l shows the code
// the word travelled with.
//
// Interface: flit_valid/flit_ready/flit from the switch, out_valid/
// out_ready/out_data/out_l to the core. Timing: a word is on the output the
// cycle after its last bit is taken.
module lp_receiver
  import lp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flit_valid,
  output logic  flit_ready,
  input  flit_t flit,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data,
  output mode_t out_l
);

  word_t enc;

  lp_deserializer u_des (
    .clk        (clk),
    .rst_n      (rst_n),
    .flit_valid (flit_valid),
    .flit_ready (flit_ready),
    .flit       (flit),
    .word_valid (out_valid),
    .word_ready (out_ready),
    .word       (enc),
    .word_l     (out_l)
  );

  lp_decoder u_dec (
    .enc (enc),
    .l1  (out_l[1]),
    .l2  (out_l[0]),
    .dec (out_data)
  );

endmodule
