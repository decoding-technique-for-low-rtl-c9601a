// Low-transition serial link between two cores.
//
// Sender (encoder + serializer) -> switch A -> switch B -> receiver
// (deserializer + decoder). Each W-bit word crosses on one serial data line
// with two additional lines, L1 and L2, that tell the receiver which window
// of the word the encoder rearranged to cut the number of 0/1 transitions on
// the serial line. The chain follows the published architecture; the cores
// at both ends are not part of the design and their side is brought out as
// valid/ready ports. line_* show the hop between the two switches, where the
// serial and additional lines run.
//
// Timing: with nothing stalled a word needs W cycles on the line, so the
// link carries one word per W cycles. Through an idle link a decoded word is
// on the output W + 3 cycles after the clock edge that accepted it: its first
// bit reaches switch A one cycle later, switch B and the deserializer one
// cycle each after that, the other W - 1 bits follow one per cycle, and the
// word is shown the cycle after its last bit. Reset: rst_n, active low,
// synchronous.
module lp_link_top
  import lp_pkg::*;
#(
  parameter int unsigned DEPTH = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data,
  output mode_t out_l,
  output logic  line_data,
  output logic  line_valid,
  output mode_t line_l
);

  logic  s_valid, s_ready, a_valid, a_ready, b_valid, b_ready;
  flit_t s_flit, a_flit, b_flit;

  lp_sender u_sender (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .flit_valid (s_valid),
    .flit_ready (s_ready),
    .flit       (s_flit)
  );

  lp_switch #(.DEPTH(DEPTH)) u_switch_a (
    .clk, .rst_n,
    .in_valid  (s_valid),
    .in_ready  (s_ready),
    .in_flit   (s_flit),
    .out_valid (a_valid),
    .out_ready (a_ready),
    .out_flit  (a_flit)
  );

  lp_switch #(.DEPTH(DEPTH)) u_switch_b (
    .clk, .rst_n,
    .in_valid  (a_valid),
    .in_ready  (a_ready),
    .in_flit   (a_flit),
    .out_valid (b_valid),
    .out_ready (b_ready),
    .out_flit  (b_flit)
  );

  lp_receiver u_receiver (
    .clk, .rst_n,
    .flit_valid (b_valid),
    .flit_ready (b_ready),
    .flit       (b_flit),
    .out_valid, .out_ready, .out_data, .out_l
  );

  assign line_data  = a_flit.d;
  assign line_valid = a_valid && a_ready;
  assign line_l     = mode_t'({a_flit.l1, a_flit.l2});

endmodule
