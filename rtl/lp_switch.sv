// Switch: one buffered hop of the serial link, a first-in first-out buffer
// of DEPTH flits (serial bit plus L1/L2).
//
// The published architecture draws two such switches between sender and
// receiver, each with a row of five buffer cells and one way in and one way
// out, so no routing is built and DEPTH defaults to 5. The buffer is a
// circular array with read and write pointers and an occupancy count.
// in_ready is low while the buffer is full (backpressure to the previous
// stage); out_valid is high while it holds a flit. A flit spends at least
// one cycle in the buffer: there is no combinational path from input to
// output, so a chain of switches has no long ready or valid paths.
//
// Interface: in_valid/in_ready/in_flit, out_valid/out_ready/out_flit.
// Reset: rst_n, active low, synchronous; the buffer comes out of reset empty.
module lp_switch
  import lp_pkg::*;
#(
  parameter int unsigned DEPTH = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_flit
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned NW = $clog2(DEPTH + 1);

  flit_t         mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [NW-1:0] count;
  logic          push, pop;

  assign in_ready  = (count != NW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_flit  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + NW'(push) - NW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

  // The stage feeding the switch must hold a refused flit.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_flit));

endmodule
