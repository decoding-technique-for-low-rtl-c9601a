// Testbench of lp_sender: random words (and the code table's data words)
// are sent with random gaps and line stalls. The bits on the line are
// gathered into words; each must equal the reference encoding of the word
// sent, with the reference L1/L2, and decode back to it.
module tb_lp_sender;
  import lp_pkg::*;
  import lp_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_ready;
  word_t in_data = '0;
  logic  flit_valid, flit_ready = 0;
  flit_t flit;
  int    checks = 0, failures = 0;

  lp_sender dut (.*);

  always #5 clk = ~clk;

  word_t sent [$];
  word_t table_words [4] = '{8'b10101010, 8'b01010001, 8'b10001010, 8'b11111111};
  int    n_drv = 0, n_out = 0, bitpos = 0;
  word_t got;
  logic [1:0] got_l;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        sent.push_back(in_data);
      end
      if (!in_valid || in_ready) begin
        bit v;
        v = $urandom_range(0, 3) != 0;
        in_valid <= v;
        in_data  <= (n_drv < 4) ? table_words[n_drv] : word_t'($urandom);
        if (v) n_drv++;
      end
      flit_ready <= $urandom_range(0, 3) != 0;
      if (flit_valid && flit_ready) begin
        got[bitpos] = flit.d;
        got_l = {flit.l1, flit.l2};
        bitpos++;
        if (bitpos == W) begin
          word_t      d, e;
          logic [1:0] l;
          bitpos = 0;
          d = sent.pop_front();
          ref_encode(d, e, l);
          checks++;
          if (got !== e || got_l !== l || ref_decode(got, got_l) !== d) begin
            failures++;
            $display("FAIL data %b: line %b/%b, want %b/%b", d, got, got_l, e, l);
          end
          n_out++;
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n_out == 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
