// Testbench of lp_receiver: random words are encoded by the reference
// encoder and sent bit by bit with random gaps; the receiver's output, taken
// with random stalls, must be the original word with the L1/L2 sent.
module tb_lp_receiver;
  import lp_pkg::*;
  import lp_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  flit_valid = 0, flit_ready;
  flit_t flit = '0;
  logic  out_valid, out_ready = 0;
  word_t out_data;
  mode_t out_l;
  int    checks = 0, failures = 0;

  lp_receiver dut (.*);

  always #5 clk = ~clk;

  word_t exp_d [$];
  logic [1:0] exp_l [$];
  word_t tx_e;
  logic [1:0] tx_l;
  int    tx_bit = W;
  int    n_out = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (!flit_valid || flit_ready) begin
        if (tx_bit == W) begin
          word_t d;
          d = word_t'($urandom);
          ref_encode(d, tx_e, tx_l);
          exp_d.push_back(d);
          exp_l.push_back(tx_l);
          tx_bit = 0;
        end
        if ($urandom_range(0, 3) != 0) begin
          flit_valid <= 1'b1;
          flit       <= '{d: tx_e[tx_bit], l1: tx_l[1], l2: tx_l[0]};
          tx_bit++;
        end else begin
          flit_valid <= 1'b0;
        end
      end
      out_ready <= $urandom_range(0, 2) != 0;
      if (out_valid && out_ready) begin
        word_t      d;
        logic [1:0] l;
        d = exp_d.pop_front();
        l = exp_l.pop_front();
        checks++;
        if (out_data !== d || out_l !== l) begin
          failures++;
          $display("FAIL got %b/%b want %b/%b", out_data, out_l, d, l);
        end
        n_out++;
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
