// Testbench of lp_deserializer: random words are sent bit by bit (a_0 first,
// L1/L2 on every bit time) with random gaps, and taken with random stalls;
// each word and its L1/L2 must come out whole and in order. A phase with no
// stalls checks that one word comes out every W cycles.
module tb_lp_deserializer;
  import lp_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  flit_valid = 0, flit_ready;
  flit_t flit = '0;
  logic  word_valid, word_ready = 0;
  word_t word;
  mode_t word_l;
  int    checks = 0, failures = 0;

  lp_deserializer dut (.*);

  always #5 clk = ~clk;

  word_t exp_w [$];
  mode_t exp_l [$];
  word_t tx_w;
  mode_t tx_l;
  int    tx_bit = W;
  int    words_in = 0;
  bit    random_mode = 0;
  int    cycle = 0;
  int    done_at [int];

  always @(posedge clk) cycle <= cycle + 1;

  // Bit source.
  always @(posedge clk) begin
    if (rst_n) begin
      if (!flit_valid || flit_ready) begin
        if (tx_bit == W) begin
          tx_w = word_t'($urandom);
          tx_l = mode_t'($urandom_range(0, 3));
          exp_w.push_back(tx_w);
          exp_l.push_back(tx_l);
          tx_bit = 0;
        end
        if (!random_mode || $urandom_range(0, 3) != 0) begin
          flit_valid <= 1'b1;
          flit       <= '{d: tx_w[tx_bit], l1: tx_l[1], l2: tx_l[0]};
          tx_bit++;
        end else begin
          flit_valid <= 1'b0;
        end
      end
      word_ready <= random_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
    end
  end

  // Word sink.
  always @(posedge clk) begin
    if (rst_n && word_valid && word_ready) begin
      word_t w;
      mode_t l;
      w = exp_w.pop_front();
      l = exp_l.pop_front();
      checks++;
      if (word !== w || word_l !== l) begin
        failures++;
        $display("FAIL got %b/%b want %b/%b", word, word_l, w, l);
      end
      words_in++;
      done_at[words_in] = cycle;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (words_in == 12);
    checks++;
    if (done_at[12] - done_at[2] != 10 * W) begin
      failures++;
      $display("FAIL rate: 10 words in %0d cycles", done_at[12] - done_at[2]);
    end
    random_mode = 1;
    wait (words_in == 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
