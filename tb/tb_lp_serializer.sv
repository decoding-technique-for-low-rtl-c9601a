// Testbench of lp_serializer. Phase 1: words offered back to back and the
// line always ready; every word must leave a_0 first, with its L1/L2 on all
// bit times, and the line must stay busy, one word per W cycles. Phase 2:
// random gaps on both sides; every bit must still come out in order.
module tb_lp_serializer;
  import lp_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  word_valid = 0, word_ready;
  word_t word = '0;
  mode_t word_l = MODE_NONE;
  logic  flit_valid, flit_ready = 0;
  flit_t flit;
  int    checks = 0, failures = 0;

  lp_serializer dut (.*);

  always #5 clk = ~clk;

  word_t sent_w [$];
  mode_t sent_l [$];
  int    bitpos = 0;
  word_t cur_w;
  mode_t cur_l;
  int    words_out = 0;
  bit    random_mode = 0;
  int    cycle = 0;
  int    done_at [int];

  always @(posedge clk) cycle <= cycle + 1;

  // Producer: drives a new random word after each accepted one.
  always @(posedge clk) begin
    if (rst_n) begin
      if (word_valid && word_ready) begin
        sent_w.push_back(word);
        sent_l.push_back(word_l);
      end
      if (!word_valid || word_ready) begin
        word_valid <= random_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
        word       <= word_t'($urandom);
        word_l     <= mode_t'($urandom_range(0, 3));
      end
      flit_ready <= random_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end

  // Line monitor.
  always @(posedge clk) begin
    if (rst_n && flit_valid && flit_ready) begin
      if (bitpos == 0) begin
        if (sent_w.size() == 0) begin
          checks++; failures++;
          $display("FAIL bit with no word sent");
        end else begin
          cur_w = sent_w.pop_front();
          cur_l = sent_l.pop_front();
        end
      end
      checks++;
      if (flit.d !== cur_w[bitpos] || {flit.l1, flit.l2} !== cur_l) begin
        failures++;
        $display("FAIL word %b bit %0d: d=%b l=%b%b", cur_w, bitpos, flit.d, flit.l1, flit.l2);
      end
      bitpos = (bitpos == W - 1) ? 0 : bitpos + 1;
      if (bitpos == 0) begin
        words_out++;
        done_at[words_out] = cycle;
      end
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
    int busy_cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Phase 1: the line carries one word per W cycles with no gap.
    wait (words_out == 2);
    busy_cycles = 0;
    repeat (10 * W) begin
      @(posedge clk);
      if (flit_valid) busy_cycles++;
    end
    wait (words_out == 12);
    checks++;
    if (busy_cycles != 10 * W || done_at[12] - done_at[2] != 10 * W) begin
      failures++;
      $display("FAIL rate: %0d busy cycles, 10 words in %0d cycles", busy_cycles, done_at[12] - done_at[2]);
    end
    // Phase 2: random gaps.
    random_mode = 1;
    wait (words_out == 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
