// End-to-end testbench of lp_link_top at its default parameters.
//
// Phase 1: one word into an idle link; the cycles from acceptance to the
//          decoded word are checked against the latency W + 3.
// Phase 2: the code table's four data words; each must cross the line with
//          the table's encoded word and L1/L2 and come out restored.
// Phase 3: back-to-back words with the consumer always ready; the link must
//          deliver one word per W cycles.
// Phase 4: random words with random producer gaps and long consumer stalls,
//          so that both switches fill and the sender is held off.
// Every word must come out unchanged and in order. Each mechanism is counted
// (each L1/L2 value on the line, switch A full, switch B full, the sender
// refusing a word, the receiver holding a word); one that never happened is
// a failure. The transitions on the serial line within words are compared
// with those the plain words would have had.
module tb_lp_link_top;
  import lp_pkg::*;
  import lp_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_ready;
  word_t in_data = '0;
  logic  out_valid, out_ready = 0;
  word_t out_data;
  mode_t out_l;
  logic  line_data, line_valid;
  mode_t line_l;
  int    checks = 0, failures = 0;

  lp_link_top dut (.*);

  always #5 clk = ~clk;

  typedef enum int {P_IDLE, P_ONE, P_TABLE, P_STREAM, P_RANDOM} phase_t;
  phase_t phase = P_IDLE;

  word_t table_d [4] = '{8'b10101010, 8'b01010001, 8'b10001010, 8'b11111111};
  word_t table_e [4] = '{8'b11000110, 8'b00110001, 8'b10000110, 8'b11111111};
  logic [1:0] table_l [4] = '{2'b11, 2'b10, 2'b01, 2'b00};

  int    cycle = 0;
  word_t sent [$];
  int    sent_at [$];
  int    n_drv = 0, n_in = 0, n_out = 0;
  int    done_at [int];
  int    first_latency = -1;

  // Mechanism counters.
  int    mode_seen [4] = '{0, 0, 0, 0};
  int    a_full = 0, b_full = 0, sender_wait = 0, recv_hold = 0;
  // Transition counters.
  int    line_bits = 0, line_trans = 0, plain_trans = 0;
  word_t line_word;
  logic  [1:0] line_word_l;
  int    line_pos = 0, line_words = 0;

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // Producer.
      if (in_valid && in_ready) begin
        sent.push_back(in_data);
        sent_at.push_back(cycle);
        n_in++;
      end
      if (in_valid && !in_ready) sender_wait++;
      if (!in_valid || in_ready) begin
        bit v;
        case (phase)
          P_ONE:    v = (n_drv < 1);
          P_TABLE:  v = (n_drv < 5);
          P_STREAM: v = 1'b1;
          P_RANDOM: v = $urandom_range(0, 4) != 0;
          default:  v = 1'b0;
        endcase
        in_valid <= v;
        in_data  <= (phase == P_TABLE && n_drv >= 1 && n_drv < 5) ? table_d[n_drv - 1]
                                                                  : word_t'($urandom);
        if (v) n_drv++;
      end
      // Consumer.
      case (phase)
        P_RANDOM: out_ready <= ($urandom_range(0, 99) < 70) ? 1'b1
                             : (($urandom_range(0, 99) < 10) ? 1'b0 : out_ready);
        default:  out_ready <= 1'b1;
      endcase
      if (out_valid && !out_ready) recv_hold++;
      if (out_valid && out_ready) begin
        word_t d;
        int    t;
        d = sent.pop_front();
        t = sent_at.pop_front();
        checks++;
        if (out_data !== d) begin
          failures++;
          $display("FAIL word %0d: got %b want %b", n_out, out_data, d);
        end
        if (n_out == 0) first_latency = cycle - t;
        n_out++;
        done_at[n_out] = cycle;
      end
      // Switches.
      if (!dut.u_switch_a.in_ready) a_full++;
      if (!dut.u_switch_b.in_ready) b_full++;
      // Serial line between the switches.
      if (line_valid) begin
        line_word[line_pos] = line_data;
        line_word_l = line_l;
        line_pos++;
        if (line_pos == W) begin
          word_t d;
          line_pos = 0;
          mode_seen[line_word_l]++;
          line_trans  += ref_trans(line_word);
          d = ref_decode(line_word, line_word_l);
          plain_trans += ref_trans(d);
          // Table words are words 2..5 of the run.
          if (line_words >= 1 && line_words < 5) begin
            checks++;
            if (line_word !== table_e[line_words - 1] || line_word_l !== table_l[line_words - 1]) begin
              failures++;
              $display("FAIL table row %0d on the line: %b/%b", line_words - 1, line_word, line_word_l);
            end
          end
          line_words++;
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    phase = P_ONE;
    wait (n_out == 1);
    expect_eq(first_latency, W + 3, "latency of one word through an idle link");
    phase = P_TABLE;
    wait (n_out == 5);
    repeat (20) @(posedge clk);
    phase = P_STREAM;
    base = n_out;
    wait (n_out == base + 14);
    expect_eq(done_at[base + 14] - done_at[base + 4], 10 * W, "cycles for 10 streamed words");
    phase = P_RANDOM;
    wait (n_out == 3000);
    phase = P_IDLE;
    $display("L1L2 on the line: 00=%0d 10=%0d 01=%0d 11=%0d", mode_seen[0], mode_seen[2],
             mode_seen[1], mode_seen[3]);
    $display("cycles switch A full=%0d, switch B full=%0d, sender refusing=%0d, receiver holding=%0d",
             a_full, b_full, sender_wait, recv_hold);
    $display("transitions within words on the line: %0d coded, %0d plain", line_trans, plain_trans);
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin
        failures++;
        $display("FAIL L1L2=%b never used", 2'(m));
      end
    end
    checks++; if (a_full == 0)      begin failures++; $display("FAIL switch A never full"); end
    checks++; if (b_full == 0)      begin failures++; $display("FAIL switch B never full"); end
    checks++; if (sender_wait == 0) begin failures++; $display("FAIL sender never refused a word"); end
    checks++; if (recv_hold == 0)   begin failures++; $display("FAIL receiver never held a word"); end
    checks++;
    if (line_trans > plain_trans) begin
      failures++;
      $display("FAIL coding added transitions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
