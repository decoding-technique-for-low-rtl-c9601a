// Testbench of lp_switch at its default depth: flits go in and out with
// random stalls on both sides and must come out in order. Directed phases
// fill the buffer (in_ready must drop after exactly DEPTH flits), drain it
// (out_valid must drop after DEPTH flits), and stream with both sides always
// ready (one flit per cycle).
module tb_lp_switch;
  import lp_pkg::*;

  localparam int unsigned DEPTH = 5;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_ready;
  flit_t in_flit = '0;
  logic  out_valid, out_ready = 0;
  flit_t out_flit;
  int    checks = 0, failures = 0;

  lp_switch dut (.*);

  always #5 clk = ~clk;

  flit_t q [$];
  int    n_out = 0;
  int    src_mode = 0;  // 0 off, 1 always, 2 random
  int    snk_mode = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) q.push_back(in_flit);
      if (out_valid && out_ready) begin
        flit_t f;
        f = q.pop_front();
        checks++;
        n_out++;
        if (out_flit !== f) begin
          failures++;
          $display("FAIL got %b want %b", out_flit, f);
        end
      end
      if (!in_valid || in_ready) begin
        in_valid <= (src_mode == 1) || (src_mode == 2 && $urandom_range(0, 1) == 1);
        in_flit  <= flit_t'($urandom);
      end
      out_ready <= (snk_mode == 1) || (snk_mode == 2 && $urandom_range(0, 1) == 1);
    end
  end

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int accepted, n0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    expect_eq(out_valid, 0, "empty after reset");
    expect_eq(in_ready, 1, "ready after reset");
    // Fill.
    src_mode = 1;
    repeat (DEPTH + 5) @(posedge clk);
    expect_eq(q.size(), DEPTH, "flits held when full");
    expect_eq(in_ready, 0, "in_ready when full");
    // Drain.
    src_mode = 0;
    @(posedge clk);
    snk_mode = 1;
    repeat (DEPTH + 5) @(posedge clk);
    // The flit refused while full enters once space frees, then the source stops.
    expect_eq(n_out, DEPTH + 1, "flits out of a full buffer");
    expect_eq(out_valid, 0, "out_valid when empty");
    // Stream.
    src_mode = 1;
    repeat (10) @(posedge clk);
    n0 = n_out;
    repeat (50) @(posedge clk);
    expect_eq(n_out - n0, 50, "flits per 50 cycles when streaming");
    // Random.
    src_mode = 2;
    snk_mode = 2;
    wait (n_out > 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
