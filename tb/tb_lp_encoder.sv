// Testbench of lp_encoder: the code table rows must come out as printed, and
// for all 256 words the code must decode back to the word (through an
// independent reference decoder), never have more transitions than the word,
// and match the reference encoder.
module tb_lp_encoder;
  import lp_pkg::*;
  import lp_ref_pkg::*;

  word_t      data, enc;
  logic       l1, l2;
  int         checks = 0, failures = 0;
  int         saved = 0, plain = 0;
  logic [0:7] re;
  logic [1:0] rl;

  lp_encoder dut (.data, .enc, .l1, .l2);

  task automatic expect_eq(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s data=%b enc=%b l=%b%b", what, data, enc, l1, l2);
    end
  endtask

  task automatic row(word_t d, word_t e, logic [1:0] l);
    data = d;
    #1;
    expect_eq(enc === e && {l1, l2} === l, "table row");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row(8'b10101010, 8'b11000110, 2'b11);
    row(8'b01010001, 8'b00110001, 2'b10);
    row(8'b10001010, 8'b10000110, 2'b01);
    row(8'b11111111, 8'b11111111, 2'b00);
    for (int v = 0; v < 256; v++) begin
      data = word_t'(v);
      #1;
      expect_eq(ref_decode(enc, {l1, l2}) == data, "round trip");
      expect_eq(ref_trans(enc) <= ref_trans(data), "no more transitions");
      ref_encode(data, re, rl);
      expect_eq(enc == re && {l1, l2} == rl, "reference");
      saved += ref_trans(data) - ref_trans(enc);
      plain += ref_trans(data);
    end
    $display("transitions over all 256 words: %0d plain, %0d saved", plain, saved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
