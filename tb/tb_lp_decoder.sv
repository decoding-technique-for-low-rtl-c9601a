// Testbench of lp_decoder: the four code table rows (one per L1/L2 value),
// then all 256 words under all four L1/L2 values against the reference scan.
module tb_lp_decoder;
  import lp_pkg::*;
  import lp_ref_pkg::*;

  word_t enc, dec;
  logic  l1, l2;
  int    checks = 0, failures = 0;

  lp_decoder dut (.enc, .l1, .l2, .dec);

  task automatic check(word_t e, logic [1:0] l, word_t want);
    enc = e; {l1, l2} = l;
    #1;
    checks++;
    if (dec !== want) begin
      failures++;
      $display("FAIL enc=%b l=%b dec=%b want=%b", e, l, dec, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Code table: encoded word, L1 L2, decoded word.
    check(8'b11000110, 2'b11, 8'b10101010);
    check(8'b00110001, 2'b10, 8'b01010001);
    check(8'b10000110, 2'b01, 8'b10001010);
    check(8'b11111111, 2'b00, 8'b11111111);
    for (int l = 0; l < 4; l++)
      for (int v = 0; v < 256; v++)
        check(word_t'(v), 2'(l), ref_decode(8'(v), 2'(l)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
