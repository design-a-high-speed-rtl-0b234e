// tb_aes_subword: checks the 32-bit substitution against the reference S-box
// (FIPS-197 appendix A value cf4f3c09 -> 8a84eb01, then random words).
module tb_aes_subword;
  import aes_ref_pkg::*;
  logic [31:0] word_in, word_out;
  int checks = 0, failures = 0;

  aes_subword dut (.word_in, .word_out);

  task automatic check(logic [31:0] exp);
    checks++;
    if (word_out !== exp) begin
      failures++;
      $display("FAIL %08h -> %08h expected %08h", word_in, word_out, exp);
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
    word_in = 32'hcf4f3c09; #1; check(32'h8a84eb01);
    for (int i = 0; i < 200; i++) begin
      word_in = $urandom; #1;
      check({ref_sbox(word_in[31:24]), ref_sbox(word_in[23:16]), ref_sbox(word_in[15:8]), ref_sbox(word_in[7:0])});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
