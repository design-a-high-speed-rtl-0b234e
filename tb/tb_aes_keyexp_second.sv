// tb_aes_keyexp_second: runs the whole FIPS-197 appendix A key schedule through
// the second block (feeding it the running XORs of the key words and the
// reference SubWord(RotWord(w3))) and checks
// every round key against the reference model and the published last key.
module tb_aes_keyexp_second;
  import aes_ref_pkg::*;
  logic [127:0] prefix_xor, key_out;
  logic [31:0] sub_word;
  logic [3:0] round;
  int checks = 0, failures = 0;

  aes_keyexp_second dut (.prefix_xor, .sub_word, .round, .key_out);

  function automatic logic [31:0] ref_subrot(logic [31:0] w);
    logic [31:0] t = {w[23:0], w[31:24]};
    return {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
  endfunction

  task automatic run_schedule(logic [127:0] key);
    logic [127:0] k = key;
    for (int r = 1; r <= 10; r++) begin
      prefix_xor = {k[127:96], k[127:96] ^ k[95:64], k[127:96] ^ k[95:64] ^ k[63:32],
                    k[127:96] ^ k[95:64] ^ k[63:32] ^ k[31:0]};
      sub_word = ref_subrot(k[31:0]); round = 4'(r); #1;
      checks++;
      if (key_out !== ref_next_key(k, r)) begin
        failures++;
        $display("FAIL round %0d key %032h expected %032h", r, key_out, ref_next_key(k, r));
      end
      k = ref_next_key(k, r);
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
    run_schedule(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (key_out !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL last key %032h", key_out);
    end
    for (int i = 0; i < 10; i++) run_schedule(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
