// tb_aes_keyexp_first: checks RotWord of the last key word and the four
// running XORs of the key words, on the FIPS-197 key and random keys.
module tb_aes_keyexp_first;
  import aes_ref_pkg::*;
  logic [127:0] key_in, prefix_xor;
  logic [31:0] rot_word;
  int checks = 0, failures = 0;

  aes_keyexp_first dut (.key_in, .rot_word, .prefix_xor);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_in = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    checks++; if (rot_word !== 32'hcf4f3c09) begin failures++; $display("FAIL rot %08h", rot_word); end
    for (int i = 0; i < 100; i++) begin
      logic [31:0] w3;
      key_in = rand128(); #1;
      w3 = key_in[31:0];
      checks++;
      if (rot_word !== {w3[23:16], w3[15:8], w3[7:0], w3[31:24]}) begin failures++; $display("FAIL rot %08h", rot_word); end
      checks++;
      begin
        logic [31:0] a, b, c, d2;
        a = key_in[127:96]; b = a ^ key_in[95:64]; c = b ^ key_in[63:32]; d2 = c ^ key_in[31:0];
        if (prefix_xor !== {a, b, c, d2}) begin failures++; $display("FAIL prefix %032h", prefix_xor); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
