// tb_aes_sbox: checks all 256 S-box entries against the reference model and
// three published values (00->63, 53->ed, ff->16).
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte, .out_byte);

  task automatic check(logic [7:0] exp);
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", in_byte, out_byte, exp);
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
    for (int i = 0; i < 256; i++) begin
      in_byte = 8'(i); #1; check(ref_sbox(8'(i)));
    end
    in_byte = 8'h00; #1; check(8'h63);
    in_byte = 8'h53; #1; check(8'hed);
    in_byte = 8'hff; #1; check(8'h16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
