// tb_aes_subbytes_shiftrows: compares the merged Sub Bytes/Shift Rows step
// with the reference for the FIPS-197 appendix B round-1 input and 200 random
// states.
module tb_aes_subbytes_shiftrows;
  import aes_ref_pkg::*;
  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;

  aes_subbytes_shiftrows dut (.state_in, .state_out);

  task automatic check(logic [127:0] exp);
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL in %032h out %032h exp %032h", state_in, state_out, exp);
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
    // FIPS-197 appendix B, round 1: start of round -> after ShiftRows
    state_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 200; i++) begin
      state_in = rand128(); #1; check(ref_sub_shift(state_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
