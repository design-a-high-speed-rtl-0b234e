// tb_aes_mixcolumns: compares Mix Columns with the FIPS-197 appendix B round-1
// value and the reference model on 200 random states.
module tb_aes_mixcolumns;
  import aes_ref_pkg::*;
  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;

  aes_mixcolumns dut (.state_in, .state_out);

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
    state_in = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    check(128'h046681e5e0cb199a48f8d37a2806264c);
    for (int i = 0; i < 200; i++) begin
      state_in = rand128(); #1; check(ref_mix(state_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
