// tb_aes_addroundkey: drives three different inputs and a key, and checks that
// each select value XORs the right input with the key.
module tb_aes_addroundkey;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  ark_sel_e sel;
  logic [127:0] state_ff, state_sr, state_mc, round_key, state_out;
  int checks = 0, failures = 0;

  aes_addroundkey dut (.sel, .state_ff, .state_sr, .state_mc, .round_key, .state_out);

  task automatic check(logic [127:0] exp);
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL sel %0d out %032h exp %032h", sel, state_out, exp);
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
    for (int i = 0; i < 100; i++) begin
      state_ff = rand128(); state_sr = rand128(); state_mc = rand128(); round_key = rand128();
      sel = ARK_INITIAL; #1; check(state_ff ^ round_key);
      sel = ARK_MIDDLE;  #1; check(state_mc ^ round_key);
      sel = ARK_FINAL;   #1; check(state_sr ^ round_key);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
