// tb_aes_crypto_ff: checks reset, loading the first input (plain_text), its priority over the
// second (round_out), loading the second, and holding when neither load is high.
module tb_aes_crypto_ff;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load_pt = 1'b0, load_rk = 1'b0;
  logic [127:0] plain_text, round_out, state_q, model;
  int checks = 0, failures = 0;

  aes_crypto_ff dut (.clk, .rst_n, .load_pt, .load_rk, .plain_text, .round_out, .state_q);

  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if (state_q !== model) begin
      failures++;
      $display("FAIL at %0t: q %032h expected %032h", $time, state_q, model);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    plain_text = rand128(); round_out = rand128();
    model = '0;
    @(posedge clk); #1; check();   // reset applied at the first clock edge
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load_pt = 1'($urandom); load_rk = 1'($urandom);
      plain_text = rand128(); round_out = rand128();
      if (load_pt) model = plain_text;
      else if (load_rk) model = round_out;
      @(posedge clk); #1; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
