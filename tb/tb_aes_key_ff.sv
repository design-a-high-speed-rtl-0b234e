// tb_aes_key_ff: checks reset, loading the first input (common_key), its priority over the
// second (next_key), loading the second, and holding when neither load is high.
module tb_aes_key_ff;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load_key = 1'b0, load_next = 1'b0;
  logic [127:0] common_key, next_key, key_q, model;
  int checks = 0, failures = 0;

  aes_key_ff dut (.clk, .rst_n, .load_key, .load_next, .common_key, .next_key, .key_q);

  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if (key_q !== model) begin
      failures++;
      $display("FAIL at %0t: q %032h expected %032h", $time, key_q, model);
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
    common_key = rand128(); next_key = rand128();
    model = '0;
    @(posedge clk); #1; check();   // reset applied at the first clock edge
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load_key = 1'($urandom); load_next = 1'($urandom);
      common_key = rand128(); next_key = rand128();
      if (load_key) model = common_key;
      else if (load_next) model = next_key;
      @(posedge clk); #1; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
