// tb_aes_ctrl: drives start and err into the round controller and checks its
// outputs cycle by cycle against an expected sequence: load on start, then for
// each round NR+1 a capture cycle followed by execute cycles (one more per err),
// commit only without err, the Add Round Key select per round, done after the
// last round, and the 23-cycle latency when no error occurs.
module tb_aes_ctrl;
  import aes_pkg::*;
  localparam int NR = 10;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, err = 1'b0;
  logic load_in, cap_en, commit, busy, done;
  ark_sel_e ark_sel;
  logic [3:0] round;
  logic [15:0] reexec_count;
  int checks = 0, failures = 0, expected_reexec = 0;

  aes_ctrl #(.NR(NR)) dut (.clk, .rst_n, .start, .err, .load_in, .cap_en, .commit,
                           .ark_sel, .round, .busy, .done, .reexec_count);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One encryption; err_prob in percent for each execute cycle. Returns cycles start->done.
  task automatic run(int err_prob, output int cycles);
    ark_sel_e exp_sel;
    @(negedge clk);
    start = 1'b1; #1;
    chk(load_in && !busy, "load on start");
    @(posedge clk); #1 start = 1'b0;
    cycles = 1;
    for (int r = 0; r <= NR; r++) begin
      exp_sel = (r == 0) ? ARK_INITIAL : (r == NR) ? ARK_FINAL : ARK_MIDDLE;
      @(negedge clk);
      chk(cap_en && !commit && busy && round == 4'(r) && ark_sel == exp_sel, "capture cycle");
      @(posedge clk); cycles++;
      forever begin
        @(negedge clk);
        err = ($urandom_range(99) < err_prob);
        #1;
        chk(!cap_en && commit == !err && round == 4'(r) && ark_sel == exp_sel, "execute cycle");
        @(posedge clk); cycles++;
        if (!err) break;
        expected_reexec++;
      end
      err = 1'b0;
    end
    #1 chk(done && !busy, "done after last round");
    @(posedge clk); #1 chk(!done, "done is one cycle");
    chk(reexec_count == 16'(expected_reexec), "re-execution count");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(0, cycles);
    chk(cycles == 1 + 2*(NR+1), "latency without errors is 23 cycles");
    $display("latency without errors: %0d cycles", cycles);
    for (int i = 0; i < 20; i++) begin
      int prev_reexec;
      prev_reexec = expected_reexec;
      run(30, cycles);
      chk(cycles == 1 + 2*(NR+1) + (expected_reexec - prev_reexec), "latency with re-executions");
    end
    chk(expected_reexec > 0, "errors were injected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
