// tb_stepc: a 16-bit STEPC with clk (period 10) and clk_del (clk + 3). Each
// capture either arrives on time or has a random subset of bits settle 1 time
// unit after the clk edge. Checks q, the combined err during the following
// cycle, and that q holds the correct value one cycle later.
module tb_stepc;
  localparam int W = 16;
  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d = '0, q;
  logic err;
  int checks = 0, failures = 0, n_late = 0;

  stepc #(.WIDTH(W)) dut (.clk, .clk_del, .rst_n, .en, .d, .q, .err);

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  task automatic expect_state(logic [W-1:0] eq, logic eerr, string what);
    checks++;
    if (q !== eq || err !== eerr) begin
      failures++;
      $display("FAIL %s at %0t: q=%04h err=%0b expected q=%04h err=%0b", what, $time, q, err, eq, eerr);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, late_mask;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      v = W'($urandom);
      late_mask = ($urandom_range(1) == 1) ? W'(1) << $urandom_range(W-1) : '0;
      if ($urandom_range(3) == 0) late_mask = W'($urandom);
      @(negedge clk);
      en = 1'b1; d = v ^ late_mask;
      @(posedge clk); #1 d = v; en = 1'b0;
      #4 expect_state(v ^ late_mask, late_mask != '0, "after capture");
      @(posedge clk);
      #5 expect_state(v, 1'b0, "next cycle");
      if (late_mask != '0) n_late++;
    end
    checks++;
    if (n_late == 0) begin failures++; $display("FAIL no late arrival was injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
