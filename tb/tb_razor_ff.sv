// tb_razor_ff: exercises one Razor flip-flop with clk (period 10) and clk_del
// (clk delayed by 3). Three kinds of cycle are mixed at random:
//   on time  d settles before the clk edge: q takes it, err stays low;
//   late     d settles 1 time unit after the clk edge: q holds the stale value,
//            err rises after the clk_del edge, and at the next clk edge q is
//            restored to the late value and err falls;
//   idle     en low and d changes after the edge: q holds, no error.
module tb_razor_ff;
  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0, en = 1'b0, d = 1'b0;
  logic q, err;
  int checks = 0, failures = 0;
  int n_late = 0, n_ontime = 0;

  razor_ff dut (.clk, .clk_del, .rst_n, .en, .d, .q, .err);

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  task automatic expect_state(logic eq, logic eerr, string what);
    checks++;
    if (q !== eq || err !== eerr) begin
      failures++;
      $display("FAIL %s at %0t: q=%0b err=%0b expected q=%0b err=%0b", what, $time, q, err, eq, eerr);
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
    logic qm, v;
    int kind;
    qm = 1'b0;
    repeat (2) @(posedge clk);
    #1 expect_state(1'b0, 1'b0, "reset");
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      kind = $urandom_range(2);
      v = 1'($urandom);
      @(negedge clk);
      if (kind == 0) begin            // on time
        en = 1'b1; d = v;
        @(posedge clk); #1 en = 1'b0;
        qm = v;
        #4 expect_state(qm, 1'b0, "on-time capture");
        n_ontime++;
      end else if (kind == 1) begin   // late arrival
        en = 1'b1; d = ~v;
        @(posedge clk); #1 d = v; en = 1'b0;
        #4 expect_state(~v, 1'b1, "late arrival flagged");
        @(posedge clk); #1;
        qm = v;
        #4 expect_state(qm, 1'b0, "restored from shadow");
        n_late++;
      end else begin                  // idle with a change after the edge
        en = 1'b0;
        @(posedge clk); #1 d = v;
        #4 expect_state(qm, 1'b0, "idle hold");
      end
    end
    checks++;
    if (n_late == 0 || n_ontime == 0) begin failures++; $display("FAIL scenario never ran"); end
    $display("late arrivals %0d, on-time captures %0d", n_late, n_ontime);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
