// tb_aes_stepc_top: end-to-end test of the AES-128 core at its default size.
//
// clk has period 10 and clk_del follows it by 3. Encryptions are checked
// against the FIPS-197 vectors and the reference model, with the latency
// (23 cycles plus one per re-executed round) and the re-execution counter.
// Timing errors are produced by making a STEPC input arrive late: in a capture
// cycle the testbench overrides the Sub Bytes/Shift Rows output (or the key
// path's Sub Bytes output) with a corrupted value across the clk edge and lets
// the true value through 1 time unit after it, before the clk_del edge. The
// core must flag the error, discard the round result and still produce the
// right cipher text. A start pulse during a busy encryption must be ignored.
// Each mechanism is counted and must occur at least once.
module tb_aes_stepc_top;
  import aes_ref_pkg::*;
  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] plain_text = '0, common_key = '0, cipher_text;
  logic busy, done, timing_error;
  logic [15:0] reexec_count;
  int checks = 0, failures = 0;
  logic [127:0] forced_sr;    // corrupted values driven during a late arrival
  logic [31:0]  forced_sub;
  int n_state_err = 0, n_key_err = 0, n_ignored_start = 0, n_clean = 0, n_errored_runs = 0;

  aes_stepc_top dut (.clk, .clk_del, .rst_n, .start, .plain_text, .common_key,
                     .busy, .done, .cipher_text, .timing_error, .reexec_count);

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One encryption. inj_state/inj_key: bit r set = make that STEPC input late in round r.
  // ignore_at: cycle after start at which a second start is pulsed (0 = none).
  task automatic encrypt(logic [127:0] pt, logic [127:0] key, logic [10:0] inj_state,
                         logic [10:0] inj_key, int ignore_at, output logic [127:0] ct,
                         output int cycles);
    int round_idx, n_inj, cyc;
    logic [15:0] count0;
    count0 = reexec_count;
    n_inj = 0;
    @(negedge clk);
    plain_text = pt; common_key = key; start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    plain_text = rand128(); common_key = rand128();   // inputs are only read at start
    cyc = 1; round_idx = 0;
    while (!done) begin
      @(negedge clk);
      if (ignore_at != 0 && cyc == ignore_at) begin
        start = 1'b1; n_ignored_start++;
      end
      if (dut.cap_en) begin
        logic [127:0] sv;
        logic [31:0] kv;
        logic late_s, late_k;
        late_s = inj_state[round_idx];
        late_k = inj_key[round_idx];
        sv = dut.sr_out; kv = dut.sub_word;
        forced_sr = sv ^ (128'(1) << $urandom_range(127));
        forced_sub = kv ^ (32'(1) << $urandom_range(31));
        if (late_s) force dut.u_stepc_state.d = forced_sr;
        if (late_k) force dut.u_stepc_key.d = forced_sub;
        @(posedge clk); cyc++;
        #1;
        // the true value arrives, before the clk_del edge
        if (late_s) force dut.u_stepc_state.d = sv;
        if (late_k) force dut.u_stepc_key.d = kv;
        start = 1'b0;
        #3;  // after the clk_del edge
        release dut.u_stepc_state.d;
        release dut.u_stepc_key.d;
        chk(timing_error == (late_s || late_k), "timing error flagged for a late input");
        if (late_s) n_state_err++;
        if (late_k) n_key_err++;
        if (late_s || late_k) n_inj++;
        round_idx++;
      end else begin
        @(posedge clk); cyc++;
        #1 start = 1'b0;
      end
    end
    ct = cipher_text;
    cycles = cyc;
    chk(reexec_count == count0 + 16'(n_inj), "re-execution count");
    chk(cycles == 23 + n_inj, "latency 23 cycles plus one per re-execution");
    if (n_inj == 0) n_clean++; else n_errored_runs++;
    @(posedge clk); #1 chk(!done && !busy && cipher_text == ct, "done is one pulse, result held");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] ct, pt, key;
    int cycles;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // FIPS-197 appendix C.1 and appendix B, no errors
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
            '0, '0, 0, ct, cycles);
    chk(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 cipher text");
    $display("C.1: %032h in %0d cycles", ct, cycles);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            '0, '0, 0, ct, cycles);
    chk(ct == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 appendix B cipher text");

    // Appendix B again with a late arrival in every round of both paths
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            '1, '1, 0, ct, cycles);
    chk(ct == 128'h3925841d02dc09fbdc118597196a0b32, "appendix B with errors in every round");
    $display("appendix B with 11 re-executions: %0d cycles", cycles);

    // Random blocks and keys, random late arrivals, some ignored start pulses
    for (int i = 0; i < 40; i++) begin
      logic [10:0] is, ik;
      pt = rand128(); key = rand128();
      is = (i % 3 == 0) ? '0 : 11'($urandom) & 11'($urandom);
      ik = (i % 3 == 0) ? '0 : 11'($urandom) & 11'($urandom);
      encrypt(pt, key, is, ik, (i % 4 == 1) ? int'($urandom_range(2, 20)) : 0, ct, cycles);
      chk(ct == ref_encrypt(pt, key), "random cipher text matches the reference");
    end

    $display("mechanisms: state-path errors %0d, key-path errors %0d, ignored starts %0d, clean runs %0d, runs with re-execution %0d",
             n_state_err, n_key_err, n_ignored_start, n_clean, n_errored_runs);
    chk(n_state_err > 0, "state-path timing error occurred");
    chk(n_key_err > 0, "key-path timing error occurred");
    chk(n_ignored_start > 0, "start while busy occurred");
    chk(n_clean > 0 && n_errored_runs > 0, "clean and re-executed runs occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
