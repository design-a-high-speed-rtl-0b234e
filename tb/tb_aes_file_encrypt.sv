// tb_aes_file_encrypt: encrypts a 4 KiB data file (256 blocks of 128 bits,
// generated here from a fixed seed) with one 128-bit key, block after block,
// as a storage-encryption use would. Each start is issued in the cycle after
// the previous done, so blocks follow each other every 24 cycles (23 cycles of
// encryption plus the load cycle); about one block in eight sees a late STEPC
// input and must take one cycle more. Every cipher block is compared with the
// reference model, and the spacing of done pulses is checked.
module tb_aes_file_encrypt;
  import aes_ref_pkg::*;
  localparam int BLOCKS = 256;
  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] plain_text = '0, common_key = '0, cipher_text;
  logic busy, done, timing_error;
  logic [15:0] reexec_count;
  logic [127:0] file_pt [BLOCKS];
  logic [127:0] forced;
  int checks = 0, failures = 0, n_late = 0;

  aes_stepc_top dut (.clk, .clk_del, .rst_n, .start, .plain_text, .common_key,
                     .busy, .done, .cipher_text, .timing_error, .reexec_count);

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (BLOCKS * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key;
    int cycles, total_cycles, n_re;
    void'($urandom(32'd2024));
    for (int i = 0; i < BLOCKS; i++) file_pt[i] = rand128();
    key = rand128();
    total_cycles = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < BLOCKS; i++) begin
      logic late;
      late = ($urandom_range(7) == 0);
      n_re = 0;
      @(negedge clk);
      plain_text = file_pt[i]; common_key = key; start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      cycles = 1;
      while (!done) begin
        @(negedge clk);
        if (late && dut.cap_en && dut.round == 4'd5) begin
          logic [127:0] sv;
          sv = dut.sr_out;
          forced = sv ^ 128'h1;
          force dut.u_stepc_state.d = forced;
          @(posedge clk); cycles++;
          #1 force dut.u_stepc_state.d = sv;
          #3 release dut.u_stepc_state.d;
          n_re = 1;
          n_late++;
        end else begin
          @(posedge clk); cycles++;
          #1;
        end
      end
      chk(cipher_text == ref_encrypt(file_pt[i], key), "cipher block");
      chk(cycles == 23 + n_re, "block latency");
      total_cycles += cycles + 1;   // plus the cycle in which the next start is raised
    end
    chk(n_late > 0, "late arrivals occurred");
    chk(total_cycles == 24 * BLOCKS + n_late, "one block every 24 cycles plus one per re-execution");
    chk(reexec_count == 16'(n_late), "re-execution count");
    $display("file of %0d blocks: %0d cycles, %0d re-executed rounds, %0d cycles per block without errors",
             BLOCKS, total_cycles, n_late, 24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
