// aes_stepc_top: AES-128 encryption core with timing-error prediction.
//
// Data loop: Crypto FF -> Sub Bytes/Shift Rows -> STEPC (128 bits) ->
// Mix Columns -> round-input selector -> Add Round Key -> Crypto FF.
// Key loop: Key Expansion FF -> Key Expansion first block (RotWord) ->
// Sub Bytes (32 bits) -> STEPC (32 bits) -> Key Expansion second block ->
// Key Expansion FF. The round key in the Key Expansion FF also feeds Add Round
// Key. Both STEPCs are banks of Razor flip-flops: a main flip-flop on clk and a
// shadow on the delayed clock clk_del. A value that settles after the clk edge
// but before the clk_del edge is flagged (timing_error), the round result built
// from it is discarded, and the round's second cycle is run again from the
// corrected STEPC contents.
//
// Interface: pulse start for one cycle with plain_text and common_key valid;
// busy goes high; done pulses for one cycle when cipher_text (the Crypto FF)
// holds the result, which stays until the next start. Latency start-to-done is
// 23 clk cycles without timing errors, plus one cycle per re-executed round.
// clk_del must have the clk period and rise less than half a period after clk.
//
// The block structure, the STEPC positions and re-execution on error follow
// the source material; the two-cycle round, the handshake and reset are this
// design's choices.
module aes_stepc_top
  import aes_pkg::*;
#(
  parameter int unsigned NR = 10
) (
  input  logic        clk,
  input  logic        clk_del,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      plain_text,
  input  block_t      common_key,
  output logic        busy,
  output logic        done,
  output block_t      cipher_text,
  output logic        timing_error,
  output logic [15:0] reexec_count
);
  logic     load_in, cap_en, commit;
  ark_sel_e ark_sel;
  logic [3:0] round;

  block_t state_q, sr_out, sr_q, mc_out, ark_out;
  block_t key_q, key_fwd, next_key;
  word_t  rot_word, sub_word, sub_word_q;
  logic   err_state, err_key;

  assign timing_error = err_state | err_key;

  aes_ctrl #(.NR(NR)) u_ctrl (
    .clk, .rst_n, .start, .err(timing_error),
    .load_in, .cap_en, .commit, .ark_sel, .round,
    .busy, .done, .reexec_count
  );

  // ---------------- data loop ----------------
  aes_crypto_ff u_crypto_ff (
    .clk, .rst_n, .load_pt(load_in), .load_rk(commit),
    .plain_text, .round_out(ark_out), .state_q
  );

  aes_subbytes_shiftrows u_sbsr (.state_in(state_q), .state_out(sr_out));

  stepc #(.WIDTH(128)) u_stepc_state (
    .clk, .clk_del, .rst_n, .en(cap_en), .d(sr_out), .q(sr_q), .err(err_state)
  );

  aes_mixcolumns u_mix (.state_in(sr_q), .state_out(mc_out));

  aes_addroundkey u_ark (
    .sel(ark_sel), .state_ff(state_q), .state_sr(sr_q), .state_mc(mc_out),
    .round_key(key_q), .state_out(ark_out)
  );

  assign cipher_text = state_q;

  // ---------------- key loop ----------------
  aes_key_ff u_key_ff (
    .clk, .rst_n, .load_key(load_in), .load_next(commit && (round != 4'(NR))),
    .common_key, .next_key, .key_q
  );

  aes_keyexp_first u_kx1 (.key_in(key_q), .rot_word, .prefix_xor(key_fwd));

  aes_subword u_key_sub (.word_in(rot_word), .word_out(sub_word));

  stepc #(.WIDTH(32)) u_stepc_key (
    .clk, .clk_del, .rst_n, .en(cap_en), .d(sub_word), .q(sub_word_q), .err(err_key)
  );

  // Handshake rules: done is a one-cycle pulse that ends the busy period.
  a_done_not_busy: assert property (@(posedge clk) done |-> !busy);
  a_done_pulse:    assert property (@(posedge clk) done |=> !done);

  aes_keyexp_second u_kx2 (
    .prefix_xor(key_fwd), .sub_word(sub_word_q), .round(round + 4'd1), .key_out(next_key)
  );
endmodule
