// aes_addroundkey: the round-input selector and the Add Round Key step.
//
// sel chooses which value enters the key addition:
//   ARK_INITIAL  state_ff, the Crypto FF content (round 0, plain text ^ key)
//   ARK_MIDDLE   state_mc, the Mix Columns output (rounds 1..9)
//   ARK_FINAL    state_sr, the Sub Bytes/Shift Rows output (round 10, where
//                AES skips Mix Columns)
// The chosen value is XORed with round_key. Combinational. The three-input
// selector is drawn in the core's block diagram; its encoding is this design's.
module aes_addroundkey
  import aes_pkg::*;
(
  input  ark_sel_e sel,
  input  block_t   state_ff,
  input  block_t   state_sr,
  input  block_t   state_mc,
  input  block_t   round_key,
  output block_t   state_out
);
  block_t chosen;

  always_comb begin
    unique case (sel)
      ARK_INITIAL: chosen = state_ff;
      ARK_FINAL:   chosen = state_sr;
      default:     chosen = state_mc;
    endcase
    state_out = chosen ^ round_key;
  end
endmodule
