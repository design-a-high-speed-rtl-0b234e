// aes_key_ff: the 128-bit round-key register ("Key Expansion FF") with its
// input selector.
//
// On a rising clk edge it loads common_key when load_key is high (start of an
// encryption), otherwise next_key when load_next is high (end of a round), and
// otherwise holds. key_q is the round key used by Add Round Key in the current
// round and the input of the key-expansion step. Asynchronous active-low reset
// clears it. The enables and their priority are this design's choice.
module aes_key_ff
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load_key,
  input  logic   load_next,
  input  block_t common_key,
  input  block_t next_key,
  output block_t key_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         key_q <= '0;
    else if (load_key)  key_q <= common_key;
    else if (load_next) key_q <= next_key;
  end
endmodule
