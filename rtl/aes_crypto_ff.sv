// aes_crypto_ff: the 128-bit state register ("Crypto FF") with its input
// selector.
//
// On a rising clk edge it loads plain_text when load_pt is high (start of an
// encryption), otherwise round_out when load_rk is high (end of a round), and
// otherwise holds. state_q is the register output. Asynchronous active-low
// reset clears it. The register and its selector are the block diagram's; the
// two enables and the priority of load_pt are this design's choice.
module aes_crypto_ff
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load_pt,
  input  logic   load_rk,
  input  block_t plain_text,
  input  block_t round_out,
  output block_t state_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state_q <= '0;
    else if (load_pt) state_q <= plain_text;
    else if (load_rk) state_q <= round_out;
  end
endmodule
