// aes_ctrl: round controller of the AES-128 core with timing-error recovery.
//
// Each round takes two clk cycles when no timing error occurs:
//   CAPTURE  the STEPC registers capture Sub Bytes/Shift Rows of the state and
//            Sub Bytes of the rotated key word (cap_en high);
//   EXECUTE  Mix Columns, Add Round Key and the second key-expansion block work
//            from the STEPC outputs; at the closing clk edge the result and the
//            next round key are stored (commit high).
// If the STEPCs flag a late arrival (err high at the closing edge of EXECUTE),
// the result is not stored, the STEPCs reload their shadow values, and EXECUTE
// runs again: the round is re-executed with one extra cycle and reexec_count
// is incremented.
//
// A start pulse in IDLE loads the plain text and key (load_in) and begins round
// 0; round NR ends with done high for one cycle. Rounds 0 and NR use ark_sel
// ARK_INITIAL and ARK_FINAL. Without errors start-to-done takes
// 1 + 2*(NR+1) = 23 cycles at NR = 10. start is ignored while busy.
// The re-execution on error follows the source material; the two-cycle round,
// the state encoding and start/done handshake are this design's choice.
module aes_ctrl
  import aes_pkg::*;
#(
  parameter int unsigned NR = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        err,
  output logic        load_in,
  output logic        cap_en,
  output logic        commit,
  output ark_sel_e    ark_sel,
  output logic [3:0]  round,
  output logic        busy,
  output logic        done,
  output logic [15:0] reexec_count
);
  typedef enum logic [1:0] {S_IDLE, S_CAPTURE, S_EXECUTE} state_e;
  state_e state;

  always_comb begin
    load_in = (state == S_IDLE) && start;
    cap_en  = (state == S_CAPTURE);
    commit  = (state == S_EXECUTE) && !err;
    busy    = (state != S_IDLE);
    if (round == 4'd0)          ark_sel = ARK_INITIAL;
    else if (round == 4'(NR))   ark_sel = ARK_FINAL;
    else                        ark_sel = ARK_MIDDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      round        <= '0;
      done         <= 1'b0;
      reexec_count <= '0;
    end else begin
      // The round index never passes NR and nothing is stored while an error is flagged.
      a_round_range: assert (round <= 4'(NR));
      a_no_commit_on_err: assert (!(commit && err));
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CAPTURE;
          round <= '0;
        end
        S_CAPTURE: state <= S_EXECUTE;
        S_EXECUTE: begin
          if (err) begin
            reexec_count <= reexec_count + 16'd1;
          end else if (round == 4'(NR)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            round <= round + 4'd1;
            state <= S_CAPTURE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
