// razor_ff: one-bit Razor flip-flop for timing-error detection.
//
// A main flip-flop samples d on the rising edge of clk. A shadow register
// samples the same d later, on the rising edge of clk_del, a copy of clk
// delayed by less than half a period. If d arrived late (after the clk edge but
// before the clk_del edge) the two disagree and err, their XOR, goes high. On
// the next clk edge the main flip-flop is reloaded from the shadow value
// through the mux in front of it, so the late but correct value replaces the
// wrong one one cycle later.
//
// Timing: capture with en high at clk edge E; the shadow captures at E + delay
// (it uses en delayed by one clk cycle, so it only samples in the cycle that
// follows a main capture); err is valid from E + delay until the next clk edge
// and is meant to be sampled there. Between E and E + delay err may show the
// comparison with the previous shadow value and must not be used.
//
// Main flip-flop, shadow, XOR comparator and restore mux follow the Razor
// flip-flop structure; making the shadow edge-triggered (rather than a level
// latch) and the capture enable are this design's choices.
module razor_ff (
  input  logic clk,
  input  logic clk_del,
  input  logic rst_n,
  input  logic en,
  input  logic d,
  output logic q,
  output logic err
);
  logic shadow_q;
  logic en_d;     // en of the previous clk cycle: the shadow's capture enable

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= 1'b0;
      en_d <= 1'b0;
    end else begin
      en_d <= en;
      if (err)     q <= shadow_q;   // restore mux: take the late-correct value
      else if (en) q <= d;
    end
  end

  always_ff @(posedge clk_del or negedge rst_n) begin
    if (!rst_n)    shadow_q <= 1'b0;
    else if (en_d) shadow_q <= d;
  end

  assign err = q ^ shadow_q;
endmodule
