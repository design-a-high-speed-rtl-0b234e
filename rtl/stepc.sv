// stepc: timing-error prediction register on an inter-module connection.
//
// WIDTH razor_ff cells register the connection d -> q. Each cell compares its
// main flip-flop with its delayed-clock shadow; err is high when any bit
// differs, i.e. when some bit of d settled after the clk edge that captured
// it. Each cell restores itself from its shadow at the next clk edge; the
// controller uses err to hold back the result computed from the wrong value
// and to repeat that step. Timing as razor_ff: err is valid from the clk_del
// edge to the next clk edge.
//
// The core places one of these between Sub Bytes/Shift Rows and Mix Columns
// (128 bits) and one between the key path's Sub Bytes and the second key-
// expansion block (32 bits). WIDTH has no default in the source material;
// 128 is this design's choice.
module stepc #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             clk_del,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             err
);
  logic [WIDTH-1:0] err_bit;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    razor_ff u_razor (
      .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .en(en),
      .d(d[i]), .q(q[i]), .err(err_bit[i])
    );
  end

  assign err = |err_bit;
endmodule
