// adder_tree - pipelined adder tree that sums the four array outputs.
//
// Three addition cells in two levels: the first level adds the outputs of
// arrays 1+2 and 3+4, the second level adds the two sums. The result is
// y = p1 + p2 + p3 + p4 over GF(2^M), two clocks after the inputs.
//
// Ports: p1..p4 (M) with their valid flags in; y (M) and vy out.
// rst is synchronous and active high.
//
// The three-cell, two-cycle tree is the low-latency option named for this
// filter; the pairing of the inputs is this design's choice.
module adder_tree #(
  parameter int unsigned M = gf_pkg::M
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] p1,
  input  logic         v1,
  input  logic [M-1:0] p2,
  input  logic         v2,
  input  logic [M-1:0] p3,
  input  logic         v3,
  input  logic [M-1:0] p4,
  input  logic         v4,
  output logic [M-1:0] y,
  output logic         vy
);

  logic [M-1:0] s12, s34;
  logic         v12, v34;

  adder_cell #(.M(M)) u_ac1 (.clk, .rst, .a(p1), .va(v1), .b(p2), .vb(v2), .y(s12), .vy(v12));
  adder_cell #(.M(M)) u_ac2 (.clk, .rst, .a(p3), .va(v3), .b(p4), .vb(v4), .y(s34), .vy(v34));
  adder_cell #(.M(M)) u_ac3 (.clk, .rst, .a(s12), .va(v12), .b(s34), .vb(v34), .y(y), .vy(vy));

endmodule
