// adder_cell - pipelined addition cell (AC) of the output adder tree.
//
// Adds two M-bit GF(2^M) values (a bitwise XOR, since field addition has no
// carries) and registers the sum. The valid flags of the two operands are
// combined with AND; in this filter both always arrive together.
//
// Ports: a, b (M) with va, vb in; y (M) with vy out. One clock of latency.
// rst is synchronous and active high.
module adder_cell #(
  parameter int unsigned M = gf_pkg::M
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] a,
  input  logic         va,
  input  logic [M-1:0] b,
  input  logic         vb,
  output logic [M-1:0] y,
  output logic         vy
);

  always_ff @(posedge clk) begin
    if (rst) begin
      y  <= '0;
      vy <= 1'b0;
    end else begin
      y  <= a ^ b;
      vy <= va & vb;
    end
  end

endmodule
