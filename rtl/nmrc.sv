// nmrc - modular reduction cell.
//
// Combinational. The multiplicand travels between processing elements as an
// (M+1)-bit word u of degree at most M: a value times x whose top bit has not
// yet been folded back into the field. The cell folds it back, r = u mod F
// (add F_LOW when bit M is set), and forms the next power, u_next = r * x, by a
// one-place shift that is again left unreduced. Leaving the reduction to the
// next cell keeps each cell to one XOR level plus a wire shift.
//
// Ports: u (M+1 bits) in; r (M bits, reduced, feeds the AND cell of the same
// PE) and u_next (M+1 bits, to the next PE) out. No clock. Bit 0 of u_next
// is always zero (a product with x has no constant term); it is kept so the
// word keeps its (M+1)-bit width.
//
// The (M+1)-bit input and output widths follow the processing element drawings
// of the filter; the split into "reduce, then shift" is this design's choice.
module nmrc #(
  parameter int unsigned    M     = gf_pkg::M,
  parameter logic [M-1:0]   F_LOW = gf_pkg::F_LOW
) (
  input  logic [M:0]   u,
  output logic [M-1:0] r,
  output logic [M:0]   u_next
);

  always_comb begin
    r      = u[M-1:0] ^ ({M{u[M]}} & F_LOW);
    u_next = {r, 1'b0};
  end

endmodule
