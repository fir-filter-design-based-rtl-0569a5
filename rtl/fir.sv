// fir - four-tap FIR filter over GF(2^M) built from systolic multiplier arrays.
//
// y = a*h1 + b*h2 + c*h3 + d*h4, with every product and sum taken in the
// binary field GF(2^M) (AND for bit products, XOR for bit sums, reduction by
// the field polynomial). Four systolic arrays (gf_array) form the four
// products in parallel; a pipelined adder tree of three addition cells sums
// them. Driving a, b, c, d with x[n], x[n-1], x[n-2], x[n-3] makes y the
// convolution of the sample stream with the coefficients h1..h4.
//
// The first array has PE-1 and NPE_FIRST regular PEs; arrays 2..4 have PE-1,
// NPE_OTHER regular PEs and NPE_FIRST - NPE_OTHER delay cells, so all four
// products reach the adder tree together, 1 + NPE_FIRST clocks (five at the
// defaults) after the samples are taken. The tree adds two more, so y follows
// its inputs by 3 + NPE_FIRST clocks (seven). A new set of samples can be
// taken every clock; in_valid / y_valid mark which cycles carry data.
//
// Ports: clk; rst (synchronous, active high); a, b, c, d (M) and in_valid;
// h1 (NPE_FIRST bits) and h2..h4 (NPE_OTHER bits), coefficients held steady
// while samples are in flight; y (M) and y_valid; sfg_a, sfg_b, sfg_valid
// in and sfg_p, sfg_p_valid out for the multiplier grid.
//
// Beside the filter, and with ports of its own, sits sfg_mult: the
// bit-level 8 x 9 systolic multiplier grid cut into 3 x 3 blocks, with a
// latency of 2N - 1 = 5 clocks. The filter's arrays and the grid are two
// separately described forms of the multiplier that do not share signals,
// so neither drives the other.
//
// The four arrays, their PE and delay cell counts, the 9-bit data ports and
// the two-level adder tree follow the filter's description. The coefficient
// ports, the valid flags and the field polynomial are this design's choices.
module fir #(
  parameter int unsigned    M         = gf_pkg::M,
  parameter logic [M-1:0]   F_LOW     = gf_pkg::F_LOW,
  parameter int unsigned    NPE_FIRST = gf_pkg::NPE_FIRST,
  parameter int unsigned    NPE_OTHER = gf_pkg::NPE_OTHER,
  parameter int unsigned    SFG_ROWS  = 8,
  parameter int unsigned    SFG_COLS  = 9,
  parameter int unsigned    SFG_L     = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [M-1:0]         a,
  input  logic [M-1:0]         b,
  input  logic [M-1:0]         c,
  input  logic [M-1:0]         d,
  input  logic                 in_valid,
  input  logic [NPE_FIRST-1:0] h1,
  input  logic [NPE_OTHER-1:0] h2,
  input  logic [NPE_OTHER-1:0] h3,
  input  logic [NPE_OTHER-1:0] h4,
  output logic [M-1:0]         y,
  output logic                 y_valid,
  // bit-level multiplier grid
  input  logic [SFG_ROWS-1:0]  sfg_a,
  input  logic [SFG_COLS-1:0]  sfg_b,
  input  logic                 sfg_valid,
  output logic [SFG_COLS-1:0]  sfg_p,
  output logic                 sfg_p_valid
);

  localparam int unsigned NDLY = NPE_FIRST - NPE_OTHER;

  logic [M-1:0] p1, p2, p3, p4;
  logic         v1, v2, v3, v4;

  gf_array #(.M(M), .F_LOW(F_LOW), .NPE(NPE_FIRST), .NDLY(0)) u_array1 (
    .clk, .rst, .x(a), .v_in(in_valid), .h(h1), .p(p1), .v_out(v1)
  );
  gf_array #(.M(M), .F_LOW(F_LOW), .NPE(NPE_OTHER), .NDLY(NDLY)) u_array2 (
    .clk, .rst, .x(b), .v_in(in_valid), .h(h2), .p(p2), .v_out(v2)
  );
  gf_array #(.M(M), .F_LOW(F_LOW), .NPE(NPE_OTHER), .NDLY(NDLY)) u_array3 (
    .clk, .rst, .x(c), .v_in(in_valid), .h(h3), .p(p3), .v_out(v3)
  );
  gf_array #(.M(M), .F_LOW(F_LOW), .NPE(NPE_OTHER), .NDLY(NDLY)) u_array4 (
    .clk, .rst, .x(d), .v_in(in_valid), .h(h4), .p(p4), .v_out(v4)
  );

  adder_tree #(.M(M)) u_tree (
    .clk, .rst,
    .p1, .v1, .p2, .v2, .p3, .v3, .p4, .v4,
    .y, .vy(y_valid)
  );

  sfg_mult #(.ROWS(SFG_ROWS), .COLS(SFG_COLS), .L(SFG_L)) u_sfg (
    .clk, .rst, .a(sfg_a), .b(sfg_b), .v_in(sfg_valid), .p(sfg_p), .v_out(sfg_p_valid)
  );

  // The arrays are sized so that their products arrive in the same cycle.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (v1 == v2 && v1 == v3 && v1 == v4)
        else $error("array outputs out of step");
    end
  end

  initial begin
    assert (NPE_FIRST >= NPE_OTHER) else $error("NPE_FIRST must not be below NPE_OTHER");
  end

endmodule
