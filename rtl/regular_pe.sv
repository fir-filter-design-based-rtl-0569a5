// regular_pe - regular processing element of a systolic multiplier array.
//
// One PE handles one coefficient bit h of a GF(2^M) product. Its modular
// reduction cell (nmrc) turns the incoming (M+1)-bit multiplicand word into
// the reduced multiplicand r = x * x^t mod F; an AND cell of M gates forms
// the bit product r & {M{h}}; an XOR cell of M gates adds it to the incoming
// partial sum. The reduced multiplicand is passed on shifted by one place for
// the next coefficient bit. All outputs are registered: one PE is one
// pipeline stage, so a new sample can enter every cycle.
//
// Ports: u_in/u_out (M+1) multiplicand word, s_in/s_out (M) partial sum,
// v_in/v_out sample-valid flag, h the coefficient bit (held static).
// Bit 0 of u_out is always zero, as a multiple of x.
// Timing: outputs appear one clock after the inputs. rst is synchronous and
// active high and clears every register.
//
// The AND cell, XOR cell and NMRC and their widths follow the PE description;
// the valid flag and the synchronous reset are this design's own additions.
module regular_pe #(
  parameter int unsigned    M     = gf_pkg::M,
  parameter logic [M-1:0]   F_LOW = gf_pkg::F_LOW
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         h,
  input  logic [M:0]   u_in,
  input  logic [M-1:0] s_in,
  input  logic         v_in,
  output logic [M:0]   u_out,
  output logic [M-1:0] s_out,
  output logic         v_out
);

  logic [M-1:0] r;       // reduced multiplicand for this bit
  logic [M:0]   u_next;  // next power, unreduced
  logic [M-1:0] bit_pp;  // AND cell output

  nmrc #(.M(M), .F_LOW(F_LOW)) u_nmrc (
    .u      (u_in),
    .r      (r),
    .u_next (u_next)
  );

  assign bit_pp = r & {M{h}};

  always_ff @(posedge clk) begin
    if (rst) begin
      u_out <= '0;
      s_out <= '0;
      v_out <= 1'b0;
    end else begin
      u_out <= u_next;
      s_out <= s_in ^ bit_pp;
      v_out <= v_in;
    end
  end

endmodule
