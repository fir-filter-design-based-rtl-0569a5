// gf_array - one systolic array: multiplies a sample by a filter coefficient.
//
// Computes p = x * h over GF(2^M), where h = sum h[t] x^t has NPE bits.
// The array is a chain of cells, each one pipeline stage:
//   PE-1     takes the sample x into the array as the (M+1)-bit multiplicand
//            word {0, x}; the word is already reduced, so this stage only
//            registers it and starts the partial sum at zero.
//   PE-2 ... one regular_pe per coefficient bit, bit 0 first. PE t adds
//            (x * x^t mod F) & h[t] to the partial sum.
//   DELAY    NDLY delay cells that register the partial sum once more, so
//            that arrays with fewer coefficient bits line up in time with
//            the longest array.
// A new sample may enter every clock; the product leaves 1 + NPE + NDLY
// clocks later, flagged by v_out.
//
// Ports: x (M) and v_in in; h (NPE) coefficient bits, to be held steady
// while samples are in flight; p (M) and v_out out. rst is synchronous,
// active high.
//
// The PE-1 / regular PE / delay cell layout follows the array drawings of the
// filter (the first array with five PEs, the other three with four PEs and a
// delay cell). Reading each regular PE as one coefficient bit, and PE-1 as the
// input stage, is this design's interpretation.
module gf_array #(
  parameter int unsigned    M     = gf_pkg::M,
  parameter logic [M-1:0]   F_LOW = gf_pkg::F_LOW,
  parameter int unsigned    NPE   = gf_pkg::NPE_FIRST,
  parameter int unsigned    NDLY  = 0
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [M-1:0]   x,
  input  logic           v_in,
  input  logic [NPE-1:0] h,
  output logic [M-1:0]   p,
  output logic           v_out
);

  // Stage k holds the output of cell k: index 0 is PE-1.
  logic [M:0]   u [NPE+1];
  logic [M-1:0] s [NPE+1];
  logic         v [NPE+1];

  // PE-1: input stage.
  always_ff @(posedge clk) begin
    if (rst) begin
      u[0] <= '0;
      s[0] <= '0;
      v[0] <= 1'b0;
    end else begin
      u[0] <= {1'b0, x};
      s[0] <= '0;
      v[0] <= v_in;
    end
  end

  // Regular PEs, one per coefficient bit.
  for (genvar t = 0; t < NPE; t++) begin : g_pe
    regular_pe #(.M(M), .F_LOW(F_LOW)) u_pe (
      .clk,
      .rst,
      .h     (h[t]),
      .u_in  (u[t]),
      .s_in  (s[t]),
      .v_in  (v[t]),
      .u_out (u[t+1]),
      .s_out (s[t+1]),
      .v_out (v[t+1])
    );
  end

  // Delay cells on the partial sum and its valid flag.
  if (NDLY == 0) begin : g_nodly
    assign p     = s[NPE];
    assign v_out = v[NPE];
  end else begin : g_dly
    logic [NDLY-1:0][M-1:0] ds;
    logic [NDLY-1:0]        dv;
    always_ff @(posedge clk) begin
      if (rst) begin
        ds <= '0;
        dv <= '0;
      end else begin
        ds[0] <= s[NPE];
        dv[0] <= v[NPE];
        for (int k = 1; k < NDLY; k++) begin
          ds[k] <= ds[k-1];
          dv[k] <= dv[k-1];
        end
      end
    end
    assign p     = ds[NDLY-1];
    assign v_out = dv[NDLY-1];
  end

endmodule
