// delay_line - N-stage shift register for a W-bit word.
//
// q is d delayed by N clocks; with N = 0 it is a plain wire. Used for the
// flip-flops on cut lines, input skewing and output alignment of sfg_mult.
// rst is synchronous, active high, and clears every stage.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [N-1:0][W-1:0] stage;
    always_ff @(posedge clk) begin
      if (rst) begin
        stage <= '0;
      end else begin
        stage[0] <= d;
        for (int k = 1; k < N; k++) stage[k] <= stage[k-1];
      end
    end
    assign q = stage[N-1];
  end

endmodule
