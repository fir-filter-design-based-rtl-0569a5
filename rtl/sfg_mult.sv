// sfg_mult - bit-level systolic multiplier array, partitioned into L x L blocks.
//
// A ROWS x COLS grid of basic cells. Cell (i,j) gets bit a[i] on a line that
// runs along row i, bit b[(j - i) mod COLS] on a line that runs down the
// diagonal, and a partial sum from the cell above (zero into row 0). It
// passes down  s_out = s_in ^ (a[i] & b[(j - i) mod COLS]),  so the bottom
// of column j delivers
//     p[j] = XOR over i of a[i] & b[(j - i) mod COLS],
// the product of a(x) and b(x) modulo x^COLS + 1 over GF(2).
//
// The grid is cut every L rows and every L columns into blocks of L x L
// cells, and a flip-flop sits on every signal line where it crosses a cut:
// row lines at column cuts, sum lines at row cuts, diagonal lines at either
// (two flip-flops where a diagonal passes a corner). Block (I,J) therefore
// works I + J clocks after the operands are taken; the inputs are skewed to
// match (row i's a bit by i/L clocks, each diagonal's b bit by the block
// index of the edge cell it enters at). The columns finish in a staircase;
// column block J is delayed NCB-1-J more clocks and a final register aligns
// all of p. Latency: NRB + NCB - 1 clocks, 2N - 1 = 5 for the default
// 8 x 9 grid with L = 3 (N = 3 blocks each way). A new operand pair can
// enter every clock; v_in / v_out mark valid cycles.
//
// Ports: a (ROWS), b (COLS), v_in in; p (COLS), v_out out. rst is
// synchronous, active high.
//
// The grid size, the cyclic b indexing, the output names p0..p8, the 3 x 3
// partition and the flip-flops on cut lines follow the signal flow graph of
// the multiplier. The cell function (AND then XOR) follows the description of
// the AND and XOR cells; input skewing, output alignment and the valid flag
// are this design's choices.
module sfg_mult #(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 9,
  parameter int unsigned L    = 3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [ROWS-1:0] a,
  input  logic [COLS-1:0] b,
  input  logic            v_in,
  output logic [COLS-1:0] p,
  output logic            v_out
);

  localparam int unsigned NRB = (ROWS + L - 1) / L;  // row blocks
  localparam int unsigned NCB = (COLS + L - 1) / L;  // column blocks
  localparam int unsigned LAT = NRB + NCB - 1;

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      localparam int unsigned I = i / L;
      localparam int unsigned J = j / L;

      // Lines entering this cell and the sum leaving it.
      logic a_l, b_l, s_i, s_o;

      // basic cell: AND then XOR
      assign s_o = s_i ^ (a_l & b_l);

      // row line: enters at column 0 skewed by I clocks, then one flip-flop
      // at each column cut
      if (j == 0) begin : g_a_in
        if (I == 0) begin : g_w
          assign a_l = a[i];
        end else begin : g_r
          delay_line #(.W(1), .N(I)) u_skew (.clk, .rst, .d(a[i]), .q(a_l));
        end
      end else if (j % L == 0) begin : g_a_cut
        delay_line #(.W(1), .N(1)) u_cut (.clk, .rst, .d(g_row[i].g_col[j-1].a_l), .q(a_l));
      end else begin : g_a_w
        assign a_l = g_row[i].g_col[j-1].a_l;
      end

      // sum line: zero into row 0, one flip-flop at each row cut
      if (i == 0) begin : g_s_top
        assign s_i = 1'b0;
      end else if (i % L == 0) begin : g_s_cut
        delay_line #(.W(1), .N(1)) u_cut (.clk, .rst, .d(g_row[i-1].g_col[j].s_o), .q(s_i));
      end else begin : g_s_w
        assign s_i = g_row[i-1].g_col[j].s_o;
      end

      // diagonal line: enters on the top edge (b[j]) or the left edge
      // (b[COLS - i]) skewed by the block index of its entry cell, then one
      // flip-flop per cut crossed between (i-1,j-1) and (i,j)
      if (i == 0 || j == 0) begin : g_b_in
        localparam int unsigned K    = (i == 0) ? j : (COLS - i) % COLS;
        localparam int unsigned SKEW = (i == 0) ? J : I;
        if (SKEW == 0) begin : g_w
          assign b_l = b[K];
        end else begin : g_r
          delay_line #(.W(1), .N(SKEW)) u_skew (.clk, .rst, .d(b[K]), .q(b_l));
        end
      end else begin : g_b_line
        localparam int unsigned CUTS = ((i % L == 0) ? 1 : 0) + ((j % L == 0) ? 1 : 0);
        if (CUTS == 0) begin : g_w
          assign b_l = g_row[i-1].g_col[j-1].b_l;
        end else begin : g_r
          delay_line #(.W(1), .N(CUTS)) u_cut (.clk, .rst, .d(g_row[i-1].g_col[j-1].b_l), .q(b_l));
        end
      end
    end
  end

  // Output alignment: column block J waits NCB-1-J clocks, then one common
  // output register.
  for (genvar j = 0; j < COLS; j++) begin : g_out
    localparam int unsigned J = j / L;
    delay_line #(.W(1), .N(NCB - J)) u_align (
      .clk, .rst, .d(g_row[ROWS-1].g_col[j].s_o), .q(p[j]));
  end

  delay_line #(.W(1), .N(LAT)) u_valid (.clk, .rst, .d(v_in), .q(v_out));

endmodule
