// Self-checking test of regular_pe: random multiplicand words, partial sums
// and coefficient bits every clock. One clock later the partial sum must be
// s_in + h * (u_in mod F) and the outgoing word (u_in mod F) * x, with the
// remainder taken by the reference long division. Also checks that reset
// clears the outputs and that words with the top bit set (a real reduction)
// and with it clear both occur.
module regular_pe_tb;
  import gf_ref_pkg::*;

  localparam int M = gf_pkg::M;
  localparam int unsigned F = int'(gf_pkg::F_LOW);

  logic clk = 0, rst = 1;
  logic h = 0, v_in = 0;
  logic [M:0] u_in = '0;
  logic [M-1:0] s_in = '0;
  logic [M:0] u_out;
  logic [M-1:0] s_out;
  logic v_out;
  int checks = 0, failures = 0, folds = 0, plain = 0;
  int unsigned red;
  logic [M-1:0] exp_s;
  logic [M:0] exp_u;
  logic exp_v;

  regular_pe dut (.clk, .rst, .h, .u_in, .s_in, .v_in, .u_out, .s_out, .v_out);

  always #5 clk = ~clk;

  initial begin
    u_in = '1; s_in = '1; h = 1; v_in = 1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (u_out != '0 || s_out != '0 || v_out) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      u_in = (M+1)'($urandom); s_in = M'($urandom); h = 1'($urandom); v_in = 1'($urandom);
      red = polymod(longint'(u_in), M, F);
      exp_s = s_in ^ (h ? M'(red) : '0);
      exp_u = (M+1)'(red) << 1;
      exp_v = v_in;
      if (u_in[M]) folds++; else plain++;
      @(posedge clk); #1;
      checks++;
      if (s_out != exp_s || u_out != exp_u || v_out != exp_v) begin
        failures++;
        $display("FAIL u_in=%b h=%b s_out=%b exp=%b u_out=%b exp=%b", u_in, h, s_out, exp_s, u_out, exp_u);
      end
    end
    checks++;
    if (folds == 0 || plain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
