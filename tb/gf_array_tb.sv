// Self-checking test of gf_array, in two shapes side by side: the long
// array (four regular PEs, no delay cell) and a short one (three regular
// PEs plus one delay cell), as used in the filter. A random stream of samples
// with random gaps goes in; every product is checked against the reference
// GF(2^M) multiplication, and each valid output must leave exactly five
// clocks after its sample entered. The coefficients are changed between
// bursts, after the pipeline has drained.
module gf_array_tb;
  import gf_ref_pkg::*;

  localparam int M = gf_pkg::M;
  localparam int unsigned F = int'(gf_pkg::F_LOW);
  localparam int LAT = 5;

  logic clk = 0, rst = 1;
  logic [M-1:0] x = '0;
  logic v_in = 0;
  logic [3:0] hl = '0;
  logic [2:0] hs = '0;
  logic [M-1:0] pl, ps;
  logic vl, vs;
  int checks = 0, failures = 0, outputs = 0;
  int cyc = 0;

  // sample, coefficients and entry cycle of every valid input, in order
  int unsigned q_x [$];
  int unsigned q_hl [$];
  int unsigned q_hs [$];
  int q_t [$];
  int unsigned xx, a, b;
  int t;

  gf_array #(.NPE(4), .NDLY(0)) dut_long (.clk, .rst, .x, .v_in, .h(hl), .p(pl), .v_out(vl));
  gf_array #(.NPE(3), .NDLY(1)) dut_short (.clk, .rst, .x, .v_in, .h(hs), .p(ps), .v_out(vs));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && vl != vs) begin
      failures++;
      $display("FAIL arrays out of step at cycle %0d", cyc);
    end
    if (!rst && vl) begin
      outputs++;
      checks++;
      if (q_x.size() == 0) begin
        failures++;
        $display("FAIL output without input at cycle %0d", cyc);
      end else begin
        xx = q_x.pop_front();
        a = q_hl.pop_front();
        b = q_hs.pop_front();
        t = q_t.pop_front();
        if (int'(pl) != gf_mul(xx, a, M, F) || int'(ps) != gf_mul(xx, b, M, F)
            || cyc - t != LAT) begin
          failures++;
          $display("FAIL x=%h pl=%h ps=%h exp %h %h lat=%0d", xx, pl, ps,
                   gf_mul(xx, a, M, F), gf_mul(xx, b, M, F), cyc - t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int burst = 0; burst < 20; burst++) begin
      hl = 4'($urandom); hs = 3'($urandom);
      if (burst == 0) begin hl = '1; hs = '1; end
      for (int n = 0; n < 50; n++) begin
        x = M'($urandom);
        v_in = ($urandom % 4) != 0;
        if (v_in) begin
          q_x.push_back(int'(x)); q_hl.push_back(int'(hl)); q_hs.push_back(int'(hs));
          q_t.push_back(cyc);
        end
        @(posedge clk); #1;
      end
      v_in = 0;
      repeat (LAT + 2) @(posedge clk);
      #1;
    end
    checks++;
    if (q_x.size() != 0 || outputs < 500) begin
      failures++;
      $display("FAIL %0d inputs never came out, %0d outputs", q_x.size(), outputs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
