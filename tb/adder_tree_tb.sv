// Self-checking test of adder_tree: random words on all four inputs every
// clock; the output must equal p1 ^ p2 ^ p3 ^ p4 exactly two clocks later,
// with the valid flag following the same two-cycle delay.
module adder_tree_tb;
  localparam int M = gf_pkg::M;
  localparam int LAT = 2;

  logic clk = 0, rst = 1;
  logic [M-1:0] p1 = '0, p2 = '0, p3 = '0, p4 = '0, y;
  logic v1 = 0, v2 = 0, v3 = 0, v4 = 0, vy;
  int checks = 0, failures = 0;
  logic [M-1:0] exp_q [$];
  logic exp_v [$];

  adder_tree dut (.clk, .rst, .p1, .v1, .p2, .v2, .p3, .v3, .p4, .v4, .y, .vy);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < LAT; i++) begin exp_q.push_back('0); exp_v.push_back(1'b0); end
    for (int n = 0; n < 600; n++) begin
      p1 = M'($urandom); p2 = M'($urandom); p3 = M'($urandom); p4 = M'($urandom);
      v1 = 1'($urandom); v2 = v1; v3 = v1; v4 = v1;
      exp_q.push_back(p1 ^ p2 ^ p3 ^ p4);
      exp_v.push_back(v1);
      @(posedge clk); #1;
      void'(exp_q.pop_front()); void'(exp_v.pop_front());
      // after this edge the output holds the sum of the inputs LAT edges ago
      checks++;
      if (y != exp_q[0] || vy != exp_v[0]) begin
        failures++;
        $display("FAIL n=%0d y=%h exp=%h", n, y, exp_q[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
