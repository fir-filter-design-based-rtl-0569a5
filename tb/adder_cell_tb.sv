// Self-checking test of adder_cell: random operands every clock, the sum
// (XOR) and the valid AND checked one clock later; reset clears the outputs.
module adder_cell_tb;
  localparam int M = gf_pkg::M;

  logic clk = 0, rst = 1;
  logic [M-1:0] a = '0, b = '0, y;
  logic va = 0, vb = 0, vy;
  int checks = 0, failures = 0;
  logic [M-1:0] exp_y;
  logic exp_v;

  adder_cell dut (.clk, .rst, .a, .va, .b, .vb, .y, .vy);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y != '0 || vy) failures++;
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      a = M'($urandom); b = M'($urandom); va = 1'($urandom); vb = 1'($urandom);
      exp_y = a ^ b; exp_v = va & vb;
      @(posedge clk); #1;
      checks++;
      if (y != exp_y || vy != exp_v) begin
        failures++;
        $display("FAIL a=%h b=%h y=%h", a, b, y);
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
