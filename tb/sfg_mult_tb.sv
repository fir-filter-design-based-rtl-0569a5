// Self-checking test of sfg_mult. The default 8 x 9 grid with 3 x 3 blocks
// must return p[j] = XOR_i a[i] & b[(j - i) mod 9] exactly 2N - 1 = 5 clocks
// after the operands enter, for a random stream with idle cycles. A second
// instance with 2 x 2 blocks (4 row blocks, 5 column blocks, latency 8)
// checks that the cut and skew placement holds for other partitions too.
module sfg_mult_tb;
  localparam int ROWS = 8, COLS = 9;
  localparam int LAT_A = 5, LAT_B = 8;

  logic clk = 0, rst = 1;
  logic [ROWS-1:0] a = '0;
  logic [COLS-1:0] b = '0;
  logic v_in = 0;
  logic [COLS-1:0] pa, pb;
  logic va, vb;
  int checks = 0, failures = 0, cyc = 0, n_a = 0, n_b = 0;

  logic [COLS-1:0] exp_p [$];
  int exp_t [$];
  logic [COLS-1:0] exp_pb [$];
  int exp_tb [$];
  logic [COLS-1:0] e;
  int t;

  sfg_mult dut (.clk, .rst, .a, .b, .v_in, .p(pa), .v_out(va));
  sfg_mult #(.ROWS(ROWS), .COLS(COLS), .L(2)) dut2 (.clk, .rst, .a, .b, .v_in, .p(pb), .v_out(vb));

  always #5 clk = ~clk;

  // Cyclic convolution over GF(2), written directly from the definition.
  function automatic logic [COLS-1:0] cyc_conv(input logic [ROWS-1:0] x, input logic [COLS-1:0] y);
    logic [COLS-1:0] r = '0;
    for (int i = 0; i < ROWS; i++)
      for (int k = 0; k < COLS; k++)
        if (x[i] && y[k]) r[(i + k) % COLS] ^= 1'b1;
    return r;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && va) begin
      n_a++;
      checks++;
      if (exp_p.size() == 0) begin
        failures++;
      end else begin
        e = exp_p.pop_front(); t = exp_t.pop_front();
        if (pa != e || cyc - t != LAT_A) begin
          failures++;
          $display("FAIL L=3 p=%b exp=%b latency=%0d", pa, e, cyc - t);
        end
      end
    end
    if (!rst && vb) begin
      n_b++;
      checks++;
      if (exp_pb.size() == 0) begin
        failures++;
      end else begin
        e = exp_pb.pop_front(); t = exp_tb.pop_front();
        if (pb != e || cyc - t != LAT_B) begin
          failures++;
          $display("FAIL L=2 p=%b exp=%b latency=%0d", pb, e, cyc - t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // single bits first: each a[i], b[k] pair lights exactly p[(i+k) mod 9]
    for (int i = 0; i < ROWS; i++)
      for (int k = 0; k < COLS; k++) begin
        a = ROWS'(1) << i; b = COLS'(1) << k; v_in = 1;
        exp_p.push_back(cyc_conv(a, b)); exp_t.push_back(cyc);
        exp_pb.push_back(cyc_conv(a, b)); exp_tb.push_back(cyc);
        @(posedge clk); #1;
      end
    for (int n = 0; n < 1000; n++) begin
      a = ROWS'($urandom); b = COLS'($urandom); v_in = ($urandom % 4) != 0;
      if (v_in) begin
        exp_p.push_back(cyc_conv(a, b)); exp_t.push_back(cyc);
        exp_pb.push_back(cyc_conv(a, b)); exp_tb.push_back(cyc);
      end
      @(posedge clk); #1;
    end
    v_in = 0;
    repeat (LAT_B + 2) @(posedge clk);
    #1;
    checks++;
    if (exp_p.size() != 0 || exp_pb.size() != 0 || n_a < 500) begin
      failures++;
      $display("FAIL results missing");
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
