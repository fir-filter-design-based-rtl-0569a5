// End-to-end test of the filter at its default size (9-bit samples, 4-bit
// and 3-bit coefficients). The testbench keeps the tapped delay line
// itself: a sample stream x[n] is fed as a = x[n], b = x[n-1], c = x[n-2],
// d = x[n-3], so y is the GF(2^9) convolution of x with h1..h4.
// Every y is compared with a reference computed by schoolbook multiplication
// and long division, and must come out exactly seven clocks after its
// samples (five through the arrays, two through the adder tree).
// Phases: the three sample sets shown in the filter's simulation, a long
// random stream with idle cycles, coefficient changes between bursts, and a
// reset in the middle of a burst, after which nothing in flight may appear.
// Each of these events, and products that need a modular reduction, is
// counted; an event that never happened counts as a failure. The 8 x 9
// multiplier grid beside the filter runs a random stream of its own and
// each product is checked, five clocks after its operands entered.
module fir_tb;
  import gf_ref_pkg::*;

  localparam int M = gf_pkg::M;
  localparam int unsigned F = int'(gf_pkg::F_LOW);
  localparam int LAT = 7;

  logic clk = 0, rst = 1;
  logic [M-1:0] a = '0, b = '0, c = '0, d = '0, y;
  logic in_valid = 0, y_valid;
  logic [3:0] h1 = '0;
  logic [2:0] h2 = '0, h3 = '0, h4 = '0;

  int checks = 0, failures = 0, cyc = 0;
  int n_out = 0, n_bubble = 0, n_reduce = 0, n_coef_change = 0, n_reset = 0, n_pub_sets = 0;
  int unsigned q_y [$];
  int q_t [$];
  int unsigned ey;
  int et;
  logic [M-1:0] x_hist [4];

  // multiplier grid side
  localparam int SR = 8, SC = 9, SLAT = 5;
  logic [SR-1:0] sfg_a = '0;
  logic [SC-1:0] sfg_b = '0, sfg_p;
  logic sfg_valid = 0, sfg_p_valid;
  logic [SC-1:0] q_p [$];
  int q_pt [$];
  logic [SC-1:0] ep;
  int n_sfg = 0;

  fir dut (.clk, .rst, .a, .b, .c, .d, .in_valid, .h1, .h2, .h3, .h4, .y, .y_valid,
           .sfg_a, .sfg_b, .sfg_valid, .sfg_p, .sfg_p_valid);

  // Product modulo x^9 + 1 over GF(2), from the definition.
  function automatic logic [SC-1:0] cyc_conv(input logic [SR-1:0] x, input logic [SC-1:0] z);
    logic [SC-1:0] r = '0;
    for (int i = 0; i < SR; i++)
      for (int k = 0; k < SC; k++)
        if (x[i] && z[k]) r[(i + k) % SC] ^= 1'b1;
    return r;
  endfunction

  // The grid runs its own random stream alongside the filter.
  always @(negedge clk) begin
    if (rst) begin
      sfg_valid = 1'b0;
    end else begin
      sfg_a = SR'($urandom); sfg_b = SC'($urandom); sfg_valid = ($urandom % 3) != 0;
      if (sfg_valid) begin
        q_p.push_back(cyc_conv(sfg_a, sfg_b));
        q_pt.push_back(cyc);
      end
    end
  end

  always @(posedge clk) begin
    if (!rst && sfg_p_valid) begin
      n_sfg++;
      checks++;
      if (q_p.size() == 0) begin
        failures++;
      end else begin
        ep = q_p.pop_front();
        if (sfg_p != ep || cyc - q_pt.pop_front() != SLAT) begin
          failures++;
          $display("FAIL grid p=%b exp=%b", sfg_p, ep);
        end
      end
    end
  end

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && y_valid) begin
      n_out++;
      checks++;
      if (q_y.size() == 0) begin
        failures++;
        $display("FAIL y_valid with nothing in flight at cycle %0d", cyc);
      end else begin
        ey = q_y.pop_front();
        et = q_t.pop_front();
        if (int'(y) != ey || cyc - et != LAT) begin
          failures++;
          $display("FAIL y=%h exp=%h latency=%0d", y, ey, cyc - et);
        end
      end
    end
  end

  // Reference output for the current inputs; also counts products whose
  // carry-less form reaches degree M, i.e. that need the field reduction.
  function automatic int unsigned ref_y();
    int unsigned r = 0;
    int unsigned xs [4] = '{int'(a), int'(b), int'(c), int'(d)};
    int unsigned hs [4] = '{int'(h1), int'(h2), int'(h3), int'(h4)};
    for (int j = 0; j < 4; j++) begin
      if ((clmul(xs[j], hs[j]) >> M) != 0) n_reduce++;
      r ^= gf_mul(xs[j], hs[j], M, F);
    end
    return r;
  endfunction

  task automatic drive(input logic [M-1:0] va, vb, vc, vd);
    a = va; b = vb; c = vc; d = vd; in_valid = 1;
    q_y.push_back(ref_y());
    q_t.push_back(cyc);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  task automatic push_sample(input logic [M-1:0] xn);
    x_hist[3] = x_hist[2]; x_hist[2] = x_hist[1]; x_hist[1] = x_hist[0]; x_hist[0] = xn;
    drive(x_hist[0], x_hist[1], x_hist[2], x_hist[3]);
  endtask

  task automatic drain();
    repeat (LAT + 2) @(posedge clk);
    #1;
  endtask

  initial begin
    for (int i = 0; i < 4; i++) x_hist[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // The three sample sets of the filter's published simulation.
    h1 = 4'hF; h2 = 3'h7; h3 = 3'h5; h4 = 3'h3;
    drive(9'd1, 9'd1, 9'd1, 9'd1);
    drive(9'd4, 9'd5, 9'd9, 9'd9);
    drive(9'd20, 9'd29, 9'd73, 9'd105);
    n_pub_sets += 3;
    drain();

    // Impulse response: y must replay h1, h2, h3, h4 (times the unit sample).
    h1 = 4'h9; h2 = 3'h6; h3 = 3'h3; h4 = 3'h5;
    push_sample(9'd1);
    for (int i = 0; i < 6; i++) push_sample(9'd0);
    drain();

    // Random streams with idle cycles and new coefficients per burst.
    for (int burst = 0; burst < 30; burst++) begin
      h1 = 4'($urandom); h2 = 3'($urandom); h3 = 3'($urandom); h4 = 3'($urandom);
      n_coef_change++;
      for (int n = 0; n < 60; n++) begin
        if ($urandom % 5 == 0) begin
          n_bubble++;
          @(posedge clk); #1;
        end else begin
          push_sample(M'($urandom));
        end
      end
      drain();
    end

    // Reset in the middle of a burst: what is in flight is dropped
    // (in the grid too).
    for (int n = 0; n < 4; n++) begin
      a = M'($urandom); b = M'($urandom); c = M'($urandom); d = M'($urandom);
      in_valid = 1;
      @(posedge clk); #1;
    end
    in_valid = 0;
    rst = 1;
    n_reset++;
    q_p.delete(); q_pt.delete();
    @(posedge clk); #1;
    rst = 0;
    repeat (LAT + 2) begin
      @(posedge clk); #1;
      checks++;
      if (y_valid) begin failures++; $display("FAIL output after reset"); end
    end
    // and the filter works again afterwards
    for (int n = 0; n < 20; n++) push_sample(M'($urandom));
    drain();

    checks++;
    if (q_y.size() != 0) begin failures++; $display("FAIL %0d results missing", q_y.size()); end
    checks++;
    if (n_bubble == 0 || n_reduce == 0 || n_coef_change == 0 || n_reset == 0 || n_pub_sets == 0
        || n_sfg == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("outputs=%0d idle_cycles=%0d reduced_products=%0d coef_changes=%0d resets=%0d published_sets=%0d grid_products=%0d",
             n_out, n_bubble, n_reduce, n_coef_change, n_reset, n_pub_sets, n_sfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
