// Self-checking test of nmrc: every (M+1)-bit input word at the default
// width, with r checked against the reference remainder u mod F and u_next
// against r shifted one place.
module nmrc_tb;
  import gf_ref_pkg::*;

  localparam int M = gf_pkg::M;
  localparam int unsigned F = int'(gf_pkg::F_LOW);

  logic [M:0]   u;
  logic [M-1:0] r;
  logic [M:0]   u_next;
  int checks = 0, failures = 0;
  int folds = 0;

  nmrc dut (.u, .r, .u_next);

  initial begin
    for (int i = 0; i < (1 << (M + 1)); i++) begin
      u = (M+1)'(i);
      #1;
      checks++;
      if (int'(r) != polymod(longint'(i), M, F)) begin
        failures++;
        $display("FAIL r: u=%b r=%b", u, r);
      end
      checks++;
      if (u_next != {r, 1'b0}) begin
        failures++;
        $display("FAIL u_next: u=%b u_next=%b", u, u_next);
      end
      if (u[M]) folds++;
    end
    checks++;
    if (folds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
